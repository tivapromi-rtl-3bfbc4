// weight_calc: time-varying weight of Eq. (1).
//
// A row r is refreshed in refresh interval f_r = r / RowsPI; with neighbouring
// rows refreshed together and RowsPI a power of two, f_r is simply the top
// IV_W bits of the row address. The weight is the number of refresh intervals
// since the row was refreshed (or, on a history-table hit, since its last
// extra activation):  w = i - ref            if i >= ref
//                     w = i - ref + RefInt   if i <  ref
// With RefInt = 2^IV_W both cases are one IV_W-bit modular subtraction.
//
// Interface: row_i, iv_i (current interval i), use_hist_i / hist_iv_i (take
// the interval stored in the history table instead of f_r), w_o, f_o.
// Timing: purely combinational.
module weight_calc #(
  parameter int unsigned ROW_W = tvp_pkg::ROW_W_D,
  parameter int unsigned IV_W  = tvp_pkg::IV_W_D
) (
  input  logic [ROW_W-1:0] row_i,
  input  logic [IV_W-1:0]  iv_i,
  input  logic             use_hist_i,
  input  logic [IV_W-1:0]  hist_iv_i,
  output logic [IV_W-1:0]  f_o,
  output logic [IV_W-1:0]  w_o
);
  logic [IV_W-1:0] ref_iv;
  always_comb begin
    f_o    = row_i[ROW_W-1 -: IV_W];          // f_r = r >> log2(RowsPI)
    ref_iv = use_hist_i ? hist_iv_i : f_o;
    w_o    = iv_i - ref_iv;                    // modulo RefInt = 2^IV_W
  end
endmodule
