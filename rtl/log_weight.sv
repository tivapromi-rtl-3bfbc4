// log_weight: logarithmic weight of Eq. (2), w_log = 2^ceil(log2(w + 1)).
//
// This is the smallest power of two strictly greater than w: 1 for w = 0,
// otherwise the bit one above the most significant set bit of w (all w in
// 16..31 give 32). It is built as a priority encoder that finds the leading
// one of w and shifts it up by one place, as the document describes.
//
// Interface: w_i (IV_W bits), wlog_o (IV_W+1 bits, one-hot).
// Timing: purely combinational.
module log_weight #(
  parameter int unsigned IV_W = tvp_pkg::IV_W_D
) (
  input  logic [IV_W-1:0] w_i,
  output logic [IV_W:0]   wlog_o
);
  always_comb begin
    wlog_o = (IV_W+1)'(1);
    for (int k = 0; k < IV_W; k++)
      if (w_i[k]) wlog_o = (IV_W+1)'(1) << (k + 1);
  end
endmodule
