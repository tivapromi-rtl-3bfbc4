// history_table: per-bank table of recent extra activations.
//
// Each entry holds an aggressor row and the refresh interval in which an
// extra activation of its neighbours was triggered. Entries are written in
// FIFO order: once the table is full the oldest entry is overwritten. The
// table is searched sequentially, one entry per clock cycle, so a search takes
// exactly N cycles whatever the fill level; the document notes that this
// search only has to finish before the next activation in the same bank.
// clear_i empties the table (new refresh window). Entries 0..count-1 of the
// FIFO are valid, so no per-entry valid bit is stored (32 x 30 bits = 120 B
// for the default sizes).
//
// Operations (one per cycle, clear has priority over writes):
//   search_i + search_row_i : start a search; search_done_o pulses N cycles
//                             later with hit_o, hit_idx_o, hit_iv_o (first hit).
//   ins_i + ins_row_i/ins_iv_i : write a new entry at ins_idx_o (FIFO tail).
//   upd_i + upd_idx_i/ins_iv_i : overwrite the interval of an existing entry.
//   rd_idx_i -> rd_row_o, rd_iv_o, rd_valid_o : combinational read port.
// Update-in-place on a hit (instead of a duplicate entry) is this design's
// choice.
module history_table #(
  parameter int unsigned N     = tvp_pkg::HIST_N_D,
  parameter int unsigned ROW_W = tvp_pkg::ROW_W_D,
  parameter int unsigned IV_W  = tvp_pkg::IV_W_D,
  localparam int unsigned IW   = (N > 1) ? $clog2(N) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear_i,
  // sequential search
  input  logic             search_i,
  input  logic [ROW_W-1:0] search_row_i,
  output logic             search_busy_o,
  output logic             search_done_o,
  output logic             hit_o,
  output logic [IW-1:0]    hit_idx_o,
  output logic [IV_W-1:0]  hit_iv_o,
  // writes
  input  logic             ins_i,
  input  logic [ROW_W-1:0] ins_row_i,
  input  logic [IV_W-1:0]  ins_iv_i,
  input  logic             upd_i,
  input  logic [IW-1:0]    upd_idx_i,
  output logic [IW-1:0]    ins_idx_o,
  // read port
  input  logic [IW-1:0]    rd_idx_i,
  output logic [ROW_W-1:0] rd_row_o,
  output logic [IV_W-1:0]  rd_iv_o,
  output logic             rd_valid_o,
  output logic [IW:0]      count_o
);
  logic [ROW_W-1:0] row_mem [N];
  logic [IV_W-1:0]  iv_mem  [N];
  logic [IW-1:0]    wr_ptr;
  logic [IW:0]      count;
  logic [IW-1:0]    sidx;
  logic             sbusy;
  logic [ROW_W-1:0] srow;

  assign ins_idx_o     = wr_ptr;
  assign count_o       = count;
  assign search_busy_o = sbusy;
  assign rd_row_o      = row_mem[rd_idx_i];
  assign rd_iv_o       = iv_mem[rd_idx_i];
  assign rd_valid_o    = ({1'b0, rd_idx_i} < count);

  // storage
  always_ff @(posedge clk) begin
    if (!clear_i && ins_i) begin
      row_mem[wr_ptr] <= ins_row_i;
      iv_mem[wr_ptr]  <= ins_iv_i;
    end else if (!clear_i && upd_i) begin
      iv_mem[upd_idx_i] <= ins_iv_i;
    end
  end

  // FIFO pointers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      count  <= '0;
    end else if (clear_i) begin
      wr_ptr <= '0;
      count  <= '0;
    end else if (ins_i) begin
      wr_ptr <= (wr_ptr == IW'(N-1)) ? '0 : wr_ptr + 1'b1;
      if (count != (IW+1)'(N)) count <= count + 1'b1;
    end
  end

  // sequential search, one entry per cycle
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sbusy         <= 1'b0;
      sidx          <= '0;
      srow          <= '0;
      search_done_o <= 1'b0;
      hit_o         <= 1'b0;
      hit_idx_o     <= '0;
      hit_iv_o      <= '0;
    end else begin
      search_done_o <= 1'b0;
      if (search_i) begin
        sbusy     <= 1'b1;
        sidx      <= '0;
        srow      <= search_row_i;
        hit_o     <= 1'b0;
        hit_idx_o <= '0;
        hit_iv_o  <= '0;
      end else if (sbusy) begin
        if (!hit_o && ({1'b0, sidx} < count) && row_mem[sidx] == srow) begin
          hit_o     <= 1'b1;
          hit_idx_o <= sidx;
          hit_iv_o  <= iv_mem[sidx];
        end
        if (sidx == IW'(N-1)) begin
          sbusy         <= 1'b0;
          search_done_o <= 1'b1;
        end else begin
          sidx <= sidx + 1'b1;
        end
      end
    end
  end
endmodule
