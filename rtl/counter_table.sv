// counter_table: CaPRoMi table of per-interval activation counters.
//
// Each entry holds a row, the number of its activations in the current
// refresh interval, a link to the row's history-table entry (hit flag and
// index, found by the history search of the same act) and a lock bit. An act
// (rec_i) is matched against all entries in parallel: on a match the counter
// is incremented (saturating) and the link refreshed; otherwise the row is
// written with a count of 1 into the first free entry, or, when the table is
// full, in place of a randomly chosen entry. Entries whose count has reached
// LOCK_TH are locked and are never replaced, so the random choice starts at
// rnd_i and takes the first unlocked entry from there (circularly). If every
// entry is locked the activation is not recorded and rec_drop_o pulses.
// clear_i empties the table (after the collective decision at ref).
//
// Interface: rec_i/rec_row_i/rec_hhit_i/rec_hidx_i (record one act),
// rnd_i (replacement choice), rd_idx_i -> rd_* (combinational read port),
// rec_drop_o, rec_repl_o (pulse: an entry was evicted).
// Timing: a record takes one cycle; reads are combinational.
// The lock threshold and the in-order "first free" choice are this design's
// own; the document gives neither.
module counter_table #(
  parameter int unsigned N       = tvp_pkg::CNT_N_D,
  parameter int unsigned ROW_W   = tvp_pkg::ROW_W_D,
  parameter int unsigned CNT_W   = tvp_pkg::CNT_W_D,
  parameter int unsigned HIST_N  = tvp_pkg::HIST_N_D,
  parameter int unsigned LOCK_TH = tvp_pkg::LOCK_TH_D,
  localparam int unsigned IW     = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned HW     = (HIST_N > 1) ? $clog2(HIST_N) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear_i,
  input  logic             rec_i,
  input  logic [ROW_W-1:0] rec_row_i,
  input  logic             rec_hhit_i,
  input  logic [HW-1:0]    rec_hidx_i,
  input  logic [IW-1:0]    rnd_i,
  output logic             rec_drop_o,
  output logic             rec_repl_o,
  input  logic [IW-1:0]    rd_idx_i,
  output logic             rd_valid_o,
  output logic [ROW_W-1:0] rd_row_o,
  output logic [CNT_W-1:0] rd_cnt_o,
  output logic             rd_lock_o,
  output logic             rd_hhit_o,
  output logic [HW-1:0]    rd_hidx_o
);
  typedef struct packed {
    logic             valid;
    logic [ROW_W-1:0] row;
    logic [CNT_W-1:0] cnt;
    logic             lock;
    logic             hhit;
    logic [HW-1:0]    hidx;
  } entry_t;

  entry_t tab [N];

  // parallel match, first free entry, first unlocked entry from rnd_i
  logic          match, has_free, has_unlocked;
  logic [IW-1:0] match_idx, free_idx, repl_idx, k_idx;
  always_comb begin
    match = 1'b0; match_idx = '0;
    has_free = 1'b0; free_idx = '0;
    has_unlocked = 1'b0; repl_idx = '0;
    k_idx = '0;
    for (int k = N-1; k >= 0; k--) begin
      if (tab[k].valid && tab[k].row == rec_row_i) begin match = 1'b1; match_idx = IW'(k); end
      if (!tab[k].valid) begin has_free = 1'b1; free_idx = IW'(k); end
    end
    for (int k = N-1; k >= 0; k--) begin
      k_idx = IW'((int'(rnd_i) + k) % N);
      if (!tab[k_idx].lock) begin has_unlocked = 1'b1; repl_idx = k_idx; end
    end
  end

  assign rd_valid_o = tab[rd_idx_i].valid;
  assign rd_row_o   = tab[rd_idx_i].row;
  assign rd_cnt_o   = tab[rd_idx_i].cnt;
  assign rd_lock_o  = tab[rd_idx_i].lock;
  assign rd_hhit_o  = tab[rd_idx_i].hhit;
  assign rd_hidx_o  = tab[rd_idx_i].hidx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) tab[k] <= '0;
      rec_drop_o <= 1'b0;
      rec_repl_o <= 1'b0;
    end else begin
      rec_drop_o <= 1'b0;
      rec_repl_o <= 1'b0;
      if (clear_i) begin
        for (int k = 0; k < N; k++) tab[k] <= '0;
      end else if (rec_i) begin
        if (match) begin
          if (tab[match_idx].cnt != {CNT_W{1'b1}})
            tab[match_idx].cnt <= tab[match_idx].cnt + 1'b1;
          if (32'(tab[match_idx].cnt) + 1 >= LOCK_TH) tab[match_idx].lock <= 1'b1;
          tab[match_idx].hhit <= rec_hhit_i;
          tab[match_idx].hidx <= rec_hidx_i;
        end else if (has_free || has_unlocked) begin
          tab[has_free ? free_idx : repl_idx] <= '{valid: 1'b1, row: rec_row_i,
              cnt: CNT_W'(1), lock: (LOCK_TH <= 1), hhit: rec_hhit_i, hidx: rec_hidx_i};
          rec_repl_o <= !has_free;
        end else begin
          rec_drop_o <= 1'b1;
        end
      end
    end
  end
endmodule
