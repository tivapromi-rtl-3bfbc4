// Testbench for counter_table (8 entries, lock threshold 4, 6-bit counter).
// A model array is driven with random records over a small set of rows
// (so rows hit, fill the table and force replacements), with random
// replacement numbers and occasional clears. The model increments on a
// match (saturating), inserts with count 1 into the first free entry, and
// otherwise replaces the first unlocked entry at or after the random number;
// entries lock at the threshold and are never replaced; with all entries
// locked the record is dropped. Every entry is compared after every step.
module counter_table_tb;
  localparam int N = 8, ROW_W = 8, CNT_W = 6, HN = 4, LOCK = 4, IW = 3, HW = 2;
  logic clk = 0, rst_n = 0, clear = 0, rec = 0, hh = 0;
  logic [ROW_W-1:0] row = 0; logic [HW-1:0] hi = 0; logic [IW-1:0] rnd = 0, ridx = 0;
  logic drop, repl, rv, rl, rhh; logic [ROW_W-1:0] rrow; logic [CNT_W-1:0] rcnt; logic [HW-1:0] rhi;
  int checks = 0, failures = 0, n_repl = 0, n_drop = 0, n_lock = 0, n_sat = 0;
  typedef struct { bit v; int row; int cnt; bit lock; bit hh; int hi; } ent_t;
  ent_t m [N];

  counter_table #(.N(N), .ROW_W(ROW_W), .CNT_W(CNT_W), .HIST_N(HN), .LOCK_TH(LOCK)) dut (
    .clk, .rst_n, .clear_i(clear), .rec_i(rec), .rec_row_i(row), .rec_hhit_i(hh), .rec_hidx_i(hi),
    .rnd_i(rnd), .rec_drop_o(drop), .rec_repl_o(repl), .rd_idx_i(ridx), .rd_valid_o(rv),
    .rd_row_o(rrow), .rd_cnt_o(rcnt), .rd_lock_o(rl), .rd_hhit_o(rhh), .rd_hidx_o(rhi));
  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk); failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic model_rec(int r, int rn, bit h, int hidx, output bit edrop, output bit erepl);
    int mi = -1, fi = -1, ui = -1;
    edrop = 0; erepl = 0;
    for (int k = 0; k < N; k++) begin
      if (mi < 0 && m[k].v && m[k].row == r) mi = k;
      if (fi < 0 && !m[k].v) fi = k;
    end
    for (int k = 0; k < N; k++) if (ui < 0 && !m[(rn + k) % N].lock) ui = (rn + k) % N;
    if (mi >= 0) begin
      if (m[mi].cnt < (1 << CNT_W) - 1) m[mi].cnt++; else n_sat++;
      if (m[mi].cnt >= LOCK) begin if (!m[mi].lock) n_lock++; m[mi].lock = 1; end
      m[mi].hh = h; m[mi].hi = hidx;
    end else if (fi >= 0) begin
      m[fi] = '{1, r, 1, LOCK <= 1, h, hidx};
    end else if (ui >= 0) begin
      m[ui] = '{1, r, 1, LOCK <= 1, h, hidx}; erepl = 1; n_repl++;
    end else begin
      edrop = 1; n_drop++;
    end
  endtask

  initial begin
    bit edrop, erepl;
    foreach (m[k]) m[k] = '{0, 0, 0, 0, 0, 0};
    repeat (2) @(posedge clk); rst_n <= 1; @(posedge clk);
    for (int n = 0; n < 3000; n++) begin
      if ($urandom_range(0, 199) == 0) begin
        clear <= 1; @(posedge clk); clear <= 0;
        foreach (m[k]) m[k] = '{0, 0, 0, 0, 0, 0};
      end else begin
        automatic int r = (n % 700 < 350) ? $urandom_range(0, 11) : $urandom_range(0, 40);
        if (n % 700 < 100) r = $urandom_range(0, 2);   // hammer a few rows: locks, saturation
        row <= ROW_W'(r); rnd <= IW'($urandom); hh <= 1'($urandom); hi <= HW'($urandom);
        rec <= 1; @(posedge clk); rec <= 0;
        model_rec(r, int'(rnd), hh, int'(hi), edrop, erepl);
        #1;
        checks++; if (drop !== edrop || repl !== erepl) begin failures++; $display("step %0d drop %0d/%0d repl %0d/%0d", n, drop, edrop, repl, erepl); end
      end
      for (int k = 0; k < N; k++) begin
        ridx = IW'(k); #1;
        checks++;
        if (rv !== m[k].v || (m[k].v && (int'(rrow) != m[k].row || int'(rcnt) != m[k].cnt ||
            rl !== m[k].lock || rhh !== m[k].hh || int'(rhi) != m[k].hi))) begin
          failures++;
          if (failures < 10) $display("step %0d entry %0d: v%0d row %0d cnt %0d lock %0d / model v%0d row %0d cnt %0d lock %0d",
                                      n, k, rv, rrow, rcnt, rl, m[k].v, m[k].row, m[k].cnt, m[k].lock);
        end
      end
      @(negedge clk);
    end
    $display("replacements %0d drops %0d locks %0d saturations %0d", n_repl, n_drop, n_lock, n_sat);
    checks++; if (n_repl == 0 || n_lock == 0) begin failures++; $display("replacement or locking never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
