// Testbench for ca_engine (CaPRoMi): 8-bit rows, 16 refresh intervals,
// 4 history entries, 4 counters, lock threshold 3, Pbase = 2^-4.
// Phase 1 (at most 4 distinct rows per interval, so no counter entry is
// replaced): a model keeps the per-interval counts, the history FIFO and the
// history links, and at every ref works out p = cnt * 2^ceil(log2(w+1)) / 16
// for each counter entry in table order. An entry with p >= 1 must trigger;
// the engine's other decisions are followed by the model, and their number
// must match the sum of their probabilities within 4 sigma. Every triggered
// row must be requested exactly once before the next ref. Act and ref busy
// times are checked (N_HIST+3 and 4*N_CNT+2 cycles).
// Phase 2 uses many rows per interval (replacement, locking, dropping) and
// checks only that every request names a row activated in the interval.
module ca_engine_tb;
  localparam int ROW_W = 8, IV_W = 4, HN = 4, CN = 4, LOCK = 3, PB = 4, REFINT = 16;
  logic clk = 0, rst_n = 0, act = 0, rf = 0;
  logic [ROW_W-1:0] row = 0; logic [IV_W-1:0] iv = 0;
  logic rv, busy, trig, hit, drop, recdrop; logic [ROW_W-1:0] rrow;
  int checks = 0, failures = 0, phase = 1;
  int n_trig = 0, n_forced = 0, n_frac_trig = 0, n_hit = 0, n_repl = 0, n_recdrop = 0, n_clear = 0;
  real sum_p = 0.0, var_p = 0.0;

  ca_engine #(.ROW_W(ROW_W), .IV_W(IV_W), .HIST_N(HN), .CNT_N(CN), .CNT_W(6), .LOCK_TH(LOCK),
              .PBASE_LOG2(PB)) dut (
    .clk, .rst_n, .act_i(act), .row_i(row), .ref_i(rf), .iv_i(iv), .req_valid_o(rv), .req_row_o(rrow),
    .req_ready_i(1'b1), .busy_o(busy), .trig_o(trig), .hit_o(hit), .act_drop_o(drop), .rec_drop_o(recdrop));

  always #5 clk = ~clk;
  initial begin
    repeat (2000000) @(posedge clk); failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // model
  int hrow [HN], hiv [HN], hcnt = 0, hptr = 0;
  int crow [CN], ccnt [CN], chit [CN], chidx [CN], cn = 0;
  int expreq [$];
  int act_rows [$], prev_rows [$];
  int trig_entries [$];

  function automatic int log_w(int w);
    int p = 1; while (p < w + 1) p *= 2; return p;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (trig) trig_entries.push_back(int'(dut.e_q) - 1);
    if (dut.ct_repl) n_repl++;
    if (hit) n_hit++;
    if (recdrop) n_recdrop++;
    if (rv) begin
      checks++;
      if (phase == 1) begin
        int f = -1;
        foreach (expreq[k]) if (f < 0 && expreq[k] == int'(rrow)) f = k;
        if (f < 0) begin failures++; $display("unexpected request row %0d", rrow); end
        else expreq.delete(f);
      end else begin
        int f = -1;
        foreach (act_rows[k]) if (act_rows[k] == int'(rrow)) f = k;
        foreach (prev_rows[k]) if (prev_rows[k] == int'(rrow)) f = k;
        if (f < 0) begin failures++; $display("phase 2: request for row %0d never activated", rrow); end
      end
    end
    checks++; if (drop) begin failures++; $display("act dropped"); end
  end

  task automatic do_act(int r);
    int cyc, h = -1, m = -1;
    for (int k = 0; k < hcnt; k++) if (h < 0 && hrow[k] == r) h = k;
    for (int k = 0; k < cn; k++) if (m < 0 && crow[k] == r) m = k;
    if (phase == 1) begin
      if (m < 0) begin m = cn; cn++; crow[m] = r; ccnt[m] = 0; end
      ccnt[m]++; chit[m] = (h >= 0); chidx[m] = (h >= 0) ? h : 0;
    end
    act_rows.push_back(r);
    @(negedge clk); row = ROW_W'(r); act = 1; @(negedge clk); act = 0; cyc = 1;
    while (busy && cyc < 1000) begin @(negedge clk); cyc++; end
    checks++; if (cyc != HN + 3) begin failures++; $display("act took %0d cycles", cyc); end
  endtask

  task automatic do_ref();
    int cyc, ie = int'(iv);
    bit wend = (iv == IV_W'(REFINT - 1));
    trig_entries.delete();
    checks++; if (expreq.size() != 0) begin failures++; $display("%0d requests of the last interval not issued", expreq.size()); end
    expreq.delete();
    @(negedge clk); rf = 1; @(negedge clk); rf = 0; cyc = 1;
    iv = iv + 1'b1;
    while (busy && cyc < 1000) begin @(negedge clk); cyc++; end
    checks++; if (cyc != 4 * CN + 2) begin failures++; $display("ref took %0d cycles", cyc); end
    if (wend) begin hcnt = 0; hptr = 0; n_clear++; end
    if (phase == 1) begin
      for (int e = 0; e < cn; e++) begin
        bit link = chit[e] && chidx[e] < hcnt && hrow[chidx[e]] == crow[e];
        int rfv = link ? hiv[chidx[e]] : (crow[e] >> (ROW_W - IV_W));
        int w = (ie >= rfv) ? ie - rfv : ie - rfv + REFINT;
        int num = ccnt[e] * log_w(w);
        bit t = 0;
        foreach (trig_entries[k]) if (trig_entries[k] == e) t = 1;
        if (num >= (1 << PB)) begin
          n_forced++;
          checks++; if (!t) begin failures++; $display("entry %0d (row %0d, p>=1) did not trigger", e, crow[e]); end
        end else begin
          real p = real'(num) / real'(1 << PB);
          sum_p += p; var_p += p * (1.0 - p);
          if (t) n_frac_trig++;
        end
        if (t) begin
          n_trig++;
          if (link) hiv[chidx[e]] = ie;
          else begin hrow[hptr] = crow[e]; hiv[hptr] = ie; hptr = (hptr + 1) % HN; if (hcnt < HN) hcnt++; end
          expreq.push_back(crow[e]);
        end
      end
      for (int e = cn; e < CN; e++) foreach (trig_entries[k]) if (trig_entries[k] == e) begin
        failures++; $display("empty entry %0d triggered", e);
      end
    end
    cn = 0;
    prev_rows = act_rows;
    act_rows.delete();
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n <= 1;
    for (int n = 0; n < 600; n++) begin
      int nrows = $urandom_range(1, 4);
      int rows [4];
      for (int k = 0; k < 4; k++) rows[k] = $urandom_range(0, 9) * 25;
      repeat ($urandom_range(1, 12)) do_act(rows[$urandom_range(0, nrows - 1)]);
      repeat (4) @(negedge clk);
      do_ref();
      repeat (4) @(negedge clk);
    end
    repeat (10) @(negedge clk);
    checks++; if (expreq.size() != 0) begin failures++; $display("requests not issued at end"); end
    $display("phase 1: %0d triggers (%0d forced), fractional %0d vs expected %f (sd %f), hits %0d, window clears %0d",
             n_trig, n_forced, n_frac_trig, sum_p, $sqrt(var_p), n_hit, n_clear);
    checks++; if (real'(n_frac_trig) > sum_p + 4.0 * $sqrt(var_p) + 1.0 || real'(n_frac_trig) < sum_p - 4.0 * $sqrt(var_p) - 1.0) begin
      failures++; $display("trigger rate does not match the probabilities");
    end
    checks++; if (n_forced == 0 || n_hit == 0 || n_clear == 0) begin failures++; $display("a mechanism was never exercised"); end
    phase = 2;
    for (int n = 0; n < 150; n++) begin
      if (n % 10 == 5) begin
        // lock all four counters, then one more row cannot be recorded
        for (int r = 1; r <= 4; r++) repeat (LOCK) do_act(r);
        do_act(5);
      end
      repeat ($urandom_range(4, 12)) do_act((n % 3 == 0) ? $urandom_range(0, 2) : $urandom_range(0, 255));
      repeat (4) @(negedge clk);
      do_ref();
      repeat (20) @(negedge clk);
    end
    $display("phase 2: replacements %0d, unrecorded acts (all locked) %0d", n_repl, n_recdrop);
    checks++; if (n_repl == 0 || n_recdrop == 0) begin failures++; $display("replacement or all-locked drop never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
