// End-to-end testbench for tivapromi at reduced sizes: 4 banks, 10-bit rows,
// 32 refresh intervals per window, 8 history entries, 8 counters,
// Pbase = 2^-9. Two instances, LoLiPRoMi (the default variant) and CaPRoMi,
// watch the same command stream, which follows DDR4-like timing: at least
// 54 cycles between acts to one bank (tRC), 4 cycles between any two acts,
// no act within 420 cycles after a ref (tRFC) and all banks idle before a
// ref. The stream mixes random rows with a row-hammer (flooding) attack on
// one row of bank 1, and the memory-controller side raises wait at random.
// Checks: no act ever reaches a busy engine; every IRQ_RH names a row that
// was activated in that bank; requests stay put while wait is high; the
// attacked row receives extra activations in both variants and more than
// any benign row. Each mechanism (history hit, linear and logarithmic
// weighting, window clear, wait hold, several banks requesting at once,
// counter replacement, counter lock) is counted and must occur.
module tivapromi_tb;
  import tvp_pkg::*;
  localparam int BANKS = 4, ROW_W = 10, IV_W = 5, BW = 2, NV = 2;
  localparam int AGG_ROW = 'h2A5, AGG_BANK = 1;
  logic clk = 0, rst_n = 0, act = 0, rf = 0, wt = 0;
  logic [ROW_W-1:0] ra = 0; logic [BW-1:0] ba = 0;
  logic [NV-1:0][ROW_W-1:0] ra_rh; logic [NV-1:0][BW-1:0] ba_rh; logic [NV-1:0] irq, drop, ws;
  logic [NV-1:0][IV_W-1:0] ivo; logic [NV-1:0][BANKS-1:0] busy, trig, hit;
  int checks = 0, failures = 0, cyc = 0;
  int n_act = 0, n_ref = 0, n_win [NV], n_irq [NV], n_agg [NV], n_hit [NV], n_hold [NV], n_multi [NV];
  int n_lin = 0, n_log = 0, n_repl = 0, n_lock = 0, n_benign_max [NV];
  int acted [int];        // key {bank, row}: rows activated per bank
  int benign_irq [int];   // key {variant, bank, row}: IRQs for benign rows

  tivapromi #(.VARIANT(VAR_LOLI), .BANKS(BANKS), .ROW_W(ROW_W), .IV_W(IV_W), .HIST_N(8), .CNT_N(8),
              .LOCK_TH(8), .PBASE_LOG2(9)) u_loli (
    .clk, .rst_n, .act_i(act), .ref_i(rf), .ra_i(ra), .ba_i(ba), .ra_rh_o(ra_rh[0]), .ba_rh_o(ba_rh[0]),
    .irq_rh_o(irq[0]), .wait_i(wt), .iv_o(ivo[0]), .win_start_o(ws[0]), .busy_o(busy[0]), .trig_o(trig[0]),
    .hit_o(hit[0]), .act_drop_o(drop[0]));
  tivapromi #(.VARIANT(VAR_CA), .BANKS(BANKS), .ROW_W(ROW_W), .IV_W(IV_W), .HIST_N(8), .CNT_N(8),
              .LOCK_TH(8), .PBASE_LOG2(9)) u_ca (
    .clk, .rst_n, .act_i(act), .ref_i(rf), .ra_i(ra), .ba_i(ba), .ra_rh_o(ra_rh[1]), .ba_rh_o(ba_rh[1]),
    .irq_rh_o(irq[1]), .wait_i(wt), .iv_o(ivo[1]), .win_start_o(ws[1]), .busy_o(busy[1]), .trig_o(trig[1]),
    .hit_o(hit[1]), .act_drop_o(drop[1]));

  always #5 clk = ~clk;
  initial begin
    repeat (3000000) @(posedge clk); failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // memory-controller side
  logic [NV-1:0][ROW_W-1:0] pra; logic [NV-1:0][BW-1:0] pba; logic [NV-1:0] pirq; logic pwt;
  always @(posedge clk) if (rst_n) begin
    for (int v = 0; v < NV; v++) begin
      if (pirq[v] && pwt) begin
        n_hold[v]++;
        checks++; if (!irq[v] || ra_rh[v] !== pra[v] || ba_rh[v] !== pba[v]) begin failures++; $display("v%0d request changed under wait", v); end
      end
      if (irq[v] && !wt) begin
        n_irq[v]++;
        checks++;
        if (!acted.exists(int'({ba_rh[v], ra_rh[v]}))) begin failures++; $display("v%0d IRQ for row %0d bank %0d never activated", v, ra_rh[v], ba_rh[v]); end
        if (int'(ba_rh[v]) == AGG_BANK && int'(ra_rh[v]) == AGG_ROW) n_agg[v]++;
        else begin
          automatic int key = (v << 16) | int'({ba_rh[v], ra_rh[v]});
          if (!benign_irq.exists(key)) benign_irq[key] = 0;
          benign_irq[key]++;
        end
      end
      if ($countones(u_loli.u_arb.req_valid_i) > 1 && v == 0) n_multi[0]++;
      if ($countones(u_ca.u_arb.req_valid_i) > 1 && v == 1) n_multi[1]++;
      if (ws[v]) n_win[v]++;
      n_hit[v] += $countones(hit[v]);
      checks++; if (drop[v]) begin failures++; $display("v%0d act reached a busy engine", v); end
    end
    pra <= ra_rh; pba <= ba_rh; pirq <= irq; pwt <= wt;
  end
  always @(posedge clk) wt <= (cyc % 6000 < 2000) || ($urandom_range(0, 3) == 0);  // long and short waits

  // per-bank probes: LoLiPRoMi weighting path at each decision, CaPRoMi
  // counter replacements and locked counter entries
  int b_lin [BANKS], b_log [BANKS], b_repl [BANKS], b_lock [BANKS];
  for (genvar gb = 0; gb < BANKS; gb++) begin : g_probe
    initial begin b_lin[gb] = 0; b_log[gb] = 0; b_repl[gb] = 0; b_lock[gb] = 0; end
    always @(posedge clk) if (rst_n) begin
      // LoLiPRoMi weights linearly on a history hit, logarithmically otherwise
      if (u_loli.g_bank[gb].g_tv.u_eng.hit_o) b_lin[gb]++;
      if (act && int'(ba) == gb) b_log[gb]++;
      if (u_ca.g_bank[gb].g_ca.u_eng.ct_repl) b_repl[gb]++;
      for (int k = 0; k < 8; k++)
        if (u_ca.g_bank[gb].g_ca.u_eng.u_ct.tab[k].lock && u_ca.g_bank[gb].g_ca.u_eng.ct_rec) b_lock[gb]++;
    end
  end

  // command stream
  int last_act [BANKS];

  always @(posedge clk) cyc <= cyc + 1;

  task automatic issue_act(int b, int r);
    while (cyc - last_act[b] < 54) @(negedge clk);
    act = 1; ra = ROW_W'(r); ba = BW'(b);
    acted[(b << ROW_W) | r] = 1;
    @(negedge clk); act = 0;
    last_act[b] = cyc; n_act++;
    repeat (3) @(negedge clk);
  endtask

  task automatic issue_ref();
    for (int b = 0; b < BANKS; b++) while (cyc - last_act[b] < 54) @(negedge clk);
    rf = 1; @(negedge clk); rf = 0; n_ref++;
    repeat (420) @(negedge clk);
  endtask

  initial begin
    for (int v = 0; v < NV; v++) begin n_win[v] = 0; n_irq[v] = 0; n_agg[v] = 0; n_hit[v] = 0; n_hold[v] = 0; n_multi[v] = 0; end
    for (int b = 0; b < BANKS; b++) last_act[b] = -1000;
    repeat (3) @(negedge clk); rst_n = 1;
    // 80 refresh intervals (2.5 windows), about 40 acts per interval
    for (int i = 0; i < 80; i++) begin
      for (int n = 0; n < 40; n++) begin
        if (n % 2 == 0) issue_act(AGG_BANK, AGG_ROW);                    // attacker
        else issue_act($urandom_range(0, BANKS - 1), $urandom_range(0, (1 << ROW_W) - 1));
      end
      issue_ref();
    end
    repeat (200) @(negedge clk);
    for (int v = 0; v < NV; v++) begin
      automatic int mx = 0;
      foreach (benign_irq[k]) if ((k >> 16) == v && benign_irq[k] > mx) mx = benign_irq[k];
      $display("variant %s: %0d IRQs, %0d for the attacked row (most for a benign row %0d), %0d history hits, %0d windows, %0d held by wait, %0d cycles with several banks requesting",
               v == 0 ? "LoLiPRoMi" : "CaPRoMi", n_irq[v], n_agg[v], mx, n_hit[v], n_win[v], n_hold[v], n_multi[v]);
      checks++; if (n_agg[v] == 0 || n_agg[v] <= mx) begin failures++; $display("attacked row not singled out"); end
      checks++; if (n_hit[v] == 0 || n_win[v] < 2 || n_hold[v] == 0 || n_multi[v] == 0) begin failures++; $display("a mechanism never happened"); end
      checks++; if (n_irq[v] > n_act) begin failures++; $display("more IRQs than acts"); end
    end
    for (int b = 0; b < BANKS; b++) begin
      n_lin += b_lin[b]; n_log += b_log[b] - b_lin[b]; n_repl += b_repl[b]; n_lock += b_lock[b];
    end
    $display("acts %0d refs %0d; LoLiPRoMi linear %0d logarithmic %0d; CaPRoMi replacements %0d, records seeing a locked entry %0d",
             n_act, n_ref, n_lin, n_log, n_repl, n_lock);
    checks++; if (n_lin == 0 || n_log == 0 || n_repl == 0 || n_lock == 0) begin failures++; $display("a mechanism never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
