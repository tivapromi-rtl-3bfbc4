// Workload testbench: flooding attack on one row, all four variants at their
// default sizes (16 banks, RefInt = 8192, Pbase = 2^-23), side by side on the
// same command stream. One row of bank 0 is activated every 54 cycles (tRC),
// with acts to random rows of other banks interleaved, and a ref every
// 9360 cycles (7.8 us at 1.2 GHz); that is about 165 acts of the row per
// refresh interval. For each variant the number of activations of the row
// before its first extra activation is reported.
// Scenario A floods, one after the other without reset, 8 rows whose refresh lies far back
// (typical rows): every variant must react to each before 69 K activations
// (half the 139 K threshold); the mean count per variant is reported.
// All four instances use the same per-bank seeds, so they draw the same
// random numbers: the variants differ only in their thresholds, and a small
// random number can trigger several of them at the same activation.
// Scenario B floods the row refreshed in the current interval, the worst
// case for an attacker who knows the refresh order: the weight then starts
// at 0. Its counts are reported to show how much slower the linear weight
// reacts; they are not pass/fail, since the reaction time there is long by
// design.
module tivapromi_flood_tb;
  import tvp_pkg::*;
  localparam int NV = 4, LIMIT = 69000;
  logic clk = 0, rst_n = 0, act = 0, rf = 0, wt = 0;
  logic [16:0] ra = 0; logic [3:0] ba = 0;
  logic [NV-1:0][16:0] ra_rh; logic [NV-1:0][3:0] ba_rh; logic [NV-1:0] irq, ws, drop;
  logic [NV-1:0][12:0] iv; logic [NV-1:0][15:0] busy, trig, hit;
  int checks = 0, failures = 0, acts = 0, agg = 0;
  int first [NV], sum [NV] = '{0, 0, 0, 0};
  string vname [NV] = '{"LiPRoMi", "LoPRoMi", "LoLiPRoMi", "CaPRoMi"};

  tivapromi #(.VARIANT(VAR_LI)) u_li (.clk, .rst_n, .act_i(act), .ref_i(rf), .ra_i(ra), .ba_i(ba),
    .ra_rh_o(ra_rh[0]), .ba_rh_o(ba_rh[0]), .irq_rh_o(irq[0]), .wait_i(wt), .iv_o(iv[0]), .win_start_o(ws[0]),
    .busy_o(busy[0]), .trig_o(trig[0]), .hit_o(hit[0]), .act_drop_o(drop[0]));
  tivapromi #(.VARIANT(VAR_LO)) u_lo (.clk, .rst_n, .act_i(act), .ref_i(rf), .ra_i(ra), .ba_i(ba),
    .ra_rh_o(ra_rh[1]), .ba_rh_o(ba_rh[1]), .irq_rh_o(irq[1]), .wait_i(wt), .iv_o(iv[1]), .win_start_o(ws[1]),
    .busy_o(busy[1]), .trig_o(trig[1]), .hit_o(hit[1]), .act_drop_o(drop[1]));
  tivapromi #(.VARIANT(VAR_LOLI)) u_loli (.clk, .rst_n, .act_i(act), .ref_i(rf), .ra_i(ra), .ba_i(ba),
    .ra_rh_o(ra_rh[2]), .ba_rh_o(ba_rh[2]), .irq_rh_o(irq[2]), .wait_i(wt), .iv_o(iv[2]), .win_start_o(ws[2]),
    .busy_o(busy[2]), .trig_o(trig[2]), .hit_o(hit[2]), .act_drop_o(drop[2]));
  tivapromi #(.VARIANT(VAR_CA)) u_ca (.clk, .rst_n, .act_i(act), .ref_i(rf), .ra_i(ra), .ba_i(ba),
    .ra_rh_o(ra_rh[3]), .ba_rh_o(ba_rh[3]), .irq_rh_o(irq[3]), .wait_i(wt), .iv_o(iv[3]), .win_start_o(ws[3]),
    .busy_o(busy[3]), .trig_o(trig[3]), .hit_o(hit[3]), .act_drop_o(drop[3]));

  always #5 clk = ~clk;
  initial begin
    repeat (20000000) @(posedge clk); failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int agg_row = 0;
  always @(posedge clk) if (rst_n) begin
    for (int v = 0; v < NV; v++) begin
      if (irq[v] && !wt && ba_rh[v] == 0 && int'(ra_rh[v]) == agg_row && first[v] < 0) first[v] = agg;
      checks++; if (drop[v]) begin failures++; $display("%s: act reached a busy engine", vname[v]); end
    end
  end

  task automatic flood(int row, bit do_reset);
    int slot = 0;
    agg_row = row; agg = 0;
    foreach (first[v]) first[v] = -1;
    if (do_reset) begin rst_n = 0; repeat (3) @(negedge clk); rst_n = 1; end
    while (agg < LIMIT && (first[0] < 0 || first[1] < 0 || first[2] < 0 || first[3] < 0)) begin
      act = 1; ba = 0; ra = 17'(row); @(negedge clk); act = 0; agg++;
      repeat (20) @(negedge clk);
      act = 1; ba = 4'($urandom_range(1, 15)); ra = 17'($urandom); @(negedge clk); act = 0;
      repeat (32) @(negedge clk);
      slot++;
      if (slot == 9360 / 54 - 8) begin
        slot = 0;
        repeat (260) @(negedge clk);
        rf = 1; @(negedge clk); rf = 0;
        repeat (420) @(negedge clk);
      end
    end
    repeat (400) @(negedge clk);   // CaPRoMi issues in the interval after its decision
  endtask

  initial begin
    for (int t = 0; t < 8; t++) begin
      flood('h10000 + t * 'h1F3B, t == 0);
      for (int v = 0; v < NV; v++) begin
        sum[v] += first[v];
        checks++; if (first[v] < 0) begin failures++; $display("%s did not react within %0d activations", vname[v], LIMIT); end
      end
      $display("A row %h: first extra activation after %0d / %0d / %0d / %0d activations (Li / Lo / LoLi / Ca)",
               'h10000 + t * 'h1F3B, first[0], first[1], first[2], first[3]);
    end
    for (int v = 0; v < NV; v++)
      $display("A (rows refreshed long ago): %-10s mean %0d activations before the first extra activation", vname[v], sum[v] / 8);
    flood('h00007, 1'b1);
    for (int v = 0; v < NV; v++)
      $display("B (row refreshed in the current interval): %-10s first extra activation after %0d activations%s",
               vname[v], first[v], first[v] < 0 ? " (none within 69000)" : "");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
