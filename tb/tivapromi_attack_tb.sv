// Workload testbench: multi-aggressor row-hammer attack against tivapromi at
// its default sizes (LoLiPRoMi, 16 banks, RefInt = 8192, Pbase = 2^-23).
// The attacker targets bank 0 with a growing set of aggressor rows, from 1
// to 20, adding one every 8000 acts; acts to bank 0 come every 54 cycles
// (tRC) and acts to random rows of the other banks are interleaved. A ref
// arrives every 9360 cycles (7.8 us at 1.2 GHz). For every aggressor the
// testbench counts its activations since its last extra activation; this
// count must never reach 69 K (half of the 139 K bit-flip threshold, for a
// victim between two aggressors), and every aggressor activated 20 K times
// must have been mitigated at least once. The activations needed for the
// first mitigation and the share of extra activations are reported.
module tivapromi_attack_tb;
  import tvp_pkg::*;
  localparam int NAGG = 20, PHASE = 8000;
  logic clk = 0, rst_n = 0, act = 0, rf = 0, wt = 0;
  logic [16:0] ra = 0; logic [3:0] ba = 0;
  logic [16:0] ra_rh; logic [3:0] ba_rh; logic irq, ws, drop;
  logic [12:0] iv; logic [15:0] busy, trig, hit;
  int checks = 0, failures = 0, n_irq = 0, n_agg_irq = 0, n_act = 0, n_ben_act = 0;
  int agg_row [NAGG], since [NAGG], total [NAGG], first [NAGG], mitig [NAGG];

  tivapromi dut (.clk, .rst_n, .act_i(act), .ref_i(rf), .ra_i(ra), .ba_i(ba), .ra_rh_o(ra_rh), .ba_rh_o(ba_rh),
    .irq_rh_o(irq), .wait_i(wt), .iv_o(iv), .win_start_o(ws), .busy_o(busy), .trig_o(trig), .hit_o(hit),
    .act_drop_o(drop));

  always #5 clk = ~clk;
  initial begin
    repeat (20000000) @(posedge clk); failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  always @(posedge clk) wt <= ($urandom_range(0, 7) == 0);
  always @(posedge clk) if (rst_n) begin
    if (irq && !wt) begin
      n_irq++;
      for (int a = 0; a < NAGG; a++) if (ba_rh == 0 && int'(ra_rh) == agg_row[a]) begin
        n_agg_irq++; mitig[a]++;
        if (first[a] < 0) first[a] = total[a];
        since[a] = 0;
      end
    end
    checks++; if (drop) begin failures++; $display("act reached a busy engine"); end
  end

  task automatic one_act(int b, int r);
    act = 1; ba = 4'(b); ra = 17'(r); n_act++;
    @(negedge clk); act = 0;
  endtask

  initial begin
    int nagg = 1, k = 0, slot = 0, sum = 0, mx = 0, nm = 0;
    for (int a = 0; a < NAGG; a++) begin
      agg_row[a] = (1 << 16) | (a * 2731 % (1 << 16));   // rows refreshed in the second half of the window
      since[a] = 0; total[a] = 0; first[a] = -1; mitig[a] = 0;
    end
    repeat (3) @(negedge clk); rst_n = 1;
    for (int n = 0; n < NAGG * PHASE; n++) begin
      if (n > 0 && n % PHASE == 0 && nagg < NAGG) nagg++;
      one_act(0, agg_row[k]);
      total[k]++; since[k]++;
      checks++; if (since[k] >= 69000) begin failures++; $display("aggressor %0d reached 69 K activations", k); since[k] = 0; end
      k = (k + 1) % nagg;
      repeat (20) @(negedge clk);
      one_act($urandom_range(1, 15), $urandom_range(0, (1 << 17) - 1)); n_ben_act++;
      repeat (32) @(negedge clk);
      slot++;
      if (slot == 9360 / 54 - 8) begin
        slot = 0;
        repeat (60) @(negedge clk);
        rf = 1; @(negedge clk); rf = 0;
        repeat (420) @(negedge clk);
      end
    end
    repeat (100) @(negedge clk);
    for (int a = 0; a < NAGG; a++) begin
      if (first[a] >= 0) begin sum += first[a]; nm++; if (first[a] > mx) mx = first[a]; end
      checks++; if (total[a] >= 20000 && first[a] < 0) begin failures++; $display("aggressor %0d never mitigated in %0d activations", a, total[a]); end
    end
    $display("%0d acts (%0d to other banks), %0d extra activations (%0d for aggressors), interval %0d",
             n_act, n_ben_act, n_irq, n_agg_irq, iv);
    $display("aggressors mitigated: %0d of %0d; activations before the first mitigation: mean %0d, max %0d",
             nm, NAGG, nm > 0 ? sum / nm : 0, mx);
    $display("benign extra activations per benign act: %0d / %0d", n_irq - n_agg_irq, n_ben_act);
    checks++; if (nm == 0) begin failures++; $display("no aggressor mitigated"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
