// Full-size testbench for tivapromi with every parameter at its default
// (LoLiPRoMi, 16 banks, 2^17 rows per bank, RefInt = 8192, 32 history
// entries, Pbase = 2^-23). Cycles stand for the 1.2 GHz DDR4 clock.
// Phase 1, flooding attack: one row of bank 0 is activated every 54 cycles
// (tRC), interleaved with acts to random rows of the other banks, and a ref
// arrives every 9360 cycles (7.8 us). The attacked row must receive an extra
// activation long before 69 K activations (half of the 139 K bit-flip
// threshold); the number of activations needed is reported. Every IRQ_RH
// must name a row activated in that bank, and no act may reach a busy
// engine. Phase 2: refs at tRFC spacing run the interval counter to the end
// of the window; the attacked row must be found in the history table just
// before the window ends and must be gone after the new window starts.
module tivapromi_full_tb;
  import tvp_pkg::*;
  localparam int AGG_ROW = 'h1ABCD;
  logic clk = 0, rst_n = 0, act = 0, rf = 0, wt = 0;
  logic [16:0] ra = 0; logic [3:0] ba = 0;
  logic [16:0] ra_rh; logic [3:0] ba_rh; logic irq, ws, drop;
  logic [12:0] iv; logic [15:0] busy, trig, hit;
  int checks = 0, failures = 0, cyc = 0, agg_acts = 0, first_irq_at = -1, n_irq = 0, n_win = 0;
  int acted [int];

  tivapromi dut (.clk, .rst_n, .act_i(act), .ref_i(rf), .ra_i(ra), .ba_i(ba), .ra_rh_o(ra_rh), .ba_rh_o(ba_rh),
    .irq_rh_o(irq), .wait_i(wt), .iv_o(iv), .win_start_o(ws), .busy_o(busy), .trig_o(trig), .hit_o(hit),
    .act_drop_o(drop));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    repeat (12000000) @(posedge clk); failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  always @(posedge clk) wt <= ($urandom_range(0, 7) == 0);
  always @(posedge clk) if (rst_n) begin
    if (irq && !wt) begin
      n_irq++;
      checks++; if (!acted.exists(int'({ba_rh, ra_rh}))) begin failures++; $display("IRQ for row %h bank %0d never activated", ra_rh, ba_rh); end
      if (ba_rh == 0 && int'(ra_rh) == AGG_ROW && first_irq_at < 0) first_irq_at = agg_acts;
    end
    if (ws) n_win++;
    checks++; if (drop) begin failures++; $display("act reached a busy engine"); end
  end

  task automatic one_act(int b, int r);
    act = 1; ba = 4'(b); ra = 17'(r); acted[(b << 17) | r] = 1;
    @(negedge clk); act = 0;
  endtask

  bit seen_hit;
  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    // phase 1: flooding one row of bank 0
    while (first_irq_at < 0 && agg_acts < 69000) begin
      for (int s = 0; s < 9360 / 54 - 8; s++) begin
        one_act(0, AGG_ROW); agg_acts++;
        repeat (20) @(negedge clk);
        one_act($urandom_range(1, 15), $urandom_range(0, (1 << 17) - 1));
        repeat (32) @(negedge clk);
        if (first_irq_at >= 0) break;
      end
      repeat (60) @(negedge clk);
      rf = 1; @(negedge clk); rf = 0;
      repeat (420) @(negedge clk);
    end
    repeat (100) @(negedge clk);
    $display("flooding: first extra activation of the attacked row after %0d activations (%0d IRQs in all, interval %0d)",
             first_irq_at, n_irq, iv);
    checks++; if (first_irq_at < 0 || first_irq_at >= 69000) begin failures++; $display("attack not mitigated in time"); end
    // phase 2: run to the end of the refresh window
    while (iv != 13'h1FFF) begin rf = 1; @(negedge clk); rf = 0; repeat (420) @(negedge clk); end
    seen_hit = 0;
    one_act(0, AGG_ROW);
    repeat (60) begin if (hit[0]) seen_hit = 1; @(negedge clk); end
    checks++; if (!seen_hit) begin failures++; $display("attacked row not in the history table before the window ends"); end
    rf = 1; @(negedge clk); rf = 0; repeat (420) @(negedge clk);
    checks++; if (n_win != 1 || iv != 0) begin failures++; $display("window start not seen (%0d, iv %0d)", n_win, iv); end
    seen_hit = 0;
    one_act(0, AGG_ROW);
    repeat (60) begin if (hit[0]) seen_hit = 1; @(negedge clk); end
    checks++; if (seen_hit) begin failures++; $display("history table not cleared at the new window"); end
    $display("window wrapped after %0d cycles", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
