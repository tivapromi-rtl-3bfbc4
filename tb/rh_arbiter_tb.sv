// Testbench for rh_arbiter (4 banks). Each bank model raises requests with
// random rows and holds them until granted; wait is random. Checks: every
// request is delivered exactly once and in order per bank, IRQ_RH/RA_RH/BA_RH
// stay unchanged while wait holds them, and with all banks requesting the
// grants rotate through the banks (round-robin).
module rh_arbiter_tb;
  localparam int B = 4, ROW_W = 8;
  logic clk = 0, rst_n = 0, wt = 0;
  logic [B-1:0] v = '0, rdy; logic [B-1:0][ROW_W-1:0] rows;
  logic [ROW_W-1:0] ra; logic [1:0] ba; logic irq;
  int checks = 0, failures = 0, sent [B], got [B], stalls = 0, rr_ok = 0;
  int q [B][$];
  rh_arbiter #(.BANKS(B), .ROW_W(ROW_W)) dut (.clk, .rst_n, .req_valid_i(v), .req_row_i(rows),
    .req_ready_o(rdy), .wait_i(wt), .ra_rh_o(ra), .ba_rh_o(ba), .irq_rh_o(irq));
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk); failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  logic [ROW_W-1:0] pra; logic [1:0] pba; logic pirq, pwt; int lastb = -1;
  always @(posedge clk) if (rst_n) begin
    // hold while wait
    if (pirq && pwt) begin
      stalls++;
      checks++; if (!irq || ra !== pra || ba !== pba) begin failures++; $display("request changed while wait"); end
    end
    // consumption
    if (irq && !wt) begin
      checks++;
      if (q[ba].size() == 0 || q[ba][0] != int'(ra)) begin failures++; $display("unexpected row %0d bank %0d", ra, ba); end
      else void'(q[ba].pop_front());
      got[ba]++;
    end
    pra <= ra; pba <= ba; pirq <= irq; pwt <= wt;
  end
  // bank request models
  for (genvar b = 0; b < B; b++) begin : g_src
    always @(posedge clk) if (rst_n) begin
      if (v[b] && rdy[b]) begin
        q[b].push_back(int'(rows[b]));
        v[b] <= 1'b0;
      end else if (!v[b] && sent[b] < 200 && $urandom_range(0, 3) == 0) begin
        v[b] <= 1'b1; rows[b] <= ROW_W'($urandom); sent[b]++;
      end
    end
  end
  initial begin
    foreach (sent[b]) begin sent[b] = 0; got[b] = 0; end
    repeat (2) @(posedge clk); rst_n <= 1;
    // phase 1: random traffic with random wait
    repeat (4000) begin @(posedge clk); wt <= ($urandom_range(0, 2) == 0); end
    wt <= 0;
    repeat (50) @(posedge clk);
    foreach (sent[b]) begin
      checks++; if (got[b] != sent[b] || q[b].size() != 0) begin failures++; $display("bank %0d sent %0d got %0d", b, sent[b], got[b]); end
    end
    // phase 2: all banks request at once, grants must rotate
    @(negedge clk);
    force v = '1;
    for (int n = 0; n < 8; n++) begin
      @(negedge clk);
      if (n > 0 && $countones(rdy) == 1) begin
        automatic int g = 0; for (int k = 0; k < B; k++) if (rdy[k]) g = k;
        if (lastb >= 0 && g == (lastb + 1) % B) rr_ok++;
        lastb = g;
      end
    end
    release v;
    checks++; if (rr_ok < 6) begin failures++; $display("round robin order seen %0d times", rr_ok); end
    checks++; if (stalls == 0) begin failures++; $display("wait never held a request"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
