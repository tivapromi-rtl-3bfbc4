// Testbench for prng: compares 4000 outputs with a software xorshift32 model,
// checks that the state never becomes zero, and that every output bit is
// set in roughly half of the samples.
module prng_tb;
  logic clk = 0, rst_n = 0; logic [31:0] r, m;
  int checks = 0, failures = 0; int ones [32];
  prng #(.SEED(32'h1234_5678)) dut (.clk, .rst_n, .rnd_o(r));
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk); failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    foreach (ones[k]) ones[k] = 0;
    repeat (2) @(posedge clk); rst_n <= 1; #1;
    m = 32'h1234_5678;
    for (int n = 0; n < 4000; n++) begin
      checks++; if (r !== m) begin failures++; if (failures < 5) $display("step %0d: %h expected %h", n, r, m); end
      checks++; if (r == 0) failures++;
      for (int k = 0; k < 32; k++) ones[k] += int'(r[k]);
      m = m ^ (m << 13); m = m ^ (m >> 17); m = m ^ (m << 5);
      @(posedge clk); #1;
    end
    for (int k = 0; k < 32; k++) begin
      checks++; if (ones[k] < 1800 || ones[k] > 2200) begin failures++; $display("bit %0d set %0d/4000", k, ones[k]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
