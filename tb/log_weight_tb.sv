// Testbench for log_weight: all weights 0..RefInt-1 at the default size. The
// expected value 2^ceil(log2(w+1)) is found by doubling a power of two until
// it reaches w+1; the document's example (16..31 give 32) is checked too.
module log_weight_tb;
  localparam int IV_W = tvp_pkg::IV_W_D;
  logic [IV_W-1:0] w; logic [IV_W:0] wl;
  int checks = 0, failures = 0, p;
  log_weight dut (.w_i(w), .wlog_o(wl));
  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int v = 0; v < (1 << IV_W); v++) begin
      w = IV_W'(v); #1;
      p = 1; while (p < v + 1) p = p * 2;
      checks++; if (int'(wl) != p) begin failures++; $display("w %0d: %0d expected %0d", v, wl, p); end
      if (v >= 16 && v <= 31) begin checks++; if (wl != 32) failures++; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
