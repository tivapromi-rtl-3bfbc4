// Testbench for refresh_interval_counter: issues ref commands with random
// gaps over several refresh windows (RefInt reduced to 16) and checks the
// interval number after every ref and that win_start pulses exactly once per
// wrap to 0, one cycle after the ref.
module refresh_interval_counter_tb;
  localparam int IV_W = 4;
  logic clk = 0, rst_n = 0, ref_i = 0;
  logic [IV_W-1:0] iv;
  logic win;
  int checks = 0, failures = 0, model = 0, wins = 0, exp_wins = 0;
  refresh_interval_counter #(.IV_W(IV_W)) dut (.clk, .rst_n, .ref_i, .iv_o(iv), .win_start_o(win));
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  always @(posedge clk) if (rst_n && win) wins++;
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    checks++; if (iv !== 0) begin failures++; $display("reset value %0d", iv); end
    for (int n = 0; n < 70; n++) begin
      repeat ($urandom_range(0, 3)) @(posedge clk);
      ref_i <= 1; @(posedge clk); ref_i <= 0;
      model = (model + 1) % (1 << IV_W);
      if (model == 0) exp_wins++;
      #1;
      checks++; if (iv !== IV_W'(model)) begin failures++; $display("iv %0d expected %0d", iv, model); end
      checks++; if (win !== (model == 0)) begin failures++; $display("win_start %0d at iv %0d", win, model); end
    end
    @(posedge clk);
    checks++; if (wins != exp_wins) begin failures++; $display("windows %0d expected %0d", wins, exp_wins); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
