// Testbench for prob_decision. Part 1 (default Pbase = 2^-23, CaPRoMi-sized
// multiplier): random w, mult and random numbers; the expected decision is
// rnd / 2^32 < mult * w * 2^-23, evaluated as rnd * 2^23 < mult * w * 2^32
// in 64-bit arithmetic. Part 2 (Pbase = 2^-12): the trigger rate over many
// uniformly random numbers must match p = w * 2^-12 within 4 sigma.
module prob_decision_tb;
  logic [13:0] w; logic [7:0] m; logic [31:0] rnd; logic t1, t2;
  int checks = 0, failures = 0, hits;
  longint lhs, rhs;
  real p, sd;
  prob_decision #(.W_W(14), .M_W(8), .RAND_W(32), .PBASE_LOG2(23)) dut1 (.w_i(w), .mult_i(m), .rnd_i(rnd), .trig_o(t1));
  prob_decision #(.W_W(14), .M_W(1), .RAND_W(32), .PBASE_LOG2(12)) dut2 (.w_i(w), .mult_i(1'b1), .rnd_i(rnd), .trig_o(t2));
  initial begin
    #10000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int n = 0; n < 20000; n++) begin
      w = 14'($urandom_range(0, 8192)); m = 8'($urandom);
      rnd = (n % 2) ? $urandom : 32'($urandom_range(0, 32'h0400_0000));
      #1;
      lhs = longint'(rnd) << 23; rhs = (longint'(w) * longint'(m)) << 32;
      checks++; if (t1 !== (lhs < rhs)) begin failures++; if (failures < 5) $display("w %0d m %0d rnd %h: %0d", w, m, rnd, t1); end
    end
    for (int wv = 0; wv <= 2048; wv += 512) begin
      hits = 0; w = 14'(wv);
      for (int n = 0; n < 20000; n++) begin rnd = $urandom; #1; hits += int'(t2); end
      p = real'(wv) / 4096.0; sd = $sqrt(20000.0 * p * (1.0 - p));
      checks++;
      if (real'(hits) - 20000.0 * p > 4.0 * sd + 1.0 || 20000.0 * p - real'(hits) > 4.0 * sd + 1.0) begin
        failures++; $display("w %0d: %0d triggers, expected %f", wv, hits, 20000.0 * p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
