// Testbench for tvp_engine. Three engines (LiPRoMi, LoPRoMi, LoLiPRoMi) see
// the same act/ref stream: 8-bit rows, 16 refresh intervals, 4 history
// entries. Pbase is set to 1 (PBASE_LOG2 = 0), which makes every decision
// deterministic: an extra activation is triggered exactly when the weight in
// use is non-zero. A model of each engine (history FIFO, Eq. (1), Eq. (2),
// variant rule, clearing at a new window) predicts each history hit and each
// requested row. Phase 1 takes every request at once and checks the busy
// time of every act (N+5 cycles, counting the cycle that carries the command) and ref (3 cycles); phase 2 takes requests
// late so that an engine has to wait for its previous request to be taken.
module tvp_engine_tb;
  import tvp_pkg::*;
  localparam int ROW_W = 8, IV_W = 4, N = 4, REFINT = 16;
  logic clk = 0, rst_n = 0, act = 0, rf = 0;
  logic [ROW_W-1:0] row = 0; logic [IV_W-1:0] iv = 0;
  logic [2:0] rv, rdy = '1, busy, trig, hit, drop;
  logic [2:0][ROW_W-1:0] rrow;
  int checks = 0, failures = 0, n_trig [3], n_hit [3], n_stall = 0, n_clear = 0;

  tvp_engine #(.VARIANT(VAR_LI),   .ROW_W(ROW_W), .IV_W(IV_W), .HIST_N(N), .PBASE_LOG2(0)) e0 (
    .clk, .rst_n, .act_i(act), .row_i(row), .ref_i(rf), .iv_i(iv), .req_valid_o(rv[0]), .req_row_o(rrow[0]),
    .req_ready_i(rdy[0]), .busy_o(busy[0]), .trig_o(trig[0]), .hit_o(hit[0]), .act_drop_o(drop[0]));
  tvp_engine #(.VARIANT(VAR_LO),   .ROW_W(ROW_W), .IV_W(IV_W), .HIST_N(N), .PBASE_LOG2(0)) e1 (
    .clk, .rst_n, .act_i(act), .row_i(row), .ref_i(rf), .iv_i(iv), .req_valid_o(rv[1]), .req_row_o(rrow[1]),
    .req_ready_i(rdy[1]), .busy_o(busy[1]), .trig_o(trig[1]), .hit_o(hit[1]), .act_drop_o(drop[1]));
  tvp_engine #(.VARIANT(VAR_LOLI), .ROW_W(ROW_W), .IV_W(IV_W), .HIST_N(N), .PBASE_LOG2(0)) e2 (
    .clk, .rst_n, .act_i(act), .row_i(row), .ref_i(rf), .iv_i(iv), .req_valid_o(rv[2]), .req_row_o(rrow[2]),
    .req_ready_i(rdy[2]), .busy_o(busy[2]), .trig_o(trig[2]), .hit_o(hit[2]), .act_drop_o(drop[2]));

  always #5 clk = ~clk;
  initial begin
    repeat (400000) @(posedge clk); failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // model state per variant
  int mrow [3][N], miv [3][N], mcnt [3], mptr [3];
  int expq [3][$];
  bit exp_hit [3];

  function automatic int log_w(int w);
    int p = 1; while (p < w + 1) p *= 2; return p;
  endfunction

  task automatic model_act(int r, int i);
    for (int v = 0; v < 3; v++) begin
      int h = -1, rf_iv, w, we;
      for (int k = 0; k < mcnt[v]; k++) if (h < 0 && mrow[v][k] == r) h = k;
      rf_iv = (h >= 0) ? miv[v][h] : (r >> (ROW_W - IV_W));
      w = (i >= rf_iv) ? i - rf_iv : i - rf_iv + REFINT;
      we = (v == 0) ? w : (v == 1) ? log_w(w) : ((h >= 0) ? w : log_w(w));
      exp_hit[v] = (h >= 0);
      if (we > 0) begin
        if (h >= 0) miv[v][h] = i;
        else begin mrow[v][mptr[v]] = r; miv[v][mptr[v]] = i; mptr[v] = (mptr[v] + 1) % N; if (mcnt[v] < N) mcnt[v]++; end
        expq[v].push_back(r);
      end
    end
  endtask

  // requests taken by the testbench
  always @(posedge clk) if (rst_n) begin
    for (int v = 0; v < 3; v++) begin
      if (rv[v] && rdy[v]) begin
        checks++;
        if (expq[v].size() == 0 || expq[v][0] != int'(rrow[v])) begin
          failures++; $display("variant %0d: unexpected request row %0d", v, rrow[v]);
        end else void'(expq[v].pop_front());
      end
      if (trig[v]) n_trig[v]++;
      if (hit[v]) begin
        n_hit[v]++;
      end
    end
  end
  always @(posedge clk) if (rst_n) begin
    checks++; if (drop != 0) begin failures++; $display("act dropped"); end
  end

  int phase = 1;
  always @(posedge clk) if (phase == 2) rdy <= 3'($urandom);

  task automatic do_act(int r);
    int cyc = 0; bit hit_seen [3];
    foreach (hit_seen[v]) hit_seen[v] = 0;
    model_act(r, int'(iv));
    @(negedge clk); row = ROW_W'(r); act = 1; @(negedge clk); act = 0; cyc = 1;
    while (busy != 0 && cyc < 200) begin
      for (int v = 0; v < 3; v++) if (hit[v]) hit_seen[v] = 1;
      if (phase == 2 && busy != 0 && cyc > N + 5) n_stall++;
      @(negedge clk); cyc++;
    end
    for (int v = 0; v < 3; v++) begin
      checks++; if (hit_seen[v] != exp_hit[v]) begin failures++; $display("variant %0d row %0d hit %0d expected %0d", v, r, hit_seen[v], exp_hit[v]); end
    end
    if (phase == 1) begin
      checks++; if (cyc != N + 5) begin failures++; $display("act took %0d cycles", cyc); end
    end
  endtask

  task automatic do_ref();
    int cyc = 0;
    @(negedge clk); rf = 1; @(negedge clk); rf = 0; cyc = 1;
    if (iv == IV_W'(REFINT - 1)) begin
      for (int v = 0; v < 3; v++) begin mcnt[v] = 0; mptr[v] = 0; end
      n_clear++;
    end
    iv = iv + 1'b1;
    while (busy != 0 && cyc < 200) begin @(negedge clk); cyc++; end
    checks++; if (cyc != 3) begin failures++; $display("ref took %0d cycles", cyc); end
  endtask

  initial begin
    for (int v = 0; v < 3; v++) begin mcnt[v] = 0; mptr[v] = 0; n_trig[v] = 0; n_hit[v] = 0; end
    repeat (2) @(posedge clk); rst_n <= 1;
    for (int n = 0; n < 3000; n++) begin
      if (n == 1500) phase = 2;
      if ($urandom_range(0, 4) == 0) do_ref();
      else do_act((n % 300 < 150) ? $urandom_range(0, 5) * 37 : $urandom_range(0, 255));
    end
    phase = 3; rdy = '1;
    repeat (10) @(posedge clk);
    for (int v = 0; v < 3; v++) begin
      checks++; if (expq[v].size() != 0) begin failures++; $display("variant %0d: %0d requests missing", v, expq[v].size()); end
      $display("variant %0d: %0d extra activations, %0d history hits", v, n_trig[v], n_hit[v]);
      checks++; if (n_trig[v] == 0 || n_hit[v] == 0) begin failures++; $display("variant %0d: no trigger or no hit", v); end
    end
    $display("window clears %0d, stalled cycles %0d", n_clear, n_stall);
    checks++; if (n_clear == 0 || n_stall == 0) begin failures++; $display("window clear or request stall never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
