// Testbench for history_table (8 entries, 10-bit rows, 4-bit intervals).
// A queue model of the FIFO table is driven with random inserts, in-place
// updates, clears and searches. Each search must finish exactly N cycles
// after it starts and report the model's first match; the read port must
// show every model entry; the table must wrap (overwrite the oldest entry)
// and report its fill level.
module history_table_tb;
  localparam int N = 8, ROW_W = 10, IV_W = 4, IW = 3;
  logic clk = 0, rst_n = 0;
  logic clear = 0, search = 0, ins = 0, upd = 0;
  logic [ROW_W-1:0] srow = 0, irow = 0, rd_row;
  logic [IV_W-1:0] iiv = 0, hit_iv, rd_iv;
  logic [IW-1:0] uidx = 0, hit_idx, ins_idx, rd_idx = 0;
  logic busy, done, hit, rd_v; logic [IW:0] count;
  int checks = 0, failures = 0, wraps = 0, hits = 0;
  logic [ROW_W-1:0] mrow [N]; logic [IV_W-1:0] miv [N]; int mcount = 0, mptr = 0;

  history_table #(.N(N), .ROW_W(ROW_W), .IV_W(IV_W)) dut (.clk, .rst_n, .clear_i(clear),
    .search_i(search), .search_row_i(srow), .search_busy_o(busy), .search_done_o(done),
    .hit_o(hit), .hit_idx_o(hit_idx), .hit_iv_o(hit_iv), .ins_i(ins), .ins_row_i(irow),
    .ins_iv_i(iiv), .upd_i(upd), .upd_idx_i(uidx), .ins_idx_o(ins_idx), .rd_idx_i(rd_idx),
    .rd_row_o(rd_row), .rd_iv_o(rd_iv), .rd_valid_o(rd_v), .count_o(count));
  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk); failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic do_search(input logic [ROW_W-1:0] r);
    int cyc = 0, eidx = -1;
    for (int k = 0; k < mcount; k++) if (eidx < 0 && mrow[k] == r) eidx = k;
    srow <= r; search <= 1; @(posedge clk); search <= 0;
    do begin @(posedge clk); #1; cyc++; end while (!done && cyc < 100);
    checks++; if (cyc != N) begin failures++; $display("search took %0d cycles", cyc); end
    checks++; if (hit !== (eidx >= 0)) begin failures++; $display("row %0d hit %0d expected %0d", r, hit, eidx >= 0); end
    if (eidx >= 0) begin
      hits++;
      checks++; if (int'(hit_idx) != eidx || hit_iv !== miv[eidx]) begin failures++; $display("hit idx %0d iv %0d expected %0d %0d", hit_idx, hit_iv, eidx, miv[eidx]); end
    end
  endtask

  task automatic check_all();
    checks++; if (int'(count) != mcount || int'(ins_idx) != mptr) begin failures++; $display("count %0d ptr %0d expected %0d %0d", count, ins_idx, mcount, mptr); end
    for (int k = 0; k < N; k++) begin
      rd_idx = IW'(k); #1;
      checks++;
      if (rd_v !== (k < mcount) || (k < mcount && (rd_row !== mrow[k] || rd_iv !== miv[k]))) begin
        failures++; $display("entry %0d: v %0d row %0d iv %0d", k, rd_v, rd_row, rd_iv);
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n <= 1; @(posedge clk);
    check_all();
    for (int n = 0; n < 600; n++) begin
      automatic int op = $urandom_range(0, 99);
      if (op < 40) begin
        automatic logic [ROW_W-1:0] r = ROW_W'($urandom_range(0, 15));
        automatic logic [IV_W-1:0]  v = IV_W'($urandom);
        irow <= r; iiv <= v; ins <= 1; @(posedge clk); ins <= 0;
        mrow[mptr] = r; miv[mptr] = v; mptr = (mptr + 1) % N;
        if (mcount < N) mcount++; else wraps++;
      end else if (op < 55 && mcount > 0) begin
        automatic int k = $urandom_range(0, mcount - 1);
        automatic logic [IV_W-1:0] v = IV_W'($urandom);
        uidx <= IW'(k); iiv <= v; upd <= 1; @(posedge clk); upd <= 0;
        miv[k] = v;
      end else if (op < 58) begin
        clear <= 1; @(posedge clk); clear <= 0;
        mcount = 0; mptr = 0;
      end else begin
        do_search(ROW_W'($urandom_range(0, 15)));
      end
      @(negedge clk);
      check_all();
      @(posedge clk);
    end
    checks++; if (wraps == 0 || hits == 0) begin failures++; $display("wraps %0d hits %0d", wraps, hits); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
