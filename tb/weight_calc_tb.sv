// Testbench for weight_calc at the default sizes: random rows, intervals and
// history intervals; the expected weight follows the two cases of Eq. (1)
// with f_r = r / RowsPI, RowsPI = RowsPB / RefInt.
module weight_calc_tb;
  localparam int ROW_W = tvp_pkg::ROW_W_D, IV_W = tvp_pkg::IV_W_D;
  localparam int REFINT = 1 << IV_W, ROWSPI = (1 << ROW_W) / REFINT;
  logic [ROW_W-1:0] row; logic [IV_W-1:0] iv, hiv, f, w; logic uh;
  int checks = 0, failures = 0, fr, rf, ew;
  weight_calc dut (.row_i(row), .iv_i(iv), .use_hist_i(uh), .hist_iv_i(hiv), .f_o(f), .w_o(w));
  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int n = 0; n < 5000; n++) begin
      row = ROW_W'($urandom); iv = IV_W'($urandom); hiv = IV_W'($urandom); uh = 1'($urandom);
      if (n < 4) begin row = (n%2) ? '1 : '0; iv = (n/2) ? '1 : '0; uh = 0; end
      #1;
      fr = int'(row) / ROWSPI;
      rf = uh ? int'(hiv) : fr;
      ew = (int'(iv) >= rf) ? int'(iv) - rf : int'(iv) - rf + REFINT;
      checks++; if (int'(f) != fr) begin failures++; $display("f %0d expected %0d", f, fr); end
      checks++; if (int'(w) != ew) begin failures++; $display("row %0d iv %0d uh %0d hiv %0d: w %0d expected %0d", row, iv, uh, hiv, w, ew); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
