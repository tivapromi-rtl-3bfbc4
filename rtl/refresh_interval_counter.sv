// refresh_interval_counter: current refresh interval i of the refresh window.
//
// Every ref command observed from the memory controller ends one refresh
// interval and starts the next, so i counts ref commands modulo
// RefInt = 2^IV_W. When i wraps to 0 a new refresh window begins and
// win_start pulses for one cycle together with the new value of i; the
// history tables are cleared on that pulse. After reset i = 0.
//
// Interface: ref_i (one-cycle pulse per ref command), iv_o (registered i),
// win_start_o (one-cycle pulse in the first cycle in which iv_o is 0 again).
// Timing: iv_o changes on the clock edge after ref_i. Counting ref commands
// and wrapping at RefInt follows the document; the reset value 0 is this
// design's choice.
module refresh_interval_counter #(
  parameter int unsigned IV_W = tvp_pkg::IV_W_D
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            ref_i,
  output logic [IV_W-1:0] iv_o,
  output logic            win_start_o
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      iv_o        <= '0;
      win_start_o <= 1'b0;
    end else begin
      win_start_o <= 1'b0;
      if (ref_i) begin
        iv_o        <= iv_o + 1'b1;
        win_start_o <= (iv_o == {IV_W{1'b1}});
      end
    end
  end
endmodule
