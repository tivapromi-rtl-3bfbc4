// rh_arbiter: hands the per-bank extra-activation requests to the memory
// controller.
//
// Every bank engine holds at most one request (row) until it is taken. The
// arbiter serves the banks round-robin and places one request at a time on
// the output register RA_RH / BA_RH / IRQ_RH. While the memory controller
// raises wait, the output request stays on these lines unchanged (and the
// other requests stay held in the engines); the request counts as taken in a
// cycle where IRQ_RH is high and wait is low, after which the memory
// controller's interrupt logic turns it into an act_n command. The
// round-robin order and this valid/wait rule are this design's choice; the
// document says only that the signals are buffered while wait is high.
//
// Interface: req_valid_i/req_row_i per bank, req_ready_o per bank (one-cycle
// grant), ra_rh_o, ba_rh_o, irq_rh_o, wait_i.
// Timing: a request granted in cycle t appears on IRQ_RH from cycle t+1.
module rh_arbiter #(
  parameter int unsigned BANKS = 16,
  parameter int unsigned ROW_W = tvp_pkg::ROW_W_D,
  localparam int unsigned BW   = (BANKS > 1) ? $clog2(BANKS) : 1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [BANKS-1:0]             req_valid_i,
  input  logic [BANKS-1:0][ROW_W-1:0]  req_row_i,
  output logic [BANKS-1:0]             req_ready_o,
  input  logic                         wait_i,
  output logic [ROW_W-1:0]             ra_rh_o,
  output logic [BW-1:0]                ba_rh_o,
  output logic                         irq_rh_o
);
  logic [BW-1:0] last_q;     // bank granted last
  logic          load, any;
  logic [BW-1:0] gnt;

  // first requesting bank after last_q, circularly
  always_comb begin
    any = 1'b0;
    gnt = '0;
    for (int k = BANKS; k >= 1; k--) begin
      int unsigned b;
      b = (int'(last_q) + k) % BANKS;
      if (req_valid_i[b]) begin any = 1'b1; gnt = BW'(b); end
    end
  end

  assign load = any && (!irq_rh_o || !wait_i);
  always_comb begin
    req_ready_o = '0;
    if (load) req_ready_o[gnt] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      irq_rh_o <= 1'b0;
      ra_rh_o  <= '0;
      ba_rh_o  <= '0;
      last_q   <= BW'(BANKS-1);
    end else if (load) begin
      irq_rh_o <= 1'b1;
      ra_rh_o  <= req_row_i[gnt];
      ba_rh_o  <= gnt;
      last_q   <= gnt;
    end else if (!wait_i) begin
      irq_rh_o <= 1'b0;
    end
  end

  a_hold_while_wait: assert property (@(posedge clk) disable iff (!rst_n)
    (irq_rh_o && wait_i) |=> (irq_rh_o && $stable(ra_rh_o) && $stable(ba_rh_o)));
endmodule
