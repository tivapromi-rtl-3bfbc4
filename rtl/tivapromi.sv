// tivapromi: time-varying probabilistic row-hammer mitigation, as an
// extension beside a DDR4 memory controller.
//
// The block watches the controller's act and ref commands with their row
// (RA) and bank (BA) addresses. Every bank has its own engine and history
// table; BA routes each act to its bank's engine, every ref goes to all of
// them. A shared counter gives the current refresh interval i (ref commands
// modulo RefInt). When an engine decides that the neighbours of an activated
// row must be refreshed, the row and bank are passed back to the controller
// on RA_RH / BA_RH with IRQ_RH; they are held while the controller raises
// wait. The controller then issues act_n, which activates both physical
// neighbours of RA_RH (the neighbour addresses are not computed here).
//
// VARIANT chooses the weighting: VAR_LI (LiPRoMi), VAR_LO (LoPRoMi),
// VAR_LOLI (LoLiPRoMi, the default: the smallest-area choice that resists
// flooding) or VAR_CA (CaPRoMi, counter-assisted). All sizes default to the
// DDR4 / 1 GB-bank configuration (see tvp_pkg).
//
// Timing: an act is processed in 37 cycles (35 for CaPRoMi) and a ref in 3
// (258 for CaPRoMi), within the 54 / 420 cycles at 1.2 GHz that tRC = 45 ns
// and tRFC = 350 ns leave. act_drop_o flags an act that reached a busy
// engine, which the memory timing should make impossible.
module tivapromi
  import tvp_pkg::*;
#(
  parameter variant_e    VARIANT    = VAR_LOLI,
  parameter int unsigned BANKS      = 16,
  parameter int unsigned ROW_W      = ROW_W_D,
  parameter int unsigned IV_W       = IV_W_D,
  parameter int unsigned HIST_N     = HIST_N_D,
  parameter int unsigned CNT_N      = CNT_N_D,
  parameter int unsigned CNT_W      = CNT_W_D,
  parameter int unsigned LOCK_TH    = LOCK_TH_D,
  parameter int unsigned PBASE_LOG2 = PBASE_LOG2_D,
  localparam int unsigned BW        = (BANKS > 1) ? $clog2(BANKS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // commands observed from the memory controller
  input  logic             act_i,
  input  logic             ref_i,
  input  logic [ROW_W-1:0] ra_i,
  input  logic [BW-1:0]    ba_i,
  // extra-activation request to the memory controller
  output logic [ROW_W-1:0] ra_rh_o,
  output logic [BW-1:0]    ba_rh_o,
  output logic             irq_rh_o,
  input  logic             wait_i,
  // status
  output logic [IV_W-1:0]  iv_o,
  output logic             win_start_o,
  output logic [BANKS-1:0] busy_o,
  output logic [BANKS-1:0] trig_o,
  output logic [BANKS-1:0] hit_o,
  output logic             act_drop_o
);
  logic [BANKS-1:0]            req_valid, req_ready, act_b, drop_b;
  logic [BANKS-1:0][ROW_W-1:0] req_row;

  refresh_interval_counter #(.IV_W(IV_W)) u_ric (
    .clk, .rst_n, .ref_i, .iv_o, .win_start_o);

  for (genvar b = 0; b < BANKS; b++) begin : g_bank
    localparam logic [31:0] SEED = 32'h2545_F491 ^ (32'(b + 1) * 32'h9E37_79B9);
    assign act_b[b] = act_i && (ba_i == BW'(b));
    if (VARIANT == VAR_CA) begin : g_ca
      logic unused_rec_drop;
      ca_engine #(.ROW_W(ROW_W), .IV_W(IV_W), .HIST_N(HIST_N), .CNT_N(CNT_N), .CNT_W(CNT_W),
                  .LOCK_TH(LOCK_TH), .PBASE_LOG2(PBASE_LOG2), .SEED(SEED)) u_eng (
        .clk, .rst_n, .act_i(act_b[b]), .row_i(ra_i), .ref_i, .iv_i(iv_o),
        .req_valid_o(req_valid[b]), .req_row_o(req_row[b]), .req_ready_i(req_ready[b]),
        .busy_o(busy_o[b]), .trig_o(trig_o[b]), .hit_o(hit_o[b]), .act_drop_o(drop_b[b]),
        .rec_drop_o(unused_rec_drop));
    end else begin : g_tv
      tvp_engine #(.VARIANT(VARIANT), .ROW_W(ROW_W), .IV_W(IV_W), .HIST_N(HIST_N),
                   .PBASE_LOG2(PBASE_LOG2), .SEED(SEED)) u_eng (
        .clk, .rst_n, .act_i(act_b[b]), .row_i(ra_i), .ref_i, .iv_i(iv_o),
        .req_valid_o(req_valid[b]), .req_row_o(req_row[b]), .req_ready_i(req_ready[b]),
        .busy_o(busy_o[b]), .trig_o(trig_o[b]), .hit_o(hit_o[b]), .act_drop_o(drop_b[b]));
    end
  end

  assign act_drop_o = |drop_b;

  rh_arbiter #(.BANKS(BANKS), .ROW_W(ROW_W)) u_arb (
    .clk, .rst_n, .req_valid_i(req_valid), .req_row_i(req_row), .req_ready_o(req_ready),
    .wait_i, .ra_rh_o, .ba_rh_o, .irq_rh_o);
endmodule
