// prob_decision: probabilistic extra-activation decision.
//
// The trigger probability is p = mult * w * Pbase with Pbase = 2^-PBASE_LOG2.
// LiPRoMi/LoPRoMi/LoLiPRoMi use mult = 1 and the (linear or logarithmic)
// weight; CaPRoMi uses mult = cnt_r and w = w_log_r. A uniform random number
// u = rnd / 2^RAND_W is drawn, and the neighbours are activated when u < p,
// i.e. when rnd < (mult * w) << (RAND_W - PBASE_LOG2). The comparison is
// exact; p >= 1 always triggers.
//
// Interface: w_i, mult_i, rnd_i, trig_o. Timing: purely combinational.
module prob_decision #(
  parameter int unsigned W_W        = tvp_pkg::IV_W_D + 1,
  parameter int unsigned M_W        = 1,
  parameter int unsigned RAND_W     = tvp_pkg::RAND_W_D,
  parameter int unsigned PBASE_LOG2 = tvp_pkg::PBASE_LOG2_D
) (
  input  logic [W_W-1:0]    w_i,
  input  logic [M_W-1:0]    mult_i,
  input  logic [RAND_W-1:0] rnd_i,
  output logic              trig_o
);
  localparam int unsigned P_W = W_W + M_W + RAND_W;  // wide enough for any shift
  logic [P_W-1:0] prod, thr;
  always_comb begin
    prod = P_W'(w_i) * P_W'(mult_i);
    if (RAND_W >= PBASE_LOG2) thr = prod << (RAND_W - PBASE_LOG2);
    else                      thr = prod >> (PBASE_LOG2 - RAND_W);
    trig_o = P_W'(rnd_i) < thr;
  end
endmodule
