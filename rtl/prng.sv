// prng: 32-bit xorshift pseudo-random number generator.
//
// The probabilistic decision compares p_r against a pseudo-random number;
// the document does not say how that number is produced. This design uses
// Marsaglia's xorshift32 (x ^= x<<13; x ^= x>>17; x ^= x<<5), which has
// period 2^32-1 and needs one 32-bit register. A new number is produced
// every clock cycle; SEED (non-zero) sets the reset state so that the
// per-bank generators run out of step.
//
// Interface: rnd_o, the current state. Timing: advances every cycle.
module prng #(
  parameter logic [31:0] SEED = 32'h2545_F491
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic [31:0] rnd_o
);
  logic [31:0] x1, x2, x3;
  always_comb begin
    x1 = rnd_o ^ (rnd_o << 13);
    x2 = x1 ^ (x1 >> 17);
    x3 = x2 ^ (x2 << 5);
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rnd_o <= (SEED == 32'd0) ? 32'd1 : SEED;
    else        rnd_o <= x3;
  end
endmodule
