// weight_generator: Bernoulli weight sampler of one output channel.
//
// Holds a uniform random number generator, a comparator and a multiplexer:
// a weight w is drawn as w = q when p > eps and w = 0 otherwise, so w takes
// q with probability p/256. With p and q set from the mean and variance of
// the trained weight distribution (p = E^2/(E^2+V), q = (E^2+V)/E) the
// sampled weight keeps that mean and variance; the sum over many inputs then
// behaves like the Gaussian sum the Bayesian network expects.
// Interface: `adv` draws a new eps (one per weight consumed); p and q come
// from the weight memory and `w` is combinational in p, q and the current
// eps. Structure (URNG, comparator, MUX) follows the accelerator this RTL
// models; the 8-bit widths of p and eps are this design's choices.
module weight_generator
  import b2n2_pkg::*;
#(
  parameter logic [LFSR_W-1:0] SEED = 16'hACE1
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  adv,
  input  prob_t p,
  input  qval_t q,
  output qval_t w
);
  logic [DATA_W-1:0] eps;

  urng #(.SEED(SEED)) u_urng (
    .clk(clk), .rst(rst), .adv(adv), .eps(eps)
  );

  always_comb w = (p > eps) ? q : '0;
endmodule
