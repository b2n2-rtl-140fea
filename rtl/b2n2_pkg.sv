// b2n2_pkg: types, fixed-point formats and helper functions shared by the
// Bernoulli-sampling Bayesian CNN accelerator.
//
// All data are 8-bit fixed point, as in the accelerator this RTL models.
// The split between integer and fraction bits is this design's choice:
//   activations  : signed, ACT_FRAC fraction bits
//   q (weight)   : signed, W_FRAC fraction bits
//   p            : unsigned probability, p/256
//   bias         : signed, ACT_FRAC fraction bits
// Products carry ACT_FRAC+W_FRAC fraction bits and are summed in an ACC_W-bit
// accumulator; a layer output is the accumulator shifted right by W_FRAC,
// passed through ReLU (convolutions) and saturated back to 8 bits.
//
// Parameters reach the layers through one write port (param_wr_t): the host
// writes (p,q) pairs into the per-channel weight memories and the biases.
package b2n2_pkg;

  localparam int DATA_W   = 8;   // activation / parameter width
  localparam int ACT_FRAC = 4;   // fraction bits of activations and bias
  localparam int W_FRAC   = 6;   // fraction bits of q
  localparam int ACC_FRAC = ACT_FRAC + W_FRAC;  // fraction bits of products and sums
  localparam int ACC_W    = 32;  // accumulator width
  localparam int LFSR_W   = 16;  // URNG state width

  typedef logic signed [DATA_W-1:0] act_t;
  typedef logic signed [DATA_W-1:0] qval_t;
  typedef logic        [DATA_W-1:0] prob_t;
  typedef logic signed [ACC_W-1:0]  acc_t;

  // one (p,q) entry of a weight memory
  typedef struct packed {
    prob_t p;
    qval_t q;
  } wparam_t;

  // parameter write bundle, shared by all layers
  typedef struct packed {
    logic        we;       // write strobe
    logic        is_bias;  // 1: bias of channel `lane` (value in q), 0: (p,q) entry
    logic [3:0]  layer;    // layer id (conv1 = 1 ... fc1 = 7)
    logic [7:0]  lane;     // output channel
    logic [15:0] addr;     // position within the channel's weight list
    prob_t       p;
    qval_t       q;
  } param_wr_t;

  // Galois LFSR, x^16 + x^14 + x^13 + x^11 + 1, advanced eight steps at once
  // so that every 8-bit sample is made of fresh bits.
  function automatic logic [LFSR_W-1:0] lfsr_step8(input logic [LFSR_W-1:0] s);
    logic [LFSR_W-1:0] r;
    r = s;
    for (int i = 0; i < 8; i++) begin
      if (r[0]) r = (r >> 1) ^ 16'hB400;
      else      r = r >> 1;
    end
    return r;
  endfunction

  // Distinct non-zero seed for every (layer, lane) pair.
  function automatic logic [LFSR_W-1:0] lfsr_seed(input int layer, input int lane);
    logic [LFSR_W-1:0] s;
    s = 16'hACE1 ^ LFSR_W'(layer * 16'h1F35) ^ LFSR_W'(lane * 16'h9E37);
    return (s == '0) ? 16'h0001 : s;
  endfunction

  // Requantise an accumulator (ACT_FRAC+W_FRAC fraction bits) to an 8-bit
  // activation, with optional ReLU, saturating.
  function automatic act_t requant(input acc_t a, input logic relu);
    acc_t s;
    s = a >>> (ACC_FRAC - ACT_FRAC);
    if (relu && s < 0) s = '0;
    if (s > acc_t'(127))  return act_t'(127);
    if (s < acc_t'(-128)) return act_t'(-128);
    return act_t'(s);
  endfunction

endpackage
