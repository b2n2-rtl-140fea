// urng: uniform random number generator of one weight generator.
//
// A 16-bit Galois LFSR (x^16 + x^14 + x^13 + x^11 + 1) is advanced eight
// steps each time `adv` is high, and its low byte is the uniform sample
// `eps` (0..255). The state starts at SEED on reset; SEED must be non-zero.
// An LFSR as the uniform source follows the accelerator this RTL models;
// the polynomial, the width and the eight-step advance are this design's
// choices. Timing: `eps` changes on the clock edge where `adv` is sampled
// high, so the first sample after reset is seed advanced once.
module urng
  import b2n2_pkg::*;
#(
  parameter logic [LFSR_W-1:0] SEED = 16'hACE1
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              adv,
  output logic [DATA_W-1:0] eps
);
  logic [LFSR_W-1:0] state;

  always_ff @(posedge clk) begin
    if (rst)      state <= SEED;
    else if (adv) state <= lfsr_step8(state);
  end

  assign eps = state[DATA_W-1:0];

  initial assert (SEED != '0) else $error("urng: SEED must be non-zero");
endmodule
