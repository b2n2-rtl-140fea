// weight_bram: weight parameter memory of one output channel.
//
// DEPTH entries of (p,q), stored in the order the channel consumes them:
// for a 3x3 convolution entry t = tap*CIN + ci (taps row-major, input
// channel fastest, the channel-major order of the input stream); for the
// dense layer t is the flattened input index. One write port (loaded by the
// host before inference) and one synchronous read port with enable, as a
// block RAM: `rdata` shows mem[raddr] one clock after `re`, and holds while
// `re` is low. Keeping the parameters in block RAM in channel-major order
// follows the accelerator this RTL models; the host write port is this
// design's choice (the original bakes the parameters into the bitstream).
module weight_bram
  import b2n2_pkg::*;
#(
  parameter int DEPTH = 288,
  localparam int AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  wparam_t       wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output wparam_t       rdata
);
  wparam_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
