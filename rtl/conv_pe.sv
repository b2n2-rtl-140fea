// conv_pe: processing element for one 3x3 convolutional layer.
//
// Each convolutional layer of the network has a PE of its own, and the PEs
// are chained into a streaming pipeline. Inside, an im2col unit turns the
// channel-major input map (H x W x CIN) into 3x3xCIN patches, and an MM
// unit with COUT lanes (one Bernoulli weight generator and one
// multiplier-accumulator per output channel) reduces every patch to COUT
// outputs, which leave on an AXI-stream in channel-major order, ready for
// the next PE. ReLU follows every convolution.
// Timing: one patch element per clock, so a layer takes about
// H*W*9*CIN clocks per image when its output is not stalled, and
// COUT clocks per pixel on its output; the slower of the two sets its rate.
// Stride 1 and padding 1 are this design's reading of the layer table (the
// output maps keep the input size); ReLU and the fixed-point scaling are
// this design's choices.
module conv_pe
  import b2n2_pkg::*;
#(
  parameter int LAYER_ID = 1,
  parameter int W        = 32,
  parameter int H        = 32,
  parameter int CIN      = 3,
  parameter int COUT     = 32
) (
  input  logic      clk,
  input  logic      rst,
  input  param_wr_t pw,
  input  logic      s_valid,
  output logic      s_ready,
  input  act_t      s_data,
  input  logic      s_last,
  output logic      m_valid,
  input  logic      m_ready,
  output act_t      m_data,
  output logic      m_last
);
  logic p_valid, p_ready, p_last;
  act_t p_data;

  im2col #(.W(W), .H(H), .CIN(CIN)) u_im2col (
    .clk     (clk),
    .rst     (rst),
    .s_valid (s_valid),
    .s_ready (s_ready),
    .s_data  (s_data),
    .s_last  (s_last),
    .m_valid (p_valid),
    .m_ready (p_ready),
    .m_data  (p_data),
    .m_last  (p_last)
  );

  mm_unit #(
    .LANES    (COUT),
    .DEPTH    (9 * CIN),
    .LAYER_ID (LAYER_ID),
    .RELU     (1'b1)
  ) u_mm (
    .clk     (clk),
    .rst     (rst),
    .pw      (pw),
    .s_valid (p_valid),
    .s_ready (p_ready),
    .s_data  (p_data),
    .s_last  (p_last),
    .m_valid (m_valid),
    .m_ready (m_ready),
    .m_data  (m_data),
    .m_last  (m_last)
  );
endmodule
