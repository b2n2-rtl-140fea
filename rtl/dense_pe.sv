// dense_pe: processing element for the fully connected output layer.
//
// The input stream (the flattened H x W x CIN map in channel-major order,
// NIN elements per image) is a single dot product of length NIN for each of
// NOUT output lanes; every lane samples its weights with a Bernoulli weight
// generator exactly as the convolutional PEs do. The NOUT logits of an
// image leave on an AXI-stream, class 0 first, TLAST on the last class.
// No non-linearity is applied (the host turns logits into class
// probabilities, averages them over Monte-Carlo passes and computes the
// uncertainty).
// Timing: NIN clocks per image plus NOUT output beats.
// The layer sizes follow the network table; reusing the MM unit without
// an im2col stage and leaving out the non-linearity are this design's
// choices.
module dense_pe
  import b2n2_pkg::*;
#(
  parameter int LAYER_ID = 7,
  parameter int NIN      = 2048,
  parameter int NOUT     = 10
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
  mm_unit #(
    .LANES    (NOUT),
    .DEPTH    (NIN),
    .LAYER_ID (LAYER_ID),
    .RELU     (1'b0)
  ) u_mm (
    .clk     (clk),
    .rst     (rst),
    .pw      (pw),
    .s_valid (s_valid),
    .s_ready (s_ready),
    .s_data  (s_data),
    .s_last  (s_last),
    .m_valid (m_valid),
    .m_ready (m_ready),
    .m_data  (m_data),
    .m_last  (m_last)
  );
endmodule
