// b2n2_top: Bernoulli-sampling Bayesian CNN accelerator, whole network.
//
// A Bayesian network treats each weight as a random variable and runs the
// forward pass many times (Monte-Carlo sampling) to see how much its output
// varies. Here every weight is drawn from a scaled Bernoulli distribution,
// w = q with probability p and 0 otherwise, with (p,q) chosen so that w keeps
// the mean and variance of the trained Gaussian weight; each weight sampler is
// then only an LFSR, a comparator and a multiplexer.
//
// The network (VGG-like, per layer one processing element, all chained as a
// streaming pipeline over AXI-stream, channel-major order everywhere):
//   conv1 IN_CH->C1, conv2 C1->C1, maxpool, conv3 C1->C2, conv4 C2->C2,
//   maxpool, conv5 C2->C3, conv6 C3->C3, maxpool, fc1 (IMG/8)^2*C3 -> NCLS.
// All convolutions are 3x3, stride 1, zero padding 1, with ReLU.
// Layer ids on the parameter port: conv1..conv6 = 1..6, fc1 = 7.
//
// Interface: `pw` writes (p,q) pairs and biases (load them before the first
// image); the control register (AXI4-Lite, see ctrl_regs) must have ap_start
// set, with auto_restart for a continuous stream of images; the image enters on s_* (IMG x IMG x IN_CH, 8-bit, TLAST on the
// last value); NCLS 8-bit logits of each pass leave on m_* (TLAST on the last
// one). Sending the same image N times gives N Monte-Carlo samples, because
// the weight samplers keep running from one pass to the next.
// Timing: each PE needs about IMG_l^2*9*CIN_l clocks per image; conv2 is the
// slowest (IMG^2*9*C1 = 294,912 clocks at the defaults), and the layers
// overlap, so a new image can be accepted about that often.
// Default sizes are those of the network table (CIFAR-10: 32x32x3 input,
// 10 classes; NCLS=100 for CIFAR-100). The host processor, DMA, AXI
// interconnect and DRAM around the accelerator are outside this RTL.
module b2n2_top
  import b2n2_pkg::*;
#(
  parameter int IMG   = 32,
  parameter int IN_CH = 3,
  parameter int C1    = 32,
  parameter int C2    = 64,
  parameter int C3    = 128,
  parameter int NCLS  = 10
) (
  input  logic       clk,
  input  logic       rst,
  // control register, AXI4-Lite slave
  input  logic       ctl_awvalid,
  output logic       ctl_awready,
  input  logic [5:0] ctl_awaddr,
  input  logic       ctl_wvalid,
  output logic       ctl_wready,
  input  logic [31:0] ctl_wdata,
  input  logic [3:0] ctl_wstrb,
  output logic       ctl_bvalid,
  input  logic       ctl_bready,
  output logic [1:0] ctl_bresp,
  input  logic       ctl_arvalid,
  output logic       ctl_arready,
  input  logic [5:0] ctl_araddr,
  output logic       ctl_rvalid,
  input  logic       ctl_rready,
  output logic [31:0] ctl_rdata,
  output logic [1:0] ctl_rresp,
  // parameter write port
  input  param_wr_t pw,
  // image in, logits out (AXI-stream)
  input  logic      s_valid,
  output logic      s_ready,
  input  act_t      s_data,
  input  logic      s_last,
  output logic      m_valid,
  input  logic      m_ready,
  output act_t      m_data,
  output logic      m_last
);
  localparam int NST = 10;   // stream links: input + 9 PE outputs before fc1

  logic v [NST];
  logic rd[NST];
  logic l [NST];
  act_t d [NST];

  logic run, img_in, img_out;

  // images enter only while the control register has the accelerator started
  assign v[0]    = s_valid && run;
  assign d[0]    = s_data;
  assign l[0]    = s_last;
  assign s_ready = rd[0] && run;
  assign img_in  = s_valid && s_ready && s_last;
  assign img_out = m_valid && m_ready && m_last;

  ctrl_regs #(.AW(6)) u_ctrl (
    .clk, .rst,
    .awvalid(ctl_awvalid), .awready(ctl_awready), .awaddr(ctl_awaddr),
    .wvalid (ctl_wvalid),  .wready (ctl_wready),  .wdata (ctl_wdata), .wstrb(ctl_wstrb),
    .bvalid (ctl_bvalid),  .bready (ctl_bready),  .bresp (ctl_bresp),
    .arvalid(ctl_arvalid), .arready(ctl_arready), .araddr(ctl_araddr),
    .rvalid (ctl_rvalid),  .rready (ctl_rready),  .rdata (ctl_rdata), .rresp(ctl_rresp),
    .run, .img_in, .img_out);

  conv_pe #(.LAYER_ID(1), .W(IMG), .H(IMG), .CIN(IN_CH), .COUT(C1)) u_conv1 (
    .clk, .rst, .pw,
    .s_valid(v[0]), .s_ready(rd[0]), .s_data(d[0]), .s_last(l[0]),
    .m_valid(v[1]), .m_ready(rd[1]), .m_data(d[1]), .m_last(l[1]));

  conv_pe #(.LAYER_ID(2), .W(IMG), .H(IMG), .CIN(C1), .COUT(C1)) u_conv2 (
    .clk, .rst, .pw,
    .s_valid(v[1]), .s_ready(rd[1]), .s_data(d[1]), .s_last(l[1]),
    .m_valid(v[2]), .m_ready(rd[2]), .m_data(d[2]), .m_last(l[2]));

  maxpool_pe #(.W(IMG), .H(IMG), .C(C1)) u_pool1 (
    .clk, .rst,
    .s_valid(v[2]), .s_ready(rd[2]), .s_data(d[2]), .s_last(l[2]),
    .m_valid(v[3]), .m_ready(rd[3]), .m_data(d[3]), .m_last(l[3]));

  conv_pe #(.LAYER_ID(3), .W(IMG/2), .H(IMG/2), .CIN(C1), .COUT(C2)) u_conv3 (
    .clk, .rst, .pw,
    .s_valid(v[3]), .s_ready(rd[3]), .s_data(d[3]), .s_last(l[3]),
    .m_valid(v[4]), .m_ready(rd[4]), .m_data(d[4]), .m_last(l[4]));

  conv_pe #(.LAYER_ID(4), .W(IMG/2), .H(IMG/2), .CIN(C2), .COUT(C2)) u_conv4 (
    .clk, .rst, .pw,
    .s_valid(v[4]), .s_ready(rd[4]), .s_data(d[4]), .s_last(l[4]),
    .m_valid(v[5]), .m_ready(rd[5]), .m_data(d[5]), .m_last(l[5]));

  maxpool_pe #(.W(IMG/2), .H(IMG/2), .C(C2)) u_pool2 (
    .clk, .rst,
    .s_valid(v[5]), .s_ready(rd[5]), .s_data(d[5]), .s_last(l[5]),
    .m_valid(v[6]), .m_ready(rd[6]), .m_data(d[6]), .m_last(l[6]));

  conv_pe #(.LAYER_ID(5), .W(IMG/4), .H(IMG/4), .CIN(C2), .COUT(C3)) u_conv5 (
    .clk, .rst, .pw,
    .s_valid(v[6]), .s_ready(rd[6]), .s_data(d[6]), .s_last(l[6]),
    .m_valid(v[7]), .m_ready(rd[7]), .m_data(d[7]), .m_last(l[7]));

  conv_pe #(.LAYER_ID(6), .W(IMG/4), .H(IMG/4), .CIN(C3), .COUT(C3)) u_conv6 (
    .clk, .rst, .pw,
    .s_valid(v[7]), .s_ready(rd[7]), .s_data(d[7]), .s_last(l[7]),
    .m_valid(v[8]), .m_ready(rd[8]), .m_data(d[8]), .m_last(l[8]));

  maxpool_pe #(.W(IMG/4), .H(IMG/4), .C(C3)) u_pool3 (
    .clk, .rst,
    .s_valid(v[8]), .s_ready(rd[8]), .s_data(d[8]), .s_last(l[8]),
    .m_valid(v[9]), .m_ready(rd[9]), .m_data(d[9]), .m_last(l[9]));

  dense_pe #(.LAYER_ID(7), .NIN((IMG/8) * (IMG/8) * C3), .NOUT(NCLS)) u_fc1 (
    .clk, .rst, .pw,
    .s_valid(v[9]), .s_ready(rd[9]), .s_data(d[9]), .s_last(l[9]),
    .m_valid(m_valid), .m_ready(m_ready), .m_data(m_data), .m_last(m_last));
endmodule
