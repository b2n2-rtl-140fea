// ctrl_regs: block-level control register of the accelerator.
//
// The host starts the accelerator by writing the control register over an
// AXI4-Lite slave port, in the layout of a high-level-synthesis block
// (offset 0x00):
//   bit 0 ap_start     (R/W) accept images while set
//   bit 1 ap_done      (R, cleared by reading) an image's logits have left
//   bit 2 ap_idle      (R)   not started and no image inside the pipeline
//   bit 3 ap_ready     (R)   high in the clock an image has been taken in
//   bit 7 auto_restart (R/W) keep ap_start set after each image
// Without auto_restart, ap_start clears once one whole image has entered,
// so exactly one image is processed per start; with it, images stream
// continuously (the mode used for Monte-Carlo passes and throughput runs).
// `run` gates the image input of the pipeline. `img_in` and `img_out` are
// one-clock pulses for the last input value and the last logit of an image.
// AXI4-Lite: a write is taken when AWVALID and WVALID are both high and no
// response is pending; the response (OKAY) follows one clock later. A read
// is answered one clock after ARVALID. Other offsets read as 0 and ignore
// writes. The register names and the start / auto-restart use follow the
// accelerator this RTL models (its host script sets AP_START and
// AUTO_RESTART); the bit positions are those of the usual HLS control
// register, and the rest is this design's choice.
module ctrl_regs #(
  parameter int AW = 6
) (
  input  logic          clk,
  input  logic          rst,
  // AXI4-Lite slave
  input  logic          awvalid,
  output logic          awready,
  input  logic [AW-1:0] awaddr,
  input  logic          wvalid,
  output logic          wready,
  input  logic [31:0]   wdata,
  input  logic [3:0]    wstrb,
  output logic          bvalid,
  input  logic          bready,
  output logic [1:0]    bresp,
  input  logic          arvalid,
  output logic          arready,
  input  logic [AW-1:0] araddr,
  output logic          rvalid,
  input  logic          rready,
  output logic [31:0]   rdata,
  output logic [1:0]    rresp,
  // accelerator side
  output logic          run,
  input  logic          img_in,
  input  logic          img_out
);
  logic        ap_start, ap_done, auto_restart;
  logic        ap_idle;
  logic [15:0] inflight;
  logic        wr_go, rd_go, ctrl_wr, ctrl_rd;

  assign awready = awvalid && wvalid && !bvalid;
  assign wready  = awready;
  assign wr_go   = awready;
  assign ctrl_wr = wr_go && (awaddr == '0) && wstrb[0];
  assign arready = !rvalid;
  assign rd_go   = arvalid && arready;
  assign ctrl_rd = rd_go && (araddr == '0);
  assign bresp   = 2'b00;
  assign rresp   = 2'b00;
  assign ap_idle = !ap_start && (inflight == '0);
  assign run     = ap_start;

  always_ff @(posedge clk) begin
    if (rst) begin
      ap_start     <= 1'b0;
      ap_done      <= 1'b0;
      auto_restart <= 1'b0;
      inflight     <= '0;
      bvalid       <= 1'b0;
      rvalid       <= 1'b0;
      rdata        <= '0;
    end else begin
      // images inside the pipeline
      inflight <= inflight + 16'(img_in) - 16'(img_out);
      // start / auto-restart
      if (ctrl_wr) begin
        auto_restart <= wdata[7];
        if (wdata[0]) ap_start <= 1'b1;
        else          ap_start <= 1'b0;
      end else if (img_in && !auto_restart) begin
        ap_start <= 1'b0;
      end
      // done: set by a finished image, cleared by reading the register
      if (img_out)      ap_done <= 1'b1;
      else if (ctrl_rd) ap_done <= 1'b0;
      // write response
      if (wr_go)                bvalid <= 1'b1;
      else if (bvalid && bready) bvalid <= 1'b0;
      // read data
      if (rd_go) begin
        rvalid <= 1'b1;
        rdata  <= ctrl_rd ? {24'b0, auto_restart, 3'b000, img_in, ap_idle, ap_done, ap_start} : 32'b0;
      end else if (rvalid && rready) begin
        rvalid <= 1'b0;
      end
    end
  end

  property p_bvalid_hold;
    @(posedge clk) disable iff (rst) (bvalid && !bready) |=> bvalid;
  endproperty
  assert property (p_bvalid_hold);
  property p_rvalid_hold;
    @(posedge clk) disable iff (rst) (rvalid && !rready) |=> (rvalid && $stable(rdata));
  endproperty
  assert property (p_rvalid_hold);
endmodule
