// tb_ctrl_regs: drives the AXI4-Lite control register like a host script:
// idle after reset, single-shot start (ap_start clears when an image has
// entered), ap_done set by a finished image and cleared by reading,
// auto-restart keeping ap_start set over several images, stop, writes and
// reads at other offsets, and a slow write-response / read-data acceptor.
module tb_ctrl_regs;
  logic clk = 0, rst = 1;
  logic run, img_in = 0, img_out = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  // control register port (AXI4-Lite master side)
  logic awvalid = 0, awready, wvalid = 0, wready, bvalid, bready = 0;
  logic arvalid = 0, arready, rvalid, rready = 0;
  logic [5:0] awaddr = '0, araddr = '0;
  logic [31:0] wdata = '0, rdata;
  logic [3:0] wstrb = '0;
  logic [1:0] bresp, rresp;

  task automatic axil_write(input logic [5:0] a, input logic [31:0] dv);
    @(negedge clk);
    awvalid = 1; awaddr = a; wvalid = 1; wdata = dv; wstrb = 4'hF; bready = 1;
    @(posedge clk);
    while (!awready) @(posedge clk);
    @(negedge clk);
    awvalid = 0; wvalid = 0;
    while (!bvalid) @(negedge clk);
    @(negedge clk);
    bready = 0;
  endtask

  task automatic axil_read(input logic [5:0] a, output logic [31:0] dv);
    @(negedge clk);
    arvalid = 1; araddr = a; rready = 1;
    @(posedge clk);
    while (!arready) @(posedge clk);
    @(negedge clk);
    arvalid = 0;
    while (!rvalid) @(negedge clk);
    dv = rdata;
    @(negedge clk);
    rready = 0;
  endtask

  ctrl_regs #(.AW(6)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulse_in();
    @(negedge clk); img_in = 1; @(negedge clk); img_in = 0;
  endtask
  task automatic pulse_out();
    @(negedge clk); img_out = 1; @(negedge clk); img_out = 0;
  endtask

  initial begin
    logic [31:0] r;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 0;
    axil_read(6'h00, r);
    check(r == 32'h4, $sformatf("after reset CTRL=%h, expected idle only", r));
    check(!run, "not running after reset");
    // single shot
    axil_write(6'h00, 32'h1);
    @(negedge clk);
    check(run, "running after ap_start");
    axil_read(6'h00, r);
    check(r[0] && !r[2], "started, not idle");
    pulse_in();
    @(negedge clk);
    check(!run, "single-shot: stopped after one image entered");
    axil_read(6'h00, r);
    check(!r[0] && !r[2] && !r[1], $sformatf("image inside: not idle, not done (CTRL=%h)", r));
    pulse_out();
    axil_read(6'h00, r);
    check(r[1] && r[2], $sformatf("done and idle (CTRL=%h)", r));
    axil_read(6'h00, r);
    check(!r[1], "ap_done cleared by the read");
    // auto-restart
    axil_write(6'h00, 32'h81);
    repeat (3) begin
      pulse_in();
      check(run, "auto-restart keeps running");
    end
    axil_read(6'h00, r);
    check(r[7] && r[0], "auto_restart and ap_start read back");
    repeat (3) pulse_out();
    axil_write(6'h00, 32'h0);
    axil_read(6'h00, r);
    check(r[2] && !r[0] && !r[7] && r[1], $sformatf("stopped, idle, done (CTRL=%h)", r));
    // other offsets
    axil_write(6'h04, 32'h81);
    axil_read(6'h04, r);
    check(r == 32'h0, "other offset reads 0");
    check(!run, "write to another offset ignored");
    // slow response acceptance: bvalid must wait for bready
    @(negedge clk);
    awvalid = 1; awaddr = 6'h00; wvalid = 1; wdata = 32'h1; wstrb = 4'hF; bready = 0;
    @(posedge clk);
    @(negedge clk);
    awvalid = 0; wvalid = 0;
    repeat (4) begin
      @(negedge clk);
      check(bvalid && bresp == 2'b00, "write response held until accepted");
    end
    bready = 1;
    @(negedge clk);
    bready = 0;
    check(!bvalid, "write response taken");
    check(run, "started by the slow write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
