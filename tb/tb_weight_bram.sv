// tb_weight_bram: fills the memory with random (p,q), reads it back in
// random order, and checks the one-clock read latency and that the read
// register holds while the read enable is low.
module tb_weight_bram;
  import b2n2_pkg::*;
  localparam int DEPTH = 40;
  logic clk = 0, we = 0, re = 0;
  logic [5:0] waddr = 0, raddr = 0;
  wparam_t wdata, rdata;
  wparam_t model [DEPTH];
  int checks = 0, failures = 0;

  weight_bram #(.DEPTH(DEPTH)) dut (.clk, .we, .waddr, .wdata, .re, .raddr, .rdata);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wparam_t held;
    for (int i = 0; i < DEPTH; i++) begin
      model[i] = wparam_t'($urandom);
      @(negedge clk);
      we = 1; waddr = 6'(i); wdata = model[i];
    end
    @(negedge clk);
    we = 0;
    for (int i = 0; i < 200; i++) begin
      int a;
      a = $urandom_range(0, DEPTH - 1);
      re = 1; raddr = 6'(a);
      @(negedge clk);
      check(rdata == model[a], $sformatf("read %0d", a));
      held = rdata;
      re = 0; raddr = 6'($urandom_range(0, DEPTH - 1));
      @(negedge clk);
      check(rdata == held, "hold while re low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
