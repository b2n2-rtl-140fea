// tb_urng: checks the URNG against a bit-serial LFSR model: the samples
// after reset, holding while `adv` is low, and a rough uniformity of the
// byte samples (each quarter of 0..255 gets 20-30% of 4096 draws).
module tb_urng;
  import tb_ref_pkg::*;
  logic clk = 0, rst = 1, adv = 0;
  logic [7:0] eps;
  int checks = 0, failures = 0;
  logic [15:0] model;
  int hist [4];

  urng #(.SEED(16'h1234)) dut (.clk, .rst, .adv, .eps);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = 16'h1234;
    repeat (2) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    check(eps == model[7:0], "seed after reset");
    for (int i = 0; i < 4096; i++) begin
      adv <= ($urandom_range(0, 3) != 0);
      @(posedge clk);
      #1;
      if (adv) model = lfsr8(model);
      check(eps == model[7:0], $sformatf("sample %0d: got %0d exp %0d", i, eps, model[7:0]));
    end
    adv <= 1;
    for (int i = 0; i < 4096; i++) begin
      @(posedge clk);
      #1;
      hist[eps[7:6]]++;
    end
    for (int b = 0; b < 4; b++)
      check(hist[b] > 819 && hist[b] < 1229, $sformatf("bin %0d has %0d", b, hist[b]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
