// tb_maxpool_pe: streams three random signed H x W x C maps through the 2x2
// pooling PE with random source gaps and sink stalls, and checks every
// output value against a reference pooling, TLAST on the last value of each
// image, and that no output is missing or extra.
module tb_maxpool_pe;
  import b2n2_pkg::*;
  import tb_ref_pkg::*;
  localparam int W = 6, H = 4, C = 3;
  logic clk = 0, rst = 1;
  logic s_valid = 0, s_ready, s_last = 0;
  act_t s_data = '0;
  logic m_valid, m_ready = 0, m_last;
  act_t m_data;
  int checks = 0, failures = 0;
  int   img [3][];
  int   exp_q [$];
  logic explast_q [$];
  int   n_stall = 0;

  maxpool_pe #(.W(W), .H(H), .C(C)) dut (.*);

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

  always @(posedge clk) begin
    if (!rst && m_valid && m_ready) begin
      check(exp_q.size() > 0, "unexpected output");
      if (exp_q.size() > 0) begin
        check(int'(m_data) == exp_q.pop_front(), "pooled value");
        check(m_last == explast_q.pop_front(), "last");
      end
    end
    if (!rst && m_valid && !m_ready) n_stall++;
    m_ready <= ($urandom_range(0, 2) != 0);
  end

  initial begin
    for (int k = 0; k < 3; k++) begin
      int o[];
      img[k] = new[W * H * C];
      foreach (img[k][i]) img[k][i] = $urandom_range(0, 255) - 128;
      pool(img[k], W, H, C, o);
      foreach (o[i]) begin
        exp_q.push_back(o[i]);
        explast_q.push_back(i == o.size() - 1);
      end
    end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 0;
    for (int k = 0; k < 3; k++)
      for (int i = 0; i < W * H * C; i++) begin
        while ($urandom_range(0, 3) == 0) @(negedge clk);
        s_valid = 1; s_data = act_t'(img[k][i]); s_last = (i == W * H * C - 1);
        @(posedge clk);
        while (!s_ready) @(posedge clk);
        @(negedge clk);
        s_valid = 0; s_last = 0;
      end
    repeat (20) @(posedge clk);
    check(exp_q.size() == 0, "all outputs received");
    check(n_stall > 0, "output stall exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
