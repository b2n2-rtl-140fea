// tb_dense_pe: a small dense PE (NIN -> NOUT) with random Bernoulli
// parameters and biases; four random input vectors with random source gaps
// and sink stalls. Every logit is compared with the reference dense layer
// (no ReLU, so negative logits must pass), TLAST on the last class.
module tb_dense_pe;
  import b2n2_pkg::*;
  import tb_ref_pkg::*;
  localparam int NIN = 12, NOUT = 4, LID = 7, NIMG = 4;
  logic clk = 0, rst = 1;
  param_wr_t pw = '0;
  logic s_valid = 0, s_ready, s_last = 0;
  act_t s_data = '0;
  logic m_valid, m_ready = 0, m_last;
  act_t m_data;
  int checks = 0, failures = 0;
  int p[], q[], bias[];
  logic [15:0] st[];
  int img [NIMG][];
  int exp_q [$];
  logic explast_q [$];
  int n_neg = 0;

  dense_pe #(.LAYER_ID(LID), .NIN(NIN), .NOUT(NOUT)) dut (.*);

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

  task automatic pwrite(input bit is_bias, input int lane, input int addr, input int pv, input int qv);
    @(negedge clk);
    pw = '{we: 1'b1, is_bias: is_bias, layer: 4'(LID), lane: 8'(lane), addr: 16'(addr),
           p: 8'(pv), q: 8'(qv)};
    @(negedge clk);
    pw = '0;
  endtask

  always @(posedge clk) begin
    if (!rst && m_valid && m_ready) begin
      check(exp_q.size() > 0, "unexpected output");
      if (exp_q.size() > 0) begin
        int e;
        e = exp_q.pop_front();
        check(int'(m_data) == e, $sformatf("got %0d exp %0d", m_data, e));
        check(m_last == explast_q.pop_front(), "last");
        if (e < 0) n_neg++;
      end
    end
    m_ready <= ($urandom_range(0, 3) != 0);
  end

  initial begin
    clear_stats();
    p = new[NOUT * NIN]; q = new[NOUT * NIN]; bias = new[NOUT]; st = new[NOUT];
    foreach (p[i]) begin p[i] = $urandom_range(0, 255); q[i] = $urandom_range(0, 255) - 128; end
    foreach (bias[i]) bias[i] = $urandom_range(0, 63) - 32;
    foreach (st[i]) st[i] = seed(LID, i);
    for (int k = 0; k < NIMG; k++) begin
      int o[];
      img[k] = new[NIN];
      foreach (img[k][i]) img[k][i] = $urandom_range(0, 63);
      dense(img[k], NIN, NOUT, p, q, bias, st, o);
      foreach (o[i]) begin exp_q.push_back(o[i]); explast_q.push_back(i == o.size() - 1); end
    end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 0;
    for (int n = 0; n < NOUT; n++) begin
      for (int i = 0; i < NIN; i++) pwrite(0, n, i, p[n * NIN + i], q[n * NIN + i]);
      pwrite(1, n, 0, 0, bias[n]);
    end
    for (int k = 0; k < NIMG; k++)
      for (int i = 0; i < NIN; i++) begin
        while ($urandom_range(0, 3) == 0) @(negedge clk);
        s_valid = 1; s_data = act_t'(img[k][i]); s_last = (i == NIN - 1);
        @(posedge clk);
        while (!s_ready) @(posedge clk);
        @(negedge clk);
        s_valid = 0; s_last = 0;
      end
    repeat (NOUT * 8 + 10) @(posedge clk);
    check(exp_q.size() == 0, "all logits received");
    check(n_neg > 0, "negative logit passed (no ReLU)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
