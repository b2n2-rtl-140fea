// tb_conv_pe: a small convolutional PE (H x W x CIN -> COUT) with random
// Bernoulli parameters and biases, three random images (two with random
// source gaps and sink stalls, one at full rate). Every output is compared
// with the reference convolution whose weights are drawn from per-channel
// LFSR models; the full-rate image must finish within 9*CIN clocks per
// output pixel plus the line-buffer fill time. Checks that padding, both
// Bernoulli outcomes, ReLU clipping and stalls all occurred.
module tb_conv_pe;
  import b2n2_pkg::*;
  import tb_ref_pkg::*;
  localparam int W = 5, H = 4, CIN = 2, COUT = 3, LID = 2, NIMG = 3;
  localparam int NIN = W * H * CIN;
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
  bit gaps = 1;
  int n_stall = 0;

  conv_pe #(.LAYER_ID(LID), .W(W), .H(H), .CIN(CIN), .COUT(COUT)) dut (.*);

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
      end
    end
    if (!rst && ((m_valid && !m_ready) || (s_valid && !s_ready))) n_stall++;
    m_ready <= gaps ? ($urandom_range(0, 3) != 0) : 1'b1;
  end

  task automatic send(input int k);
    for (int i = 0; i < NIN; i++) begin
      if (gaps) while ($urandom_range(0, 3) == 0) @(negedge clk);
      s_valid = 1; s_data = act_t'(img[k][i]); s_last = (i == NIN - 1);
      @(posedge clk);
      while (!s_ready) @(posedge clk);
      @(negedge clk);
      s_valid = 0; s_last = 0;
    end
  endtask

  initial begin
    clear_stats();
    p = new[COUT * 9 * CIN]; q = new[COUT * 9 * CIN]; bias = new[COUT]; st = new[COUT];
    foreach (p[i]) begin p[i] = $urandom_range(0, 255); q[i] = $urandom_range(0, 255) - 128; end
    foreach (bias[i]) bias[i] = $urandom_range(0, 63) - 32;
    foreach (st[i]) st[i] = seed(LID, i);
    for (int k = 0; k < NIMG; k++) begin
      int o[];
      img[k] = new[NIN];
      foreach (img[k][i]) img[k][i] = $urandom_range(0, 63);
      conv(img[k], W, H, CIN, COUT, p, q, bias, st, o);
      foreach (o[i]) begin exp_q.push_back(o[i]); explast_q.push_back(i == o.size() - 1); end
    end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 0;
    for (int n = 0; n < COUT; n++) begin
      for (int i = 0; i < 9 * CIN; i++) pwrite(0, n, i, p[n * 9 * CIN + i], q[n * 9 * CIN + i]);
      pwrite(1, n, 0, 0, bias[n]);
    end
    for (int k = 0; k < NIMG - 1; k++) send(k);
    while (exp_q.size() > W * H * COUT) @(posedge clk);
    repeat (5) @(posedge clk);
    gaps = 0;
    @(negedge clk);
    begin
      int t0, t1;
      t0 = $time;
      fork
        send(NIMG - 1);
        while (exp_q.size() > 0) @(posedge clk);
      join
      t1 = $time;
      check((t1 - t0) / 10 <= W * H * 9 * CIN + (2 * W + 4) * CIN + COUT + 4,
            $sformatf("full-rate image took %0d clocks (%0d patch elements)", (t1 - t0) / 10, W * H * 9 * CIN));
    end
    check(n_pad > 0 && n_wzero > 0 && n_wq > 0 && n_relu > 0, "padding, both draws and ReLU seen");
    check(n_stall > 0, "stall exercised");
    $display("pad %0d zero %0d q %0d relu %0d sat %0d stalls %0d", n_pad, n_wzero, n_wq, n_relu, n_sat, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
