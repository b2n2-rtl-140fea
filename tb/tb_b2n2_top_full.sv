// tb_b2n2_top_full: one complete inference at the default (full) sizes:
// 32x32x3 input, 32/64/128 channels, 10 classes. Loads random Bernoulli
// parameters into all seven layers (about 307,000 (p,q) pairs), streams one
// image and checks all ten logits against the reference network model in
// which each output channel draws its weights from its own LFSR model.
// Also reports how many clocks the image took through the pipeline.
module tb_b2n2_top_full;
  import b2n2_pkg::*;
  import tb_ref_pkg::*;
  localparam int IMG = 32, IN_CH = 3, C1 = 32, C2 = 64, C3 = 128, NCLS = 10;
  localparam int NIMG = 1;
  localparam int NIN  = IMG * IMG * IN_CH;
  logic clk = 0, rst = 1;
  param_wr_t pw = '0;
  logic s_valid = 0, s_ready, s_last = 0;
  act_t s_data = '0;
  logic m_valid, m_ready = 0, m_last;
  act_t m_data;
  int checks = 0, failures = 0;
  int lw[8], lh[8], lcin[8], lcout[8], ldepth[8];
  int p[8][], q[8][], bias[8][];
  logic [15:0] st[8][];
  int img [NIMG][];
  int exp_q [$];
  logic explast_q [$];
  int got [NIMG][NCLS];
  longint t_start, t_end;
  int n_out = 0, n_in_stall = 0, n_out_stall = 0, n_pool = 0;

  b2n2_top dut (.*);

  always #5 clk = ~clk;

  // control register port (AXI4-Lite master side)
  logic ctl_awvalid = 0, ctl_awready, ctl_wvalid = 0, ctl_wready, ctl_bvalid, ctl_bready = 0;
  logic ctl_arvalid = 0, ctl_arready, ctl_rvalid, ctl_rready = 0;
  logic [5:0] ctl_awaddr = '0, ctl_araddr = '0;
  logic [31:0] ctl_wdata = '0, ctl_rdata;
  logic [3:0] ctl_wstrb = '0;
  logic [1:0] ctl_bresp, ctl_rresp;

  task automatic axil_write(input logic [5:0] a, input logic [31:0] dv);
    @(negedge clk);
    ctl_awvalid = 1; ctl_awaddr = a; ctl_wvalid = 1; ctl_wdata = dv; ctl_wstrb = 4'hF; ctl_bready = 1;
    @(posedge clk);
    while (!ctl_awready) @(posedge clk);
    @(negedge clk);
    ctl_awvalid = 0; ctl_wvalid = 0;
    while (!ctl_bvalid) @(negedge clk);
    @(negedge clk);
    ctl_bready = 0;
  endtask

  task automatic axil_read(input logic [5:0] a, output logic [31:0] dv);
    @(negedge clk);
    ctl_arvalid = 1; ctl_araddr = a; ctl_rready = 1;
    @(posedge clk);
    while (!ctl_arready) @(posedge clk);
    @(negedge clk);
    ctl_arvalid = 0;
    while (!ctl_rvalid) @(negedge clk);
    dv = ctl_rdata;
    @(negedge clk);
    ctl_rready = 0;
  endtask


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

  always @(posedge clk) begin
    if (!rst && m_valid && m_ready) begin
      check(exp_q.size() > 0, "unexpected output");
      if (exp_q.size() > 0) begin
        int e;
        e = exp_q.pop_front();
        check(int'(m_data) == e, $sformatf("logit %0d: got %0d exp %0d", n_out, m_data, e));
        check(m_last == explast_q.pop_front(), "last");
        if (n_out / NCLS < NIMG) got[n_out / NCLS][n_out % NCLS] = int'(m_data);
        n_out++;
      end
    end
    if (!rst && s_valid && !s_ready) n_in_stall++;
    if (!rst && m_valid && !m_ready) n_out_stall++;
    m_ready <= 1'b1;
  end

  // reference forward pass; layer states carry over between passes
  task automatic reference(input int k);
    int a[], b[];
    a = img[k];
    conv(a, IMG, IMG, IN_CH, C1, p[1], q[1], bias[1], st[1], b);
    conv(b, IMG, IMG, C1, C1, p[2], q[2], bias[2], st[2], a);
    pool(a, IMG, IMG, C1, b);
    n_pool += b.size();
    conv(b, IMG / 2, IMG / 2, C1, C2, p[3], q[3], bias[3], st[3], a);
    conv(a, IMG / 2, IMG / 2, C2, C2, p[4], q[4], bias[4], st[4], b);
    pool(b, IMG / 2, IMG / 2, C2, a);
    n_pool += a.size();
    conv(a, IMG / 4, IMG / 4, C2, C3, p[5], q[5], bias[5], st[5], b);
    conv(b, IMG / 4, IMG / 4, C3, C3, p[6], q[6], bias[6], st[6], a);
    pool(a, IMG / 4, IMG / 4, C3, b);
    n_pool += b.size();
    dense(b, (IMG / 8) * (IMG / 8) * C3, NCLS, p[7], q[7], bias[7], st[7], a);
    foreach (a[i]) begin exp_q.push_back(a[i]); explast_q.push_back(i == NCLS - 1); end
  endtask

  initial begin
    int qa;
    clear_stats();
    lcin  = '{0, IN_CH, C1, C1, C2, C2, C3, (IMG / 8) * (IMG / 8) * C3};
    lcout = '{0, C1, C1, C2, C2, C3, C3, NCLS};
    for (int l = 1; l <= 7; l++) begin
      ldepth[l] = (l == 7) ? lcin[l] : 9 * lcin[l];
      p[l] = new[lcout[l] * ldepth[l]];
      q[l] = new[lcout[l] * ldepth[l]];
      bias[l] = new[lcout[l]];
      st[l] = new[lcout[l]];
      // q spread scaled with the fan-in so activations keep their size layer
      // after layer (uniform in [-A, A], A = 222/sqrt(fan-in) in units of 1/64)
      qa = $rtoi(222.0 / $sqrt(real'(ldepth[l])));
      if (qa < 3) qa = 3;
      foreach (p[l][i]) begin p[l][i] = $urandom_range(0, 255); q[l][i] = $urandom_range(0, 2 * qa) - qa; end
      foreach (bias[l][i]) bias[l][i] = $urandom_range(0, 8) - 4;
      foreach (st[l][i]) st[l][i] = seed(l, i);
    end
    img[0] = new[NIN];
    foreach (img[0][i]) img[0][i] = $urandom_range(0, 31);
    for (int k = 0; k < NIMG; k++) reference(k);

    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 0;
    // parameter load, one write per clock
    for (int l = 1; l <= 7; l++)
      for (int n = 0; n < lcout[l]; n++) begin
        for (int i = 0; i < ldepth[l]; i++) begin
          pw = '{we: 1'b1, is_bias: 1'b0, layer: 4'(l), lane: 8'(n), addr: 16'(i),
                 p: 8'(p[l][n * ldepth[l] + i]), q: 8'(q[l][n * ldepth[l] + i])};
          @(negedge clk);
        end
        pw = '{we: 1'b1, is_bias: 1'b1, layer: 4'(l), lane: 8'(n), addr: 16'(0),
               p: 8'(0), q: 8'(bias[l][n])};
        @(negedge clk);
      end
    pw = '0;
    axil_write(6'h00, 32'h0000_0001);
    // image
    t_start = $time;
    for (int k = 0; k < NIMG; k++)
      for (int i = 0; i < NIN; i++) begin
        s_valid = 1; s_data = act_t'(img[k][i]); s_last = (i == NIN - 1);
        @(posedge clk);
        while (!s_ready) @(posedge clk);
        @(negedge clk);
        s_valid = 0; s_last = 0;
      end
    while (n_out < NIMG * NCLS) @(posedge clk);
    t_end = $time;
    repeat (20) @(posedge clk);
    check(exp_q.size() == 0, "all logits received");
    begin
      logic [31:0] r;
      axil_read(6'h00, r);
      check(r[1] == 1'b1 && r[2] == 1'b1, $sformatf("done and idle after the image, CTRL=%h", r));
    end
    $display("mechanisms: padding %0d, zero draws %0d, q draws %0d, relu %0d, saturation %0d, input stalls %0d",
             n_pad, n_wzero, n_wq, n_relu, n_sat, n_in_stall);
    $display("image took %0d clocks from first input to last logit", (t_end - t_start) / 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
