// tb_im2col: streams three random H x W x CIN maps (random source gaps,
// random sink stalls) through the patch extractor and checks every patch
// element, including zero padding at the borders and TLAST at the end of
// each image. A fourth image runs with no gaps or stalls and must produce
// its 9*CIN*H*W elements in at most that many clocks plus the time to
// fill two rows of the line buffer.
module tb_im2col;
  import b2n2_pkg::*;
  localparam int W = 5, H = 4, CIN = 2;
  localparam int NEL = 9 * CIN * H * W;
  logic clk = 0, rst = 1;
  logic s_valid = 0, s_ready, s_last = 0;
  act_t s_data = '0;
  logic m_valid, m_ready = 0, m_last;
  act_t m_data;
  int checks = 0, failures = 0;
  int   img [4][H * W * CIN];
  act_t exp_q [$];
  logic explast_q [$];
  bit   gaps = 1;
  int   n_pad = 0, n_out = 0, n_src_stall = 0, n_sink_stall = 0;

  im2col #(.W(W), .H(H), .CIN(CIN)) dut (.*);

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

  // expected patch stream of image k
  task automatic expect_image(input int k);
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++)
        for (int tap = 0; tap < 9; tap++)
          for (int ci = 0; ci < CIN; ci++) begin
            int rr, cc;
            rr = r + tap / 3 - 1;
            cc = c + tap % 3 - 1;
            if (rr < 0 || rr >= H || cc < 0 || cc >= W) begin
              exp_q.push_back('0); n_pad++;
            end else exp_q.push_back(act_t'(img[k][(rr * W + cc) * CIN + ci]));
            explast_q.push_back(r == H - 1 && c == W - 1 && tap == 8 && ci == CIN - 1);
          end
  endtask

  always @(posedge clk) begin
    if (!rst) begin
      if (m_valid && m_ready) begin
        n_out++;
        check(exp_q.size() > 0, "unexpected element");
        if (exp_q.size() > 0) begin
          act_t e;
          e = exp_q.pop_front();
          check(m_data == e, $sformatf("element %0d: got %0d exp %0d", n_out, m_data, e));
          check(m_last == explast_q.pop_front(), $sformatf("last at element %0d", n_out));
        end
      end
      if (m_valid && !m_ready) n_sink_stall++;
      if (s_valid && !s_ready) n_src_stall++;
    end
    m_ready <= gaps ? ($urandom_range(0, 3) != 0) : 1'b1;
  end

  task automatic send_image(input int k);
    for (int i = 0; i < H * W * CIN; i++) begin
      if (gaps) while ($urandom_range(0, 3) == 0) @(negedge clk);
      s_valid = 1; s_data = act_t'(img[k][i]); s_last = (i == H * W * CIN - 1);
      @(posedge clk);
      while (!s_ready) @(posedge clk);
      @(negedge clk);
      s_valid = 0; s_last = 0;
    end
  endtask

  initial begin
    for (int k = 0; k < 4; k++)
      for (int i = 0; i < H * W * CIN; i++) img[k][i] = $urandom_range(1, 255) - 128;
    for (int k = 0; k < 4; k++) expect_image(k);
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 0;
    for (int k = 0; k < 3; k++) send_image(k);
    while (exp_q.size() > NEL) @(posedge clk);
    repeat (5) @(posedge clk);
    // full-rate image
    gaps = 0;
    @(negedge clk);
    begin
      int t0, t1;
      t0 = $time;
      fork
        send_image(3);
        while (exp_q.size() > 0) @(posedge clk);
      join
      t1 = $time;
      check((t1 - t0) / 10 <= NEL + (2 * W + 4) * CIN,
            $sformatf("full-rate image took %0d clocks for %0d elements", (t1 - t0) / 10, NEL));
    end
    check(n_sink_stall > 0, "sink stall exercised");
    check(n_src_stall > 0, "line-buffer full stall exercised");
    $display("padding elements %0d, sink stalls %0d, input stalls %0d", n_pad, n_sink_stall, n_src_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
