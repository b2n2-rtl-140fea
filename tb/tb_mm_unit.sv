// tb_mm_unit: loads random (p,q) and biases into a small MM unit, streams
// twelve random dot products (an "image" is two of them) with random
// source gaps and a slow, random sink, and checks every output against a
// reference that draws each lane's Bernoulli weights from its own LFSR
// model. Writes addressed to another layer must be ignored. The unit must
// stall its input when a finished bank cannot leave, and with an always-
// ready sink must take one element per clock.
module tb_mm_unit;
  import b2n2_pkg::*;
  import tb_ref_pkg::*;
  localparam int LANES = 3, DEPTH = 7, LID = 5, NPROD = 12;
  logic clk = 0, rst = 1;
  param_wr_t pw = '0;
  logic s_valid = 0, s_ready, s_last = 0;
  act_t s_data = '0;
  logic m_valid, m_ready = 0, m_last;
  act_t m_data;
  int checks = 0, failures = 0;
  int p[], q[], bias[];
  logic [15:0] st[];
  int exp_q [$];
  logic explast_q [$];
  int x [NPROD][DEPTH];
  bit slow = 1;
  int n_stall = 0;

  mm_unit #(.LANES(LANES), .DEPTH(DEPTH), .LAYER_ID(LID), .RELU(1'b1)) dut (.*);

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

  task automatic pwrite(input int layer, input bit is_bias, input int lane, input int addr,
                        input int pv, input int qv);
    @(negedge clk);
    pw = '{we: 1'b1, is_bias: is_bias, layer: 4'(layer), lane: 8'(lane), addr: 16'(addr),
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
    if (!rst && s_valid && !s_ready) n_stall++;
    m_ready <= slow ? ($urandom_range(0, 9) < 2) : 1'b1;
  end

  task automatic send(input int k);
    for (int i = 0; i < DEPTH; i++) begin
      if (slow) while ($urandom_range(0, 4) == 0) @(negedge clk);
      s_valid = 1; s_data = act_t'(x[k][i]); s_last = (k % 2 == 1) && (i == DEPTH - 1);
      @(posedge clk);
      while (!s_ready) @(posedge clk);
      @(negedge clk);
      s_valid = 0; s_last = 0;
    end
  endtask

  initial begin
    p = new[LANES * DEPTH]; q = new[LANES * DEPTH]; bias = new[LANES]; st = new[LANES];
    foreach (p[i]) begin p[i] = $urandom_range(0, 255); q[i] = $urandom_range(0, 255) - 128; end
    foreach (bias[i]) bias[i] = $urandom_range(0, 63) - 32;
    foreach (st[i]) st[i] = seed(LID, i);
    for (int k = 0; k < NPROD; k++)
      for (int i = 0; i < DEPTH; i++) x[k][i] = $urandom_range(0, 127) - 32;
    for (int k = 0; k < NPROD; k++)
      for (int n = 0; n < LANES; n++) begin
        longint acc;
        acc = longint'(bias[n]) * 64;
        for (int i = 0; i < DEPTH; i++)
          acc += longint'(draw(st[n], p[n * DEPTH + i], q[n * DEPTH + i])) * x[k][i];
        begin int e; e = ref_requant(acc, 1'b1); exp_q.push_back(e); end
        explast_q.push_back((k % 2 == 1) && (n == LANES - 1));
      end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 0;
    for (int n = 0; n < LANES; n++) begin
      for (int i = 0; i < DEPTH; i++) pwrite(LID, 0, n, i, p[n * DEPTH + i], q[n * DEPTH + i]);
      pwrite(LID, 1, n, 0, 0, bias[n]);
    end
    // writes for another layer must not land here
    for (int n = 0; n < LANES; n++) begin
      pwrite(LID - 1, 0, n, 0, 255, 99);
      pwrite(LID + 1, 1, n, 0, 0, 77);
    end
    for (int k = 0; k < NPROD - 2; k++) send(k);
    while (exp_q.size() > 2 * LANES) @(posedge clk);
    slow = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    begin
      int t0, t1;
      t0 = $time;
      send(NPROD - 2);
      send(NPROD - 1);
      t1 = $time;
      check((t1 - t0) / 10 == 2 * DEPTH, $sformatf("%0d elements took %0d clocks", 2 * DEPTH, (t1 - t0) / 10));
    end
    repeat (2 * LANES + 5) @(posedge clk);
    check(exp_q.size() == 0, "all outputs received");
    check(n_stall > 0, "input stall exercised");
    check(n_wzero > 0 && n_wq > 0, "both Bernoulli outcomes drawn");
    check(n_relu > 0, "ReLU clipping exercised");
    $display("stalls %0d, zero draws %0d, q draws %0d, relu %0d, sat %0d", n_stall, n_wzero, n_wq, n_relu, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
