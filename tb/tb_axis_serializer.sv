// tb_axis_serializer: sends banks of random values with random valid and
// random m_ready, and checks every beat (order, TLAST only on the final
// channel of a bank flagged last) and that a bank leaves in LANES clocks
// when the sink is always ready.
module tb_axis_serializer;
  import b2n2_pkg::*;
  localparam int LANES = 5;
  logic clk = 0, rst = 1;
  logic in_valid = 0, in_ready, in_last = 0;
  act_t in_data [LANES];
  logic m_valid, m_ready = 0, m_last;
  act_t m_data;
  int checks = 0, failures = 0;
  act_t exp_q [$];
  logic explast_q [$];
  bit   rand_ready = 1;

  axis_serializer #(.LANES(LANES)) dut (.*);

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

  // sink
  always @(posedge clk) begin
    if (!rst && m_valid && m_ready) begin
      check(exp_q.size() > 0, "unexpected beat");
      if (exp_q.size() > 0) begin
        check(m_data == exp_q.pop_front(), "data");
        check(m_last == explast_q.pop_front(), "last");
      end
    end
    m_ready <= rand_ready ? ($urandom_range(0, 2) != 0) : 1'b1;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int b = 0; b < 60; b++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 1) == 1);
      while (!in_valid) begin
        @(negedge clk);
        in_valid = ($urandom_range(0, 1) == 1);
      end
      in_last = ($urandom_range(0, 3) == 0);
      foreach (in_data[i]) in_data[i] = act_t'($urandom);
      while (!in_ready) @(negedge clk);
      foreach (in_data[i]) begin
        exp_q.push_back(in_data[i]);
        explast_q.push_back(in_last && i == LANES - 1);
      end
      @(negedge clk);
      in_valid = 0;
    end
    while (exp_q.size() > 0) @(posedge clk);
    // rate: one bank with the sink always ready
    rand_ready = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    in_valid = 1; in_last = 1;
    foreach (in_data[i]) begin
      in_data[i] = act_t'(i + 1);
      exp_q.push_back(in_data[i]);
      explast_q.push_back(i == LANES - 1);
    end
    @(negedge clk);
    in_valid = 0;
    begin
      int cyc = 0;
      while (exp_q.size() > 0) begin @(posedge clk); cyc++; end
      check(cyc >= LANES && cyc <= LANES + 1, $sformatf("bank took %0d clocks", cyc));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
