// tb_weight_generator: checks the Bernoulli weight draw w = (p > eps) ? q : 0
// against an LFSR model for random p and q, and that w takes q with a
// frequency close to p/256 (p = 64 and p = 192 over 4000 draws each).
// Finally it checks the property the design rests on: with p and q set
// from a target mean E and variance V (p = E^2/(E^2+V), q = (E^2+V)/E) the
// drawn weights have sample mean and variance within 5% of E and V.
module tb_weight_generator;
  import tb_ref_pkg::*;
  logic clk = 0, rst = 1, adv = 0;
  logic [7:0] p;
  logic signed [7:0] q, w;
  int checks = 0, failures = 0;
  logic [15:0] model;
  int hits;

  weight_generator #(.SEED(16'hBEEF)) dut (.clk, .rst, .adv, .p, .q, .w);

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
    int nz = 0, nq = 0;
    model = 16'hBEEF;
    p = 0; q = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 2000; i++) begin
      adv <= 1'b1;
      @(posedge clk);
      #1;
      model = lfsr8(model);
      adv = 1'b0;
      p = 8'($urandom);
      q = 8'($urandom);
      #1;
      check(w == ((p > model[7:0]) ? q : 8'sd0), $sformatf("draw %0d p=%0d q=%0d w=%0d", i, p, q, w));
      if (w == 0) nz++; else nq++;
    end
    check(nz > 100 && nq > 100, "both outcomes seen");
    for (int k = 0; k < 2; k++) begin
      int pv;
      pv = (k == 0) ? 64 : 192;
      hits = 0;
      p = 8'(pv); q = 8'sd5;
      for (int i = 0; i < 4000; i++) begin
        adv <= 1'b1;
        @(posedge clk);
        #1;
        if (w == 8'sd5) hits++;
      end
      adv <= 1'b0;
      check(hits > pv * 4000 / 256 - 250 && hits < pv * 4000 / 256 + 250,
            $sformatf("p=%0d: %0d of 4000 draws gave q", pv, hits));
    end
    // moments: (E, V) = (0.5, 0.25) -> p = 0.5, q = 1.0;
    //          (E, V) = (0.75, 0.1875) -> p = 0.75, q = 1.0 (q has 6 fraction bits)
    for (int k = 0; k < 2; k++) begin
      real e_t, v_t, sum, sum2, mean, var_s;
      int  n;
      e_t = (k == 0) ? 0.5 : 0.75;
      v_t = (k == 0) ? 0.25 : 0.1875;
      p = 8'($rtoi(256.0 * e_t * e_t / (e_t * e_t + v_t)));
      q = 8'($rtoi(64.0 * (e_t * e_t + v_t) / e_t));
      sum = 0; sum2 = 0; n = 16000;
      for (int i = 0; i < n; i++) begin
        adv <= 1'b1;
        @(posedge clk);
        #1;
        sum  += real'(w) / 64.0;
        sum2 += (real'(w) / 64.0) * (real'(w) / 64.0);
      end
      adv <= 1'b0;
      mean  = sum / n;
      var_s = sum2 / n - mean * mean;
      $display("E=%f V=%f: p=%0d q=%0d, sample mean %f variance %f", e_t, v_t, p, q, mean, var_s);
      check(mean > 0.95 * e_t && mean < 1.05 * e_t, "sample mean matches E");
      check(var_s > 0.95 * v_t && var_s < 1.05 * v_t, "sample variance matches V");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
