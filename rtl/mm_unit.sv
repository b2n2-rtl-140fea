// mm_unit: matrix-multiplication unit with Bernoulli weight generators.
//
// LANES lanes, one per output channel, each made of a weight memory, a
// weight generator (URNG + comparator + MUX) and a multiplier-accumulator.
// Every lane sees the same input element per cycle (the innermost output-
// channel loop is fully unrolled); lane n multiplies it by its freshly
// sampled weight w_n (q_n or 0) and accumulates. DEPTH elements make one
// dot product (a 3x3xCin patch, or the whole input of the dense layer);
// after the last one each lane adds nothing more, the sums (which started
// from the channel bias) are requantised to 8 bits, with ReLU when RELU=1,
// and handed as one bank to the AXI-stream serializer.
//
// Pipeline: stage A accepts an element (s_valid && s_ready), reads entry t
// of every weight memory and draws a new eps in every URNG; stage B, one
// clock later, forms w, multiplies and accumulates. The unit accepts one
// element per clock; it stalls (s_ready low) only when a finished bank
// cannot be handed to the serializer because the previous one is still
// leaving. s_last marks the last element of an image and becomes TLAST of
// the last output beat of that image.
// Parameters are written through `pw` (layer id LAYER_ID): (p,q) entries
// into lane `pw.lane` at `pw.addr`, or the lane's bias (value in pw.q).
// Lane-parallel MACs and WGs follow the accelerator this RTL models; the
// two-stage pipeline, bias handling and requantisation are this design's.
module mm_unit
  import b2n2_pkg::*;
#(
  parameter int   LANES    = 32,
  parameter int   DEPTH    = 27,
  parameter int   LAYER_ID = 1,
  parameter logic RELU     = 1'b1,
  localparam int  AW       = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic      clk,
  input  logic      rst,
  input  param_wr_t pw,
  input  logic      s_valid,
  output logic      s_ready,
  input  act_t      s_data,
  input  logic      s_last,
  output logic      m_valid,
  input  logic      m_ready,
  output act_t      m_data,
  output logic      m_last
);
  logic          adv, accept;
  logic [AW-1:0] t;
  logic          a_valid, a_first, a_lastp, a_imglast;
  act_t          a_x;
  logic          bank_valid, bank_ready;
  act_t          bank_data [LANES];
  logic          pw_hit;

  assign pw_hit  = pw.we && (pw.layer == 4'(LAYER_ID));
  assign adv     = !(a_valid && a_lastp && !bank_ready);
  assign s_ready = adv;
  assign accept  = s_valid && adv;

  // stage A: element index and pipeline register
  always_ff @(posedge clk) begin
    if (rst) begin
      t         <= '0;
      a_valid   <= 1'b0;
      a_first   <= 1'b0;
      a_lastp   <= 1'b0;
      a_imglast <= 1'b0;
      a_x       <= '0;
    end else if (adv) begin
      a_valid <= accept;
      if (accept) begin
        a_x       <= s_data;
        a_first   <= (t == '0);
        a_lastp   <= (t == AW'(DEPTH-1));
        a_imglast <= s_last;
        t         <= (t == AW'(DEPTH-1)) ? '0 : t + 1'b1;
      end
    end
  end

  assign bank_valid = a_valid && a_lastp;

  for (genvar n = 0; n < LANES; n++) begin : g_lane
    wparam_t rd;
    qval_t   w;
    acc_t    acc, sum, prod, bias;

    weight_bram #(.DEPTH(DEPTH)) u_mem (
      .clk   (clk),
      .we    (pw_hit && !pw.is_bias && (pw.lane == 8'(n))),
      .waddr (AW'(pw.addr)),
      .wdata ('{p: pw.p, q: pw.q}),
      .re    (accept),
      .raddr (t),
      .rdata (rd)
    );

    weight_generator #(.SEED(lfsr_seed(LAYER_ID, n))) u_wg (
      .clk (clk),
      .rst (rst),
      .adv (accept),
      .p   (rd.p),
      .q   (rd.q),
      .w   (w)
    );

    always_comb begin
      prod = acc_t'(w) * acc_t'(a_x);
      sum  = (a_first ? bias : acc) + prod;
    end

    always_ff @(posedge clk) begin
      if (rst) begin
        bias <= '0;
        acc  <= '0;
      end else begin
        if (pw_hit && pw.is_bias && (pw.lane == 8'(n)))
          bias <= acc_t'(pw.q) <<< (ACC_FRAC - ACT_FRAC);
        if (a_valid && adv) acc <= sum;
      end
    end

    assign bank_data[n] = requant(sum, RELU);
  end

  axis_serializer #(.LANES(LANES)) u_out (
    .clk      (clk),
    .rst      (rst),
    .in_valid (bank_valid),
    .in_ready (bank_ready),
    .in_data  (bank_data),
    .in_last  (a_imglast),
    .m_valid  (m_valid),
    .m_ready  (m_ready),
    .m_data   (m_data),
    .m_last   (m_last)
  );

  // an image ends exactly at the end of a dot product
  property p_last_aligned;
    @(posedge clk) disable iff (rst) (s_valid && s_ready && s_last) |-> (t == AW'(DEPTH-1));
  endproperty
  assert property (p_last_aligned);
endmodule
