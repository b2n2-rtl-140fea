// tb_ref_pkg: behavioural reference of the network for the testbenches.
//
// Models, with plain integers, what the accelerator is meant to compute:
// the Bernoulli weight draw of each output channel (its own LFSR, stepped
// once per weight), 3x3 zero-padded convolutions with bias, ReLU and 8-bit
// requantisation, 2x2 max pooling and the dense layer. Feature maps are
// flat integer arrays indexed ((r*W)+c)*C+ch (channel-major). The LFSR is
// written out bit by bit here, separately from the RTL's description.
// It also counts how often each mechanism occurs (padding taps, zero and q
// weight draws, ReLU clipping, saturation).
package tb_ref_pkg;

  int n_pad, n_wzero, n_wq, n_relu, n_sat;

  function automatic void clear_stats();
    n_pad = 0; n_wzero = 0; n_wq = 0; n_relu = 0; n_sat = 0;
  endfunction

  // Galois LFSR x^16+x^14+x^13+x^11+1, one bit at a time, eight times
  function automatic logic [15:0] lfsr8(input logic [15:0] s);
    logic fb;
    for (int i = 0; i < 8; i++) begin
      fb = s[0];
      s  = {1'b0, s[15:1]};
      if (fb) begin
        s[15] = ~s[15]; s[13] = ~s[13]; s[12] = ~s[12]; s[10] = ~s[10];
      end
    end
    return s;
  endfunction

  function automatic logic [15:0] seed(input int layer, input int lane);
    logic [15:0] s;
    s = 16'hACE1 ^ 16'(layer * 'h1F35) ^ 16'(lane * 'h9E37);
    return (s == 0) ? 16'h0001 : s;
  endfunction

  // draw a weight for one lane: w = q if p > eps else 0
  function automatic int draw(inout logic [15:0] st, input int p, input int q);
    st = lfsr8(st);
    if (p > int'(st[7:0])) begin n_wq++; return q; end
    n_wzero++;
    return 0;
  endfunction

  // accumulator (10 fraction bits) -> 8-bit activation (4 fraction bits)
  function automatic int ref_requant(input longint acc, input bit relu);
    longint s;
    int     res;
    s = acc >>> 6;
    if (relu && s < 0) begin
      s = 0;
      n_relu = n_relu + 1;
    end
    if (s > 127) begin
      n_sat = n_sat + 1;
      res = 127;
    end else if (s < -128) begin
      n_sat = n_sat + 1;
      res = -128;
    end else res = int'(s);
    return res;
  endfunction

  // 3x3 conv, stride 1, padding 1; p/q indexed [lane*9*CIN + tap*CIN + ci]
  function automatic void conv(input int in[], input int W, input int H,
                               input int CIN, input int COUT,
                               input int p[], input int q[], input int bias[],
                               inout logic [15:0] st[], output int out[]);
    out = new[W * H * COUT];
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++)
        for (int n = 0; n < COUT; n++) begin
          longint acc;
          acc = longint'(bias[n]) * 64;
          for (int tap = 0; tap < 9; tap++)
            for (int ci = 0; ci < CIN; ci++) begin
              int rr, cc, x, t, w;
              rr = r + tap / 3 - 1;
              cc = c + tap % 3 - 1;
              if (rr < 0 || rr >= H || cc < 0 || cc >= W) begin
                x = 0;
                if (n == 0) n_pad++;
              end else x = in[(rr * W + cc) * CIN + ci];
              t = n * 9 * CIN + tap * CIN + ci;
              w = draw(st[n], p[t], q[t]);
              acc += longint'(w) * x;
            end
          out[(r * W + c) * COUT + n] = ref_requant(acc, 1'b1);
        end
  endfunction

  function automatic void pool(input int in[], input int W, input int H,
                               input int C, output int out[]);
    out = new[(W / 2) * (H / 2) * C];
    for (int r = 0; r < H / 2; r++)
      for (int c = 0; c < W / 2; c++)
        for (int ch = 0; ch < C; ch++) begin
          int m;
          m = in[((2 * r) * W + 2 * c) * C + ch];
          for (int k = 1; k < 4; k++) begin
            int v;
            v = in[((2 * r + k / 2) * W + 2 * c + k % 2) * C + ch];
            if (v > m) m = v;
          end
          out[(r * (W / 2) + c) * C + ch] = m;
        end
  endfunction

  function automatic void dense(input int in[], input int NIN, input int NOUT,
                                input int p[], input int q[], input int bias[],
                                inout logic [15:0] st[], output int out[]);
    out = new[NOUT];
    for (int n = 0; n < NOUT; n++) begin
      longint acc;
      acc = longint'(bias[n]) * 64;
      for (int i = 0; i < NIN; i++)
        acc += longint'(draw(st[n], p[n * NIN + i], q[n * NIN + i])) * in[i];
      out[n] = ref_requant(acc, 1'b0);
    end
  endfunction

endpackage
