// maxpool_pe: 2x2, stride-2 max pooling on a channel-major stream.
//
// Input: H x W x C map, all C channels of a pixel together, raster order.
// Output: (H/2) x (W/2) x C map in the same order, TLAST on its last value.
// Each value is compared with the one to its left (held in a C-entry column
// register) to form the horizontal maximum; on even rows those maxima are
// stored in a row buffer of (W/2)*C entries, on odd rows they are compared
// with the stored ones and the result is sent. One output value is produced
// for every four inputs, so the PE never limits the pipeline.
// Handshakes are AXI-stream; the input stalls while an output value waits
// for the next PE. The pooling size follows the network table; the
// buffering scheme is this design's choice.
module maxpool_pe
  import b2n2_pkg::*;
#(
  parameter int W = 32,
  parameter int H = 32,
  parameter int C = 32
) (
  input  logic clk,
  input  logic rst,
  input  logic s_valid,
  output logic s_ready,
  input  act_t s_data,
  input  logic s_last,
  output logic m_valid,
  input  logic m_ready,
  output act_t m_data,
  output logic m_last
);
  act_t colbuf [C];
  act_t rowbuf [(W / 2) * C];
  int   r, c, ch;
  act_t hmax, vmax;
  logic accept, emit;

  always_comb begin
    accept = s_valid && s_ready;
    hmax   = (colbuf[ch] > s_data) ? colbuf[ch] : s_data;
    vmax   = (rowbuf[(c / 2) * C + ch] > hmax) ? rowbuf[(c / 2) * C + ch] : hmax;
    emit   = r[0] && c[0];
  end

  assign s_ready = !m_valid || m_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      r       <= 0;
      c       <= 0;
      ch      <= 0;
      m_valid <= 1'b0;
      m_data  <= '0;
      m_last  <= 1'b0;
    end else begin
      if (m_valid && m_ready) m_valid <= 1'b0;
      if (accept) begin
        if (!c[0])      colbuf[ch] <= s_data;
        else if (!r[0]) rowbuf[(c / 2) * C + ch] <= hmax;
        if (emit) begin
          m_valid <= 1'b1;
          m_data  <= vmax;
          m_last  <= (r == H - 1) && (c == W - 1) && (ch == C - 1);
        end
        if (ch != C - 1) ch <= ch + 1;
        else begin
          ch <= 0;
          if (c != W - 1) c <= c + 1;
          else begin
            c <= 0;
            r <= (r == H - 1) ? 0 : r + 1;
          end
        end
      end
    end
  end

  property p_in_last;
    @(posedge clk) disable iff (rst) (accept && s_last) |-> (r == H - 1 && c == W - 1 && ch == C - 1);
  endproperty
  assert property (p_in_last);
endmodule
