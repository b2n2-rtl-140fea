// im2col: patch extraction for a 3x3, stride-1, zero-padded convolution.
//
// Input: an AXI-stream of an H x W x CIN feature map in channel-major order
// (all CIN channels of pixel (0,0), then pixel (0,1), ... row by row).
// Output: for every output pixel (r,c), in raster order, the 9*CIN elements
// of its 3x3 patch: taps row-major from (r-1,c-1) to (r+1,c+1), input
// channel fastest. Taps outside the map are sent as 0 (padding 1, so the
// output map is H x W as well). TLAST marks the last element of an image.
//
// How it works: incoming pixels are shifted into a line buffer of
// 2W+4 pixels (two image rows, three pixels, and one pixel of slack so the
// next input can arrive while the current patch is read). The buffer is a
// circular shift register: a write slot advances by one pixel per input
// pixel and the patch taps are read at fixed offsets (dr*W+dc) from the slot
// of the centre pixel, which the selector (a read multiplexer) turns into the
// patch stream. An output pixel starts once its bottom-right neighbour has
// fully arrived; input stalls only when it would overwrite the oldest pixel
// the current patch still needs. A new image is accepted after the last
// patch of the previous one has been sent.
// Timing: one patch element per clock when the output is ready; the input
// rate needed is one element per nine output elements. The shift register
// plus selector structure and the channel-major order follow the
// accelerator this RTL models; the buffer length, padding and the exact
// order of patch elements are this design's choices.
module im2col
  import b2n2_pkg::*;
#(
  parameter int W   = 32,
  parameter int H   = 32,
  parameter int CIN = 3
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
  localparam int DPIX = 2 * W + 4;   // line-buffer length in pixels
  localparam int NPIX = W * H;

  act_t buffer [DPIX * CIN];

  // input side
  int in_pix;    // pixels fully received in this image
  int in_ch;
  int wr_slot;
  // output side
  int r, c, tr, tc, ch;
  int ctr_slot;

  int   oldest, newest, rr, cc, s;
  logic accept, avail, gen, pad, last_elem, img_done;

  always_comb begin
    oldest    = r * W + c - W - 1;
    newest    = ((r + 1 < H) ? r + 1 : H - 1) * W + ((c + 1 < W) ? c + 1 : W - 1);
    accept    = s_valid && s_ready;
    avail     = in_pix > newest;
    gen       = (!m_valid || m_ready) && avail;
    rr        = r + tr - 1;
    cc        = c + tc - 1;
    pad       = (rr < 0) || (rr >= H) || (cc < 0) || (cc >= W);
    s         = ctr_slot + (tr - 1) * W + (tc - 1);
    if (s < 0)     s = s + DPIX;
    if (s >= DPIX) s = s - DPIX;
    last_elem = (ch == CIN - 1) && (tr == 2) && (tc == 2);
    img_done  = last_elem && (r == H - 1) && (c == W - 1);
  end

  assign s_ready = (in_pix < NPIX) && (in_pix < oldest + DPIX);

  always_ff @(posedge clk) begin
    if (rst) begin
      in_pix   <= 0;
      in_ch    <= 0;
      wr_slot  <= 0;
      r        <= 0;
      c        <= 0;
      tr       <= 0;
      tc       <= 0;
      ch       <= 0;
      ctr_slot <= 0;
      m_valid  <= 1'b0;
      m_data   <= '0;
      m_last   <= 1'b0;
    end else begin
      // shift a new element into the line buffer
      if (accept) begin
        buffer[wr_slot * CIN + in_ch] <= s_data;
        if (in_ch == CIN - 1) begin
          in_ch   <= 0;
          in_pix  <= in_pix + 1;
          wr_slot <= (wr_slot == DPIX - 1) ? 0 : wr_slot + 1;
        end else begin
          in_ch <= in_ch + 1;
        end
      end
      // selector: emit the next patch element
      if (gen) begin
        m_valid <= 1'b1;
        m_data  <= pad ? act_t'(0) : buffer[s * CIN + ch];
        m_last  <= img_done;
        if (ch != CIN - 1) ch <= ch + 1;
        else begin
          ch <= 0;
          if (tc != 2) tc <= tc + 1;
          else begin
            tc <= 0;
            if (tr != 2) tr <= tr + 1;
            else begin
              tr <= 0;
              if (img_done) begin
                r        <= 0;
                c        <= 0;
                ctr_slot <= 0;
                in_pix   <= 0;
                in_ch    <= 0;
                wr_slot  <= 0;
              end else begin
                ctr_slot <= (ctr_slot == DPIX - 1) ? 0 : ctr_slot + 1;
                if (c == W - 1) begin
                  c <= 0;
                  r <= r + 1;
                end else begin
                  c <= c + 1;
                end
              end
            end
          end
        end
      end else if (m_ready) begin
        m_valid <= 1'b0;
      end
    end
  end

  // the upstream TLAST must close the image
  property p_in_last;
    @(posedge clk) disable iff (rst) (accept && s_last) |-> (in_pix == NPIX - 1 && in_ch == CIN - 1);
  endproperty
  assert property (p_in_last);
endmodule
