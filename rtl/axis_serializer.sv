// axis_serializer: AXI-stream output of a processing element.
//
// Takes a bank of LANES results (one per output channel of a pixel) in one
// handshake and sends them on an AXI-stream master, channel 0 first, so the
// next layer receives its input in channel-major order (all channels of a
// pixel, then the next pixel). TLAST is raised on the final channel of a
// bank that arrived with `in_last` (the last pixel of an image).
// Handshakes: the bank is taken when in_valid && in_ready; in_ready is high
// only while no bank is held. A beat moves when m_valid && m_ready. A bank
// of LANES values leaves in LANES beats at best; the next bank may be taken
// in the cycle after the final beat. The AXI-stream output follows the
// accelerator this RTL models; the bank-and-counter structure is this
// design's choice.
module axis_serializer
  import b2n2_pkg::*;
#(
  parameter int LANES = 32,
  localparam int CW   = (LANES > 1) ? $clog2(LANES) : 1
) (
  input  logic clk,
  input  logic rst,
  input  logic in_valid,
  output logic in_ready,
  input  act_t in_data [LANES],
  input  logic in_last,
  output logic m_valid,
  input  logic m_ready,
  output act_t m_data,
  output logic m_last
);
  act_t          bank [LANES];
  logic          full;
  logic          bank_last;
  logic [CW-1:0] idx;

  assign in_ready = !full;
  assign m_valid  = full;
  assign m_data   = bank[idx];
  assign m_last   = full && bank_last && (idx == CW'(LANES-1));

  always_ff @(posedge clk) begin
    if (rst) begin
      full      <= 1'b0;
      idx       <= '0;
      bank_last <= 1'b0;
    end else if (!full) begin
      if (in_valid) begin
        bank      <= in_data;
        bank_last <= in_last;
        full      <= 1'b1;
        idx       <= '0;
      end
    end else if (m_ready) begin
      if (idx == CW'(LANES-1)) begin
        full <= 1'b0;
        idx  <= '0;
      end else begin
        idx <= idx + 1'b1;
      end
    end
  end

  // AXI-stream rule: data and last stay stable while a beat waits
  property p_stable;
    @(posedge clk) disable iff (rst) (m_valid && !m_ready) |=> (m_valid && $stable(m_data) && $stable(m_last));
  endproperty
  assert property (p_stable);
endmodule
