// line_edge_src: bit-level events from the received bus lines.
//
// Watches the receive lines of the bus drivers (one per FlexRay channel),
// sampled by the sample clock Cs, which over-samples every bit eight times.
// Each change of the line state becomes an event for a record
// encapsulator, so the host gets the time of every edge on the bus to one
// sample period: the basis of bit-level diagnosis (bit timing, glitches,
// bus configuration).
//
// The asynchronous lines pass two synchroniser flops; the event starts in
// the first cycle in which the synchronised state differs from the state
// last reported and the encapsulator is idle. The record has no payload:
// its header info carries the new line state in bits [N_LINES-1:0] and,
// in bits [15:8], how many further changes happened while the event was
// waiting (edges closer together than the encapsulator can take, two
// clocks, are merged into one record and counted).
//
// Timing: an edge is reported two to three clocks after it happens on the
// line (synchroniser), plus any wait for the encapsulator; at 10 Mbit/s
// edges are at least eight clocks apart, so no wait occurs on a clean bus.
// 'line_sync' gives the synchronised levels, also used as trigger signals.
// Monitoring at bit level with per-sample timestamps follows the design;
// this source, its record and the merge rule are this design's own choice.
module line_edge_src #(
  parameter int unsigned N_LINES = 2
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [N_LINES-1:0] line_in,
  input  logic               enc_busy,
  output logic [N_LINES-1:0] line_sync,
  output logic               ev_start,
  output logic [15:0]        ev_info,
  output logic [15:0]        merged
);

  logic [N_LINES-1:0] s1, s2, s2_q, last;
  logic [7:0]         missed;

  assign line_sync = s2;
  assign ev_start  = (s2 != last) && !enc_busy;
  assign ev_info   = {missed, 8'(s2)};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1     <= '0;
      s2     <= '0;
      s2_q   <= '0;
      last   <= '0;
      missed <= '0;
      merged <= '0;
    end else begin
      s1   <= line_in;
      s2   <= s1;
      s2_q <= s2;
      if (ev_start) begin
        last   <= s2;
        missed <= '0;
      end else if ((s2 != s2_q) && (s2_q != last)) begin
        // a further change while an event is still waiting (including a
        // change back to the reported state, which then yields no event)
        if (missed != '1) missed <= missed + 1'b1;
        if (merged != '1) merged <= merged + 1'b1;
      end
    end
  end

endmodule
