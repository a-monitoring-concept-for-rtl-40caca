// sync_event_src: turns a synchronisation event into a one-word event for
// a record encapsulator.
//
// Used twice in the monitor. For the global sync records it watches the
// GPS one-pulse-per-second input: the asynchronous pulse passes two
// synchroniser flops and its rising edge becomes the event; the payload is
// the number of pulses seen so far (a running seconds count), which lets
// the host tie timestamps to the external time base. For the cluster sync
// records it takes the protocol engine's synchronous sync strobe and the
// cluster time that comes with it as the payload.
//
// Parameters: ASYNC = 1 selects the synchroniser and edge detector (the
// input is a level from outside), ASYNC = 0 takes 'evt_in' as a one-cycle
// strobe. COUNT = 1 makes the payload the event count, COUNT = 0 the
// sampled 'evt_data'.
//
// Timing: with ASYNC = 1, 'ev_start' follows the input edge by three clock
// cycles (a fixed offset the host can subtract); with ASYNC = 0, by none,
// so the timestamp is that of the strobe. The payload word is then offered
// with 'ev_valid' until 'ev_ready'. 'pulse' is the event strobe, also a
// trigger signal. Events arriving while one is still pending are counted
// but not reported. The GPS pulse input and the global/cluster sync records
// follow the design; the rest is this design's own choice.
module sync_event_src
  import mon_pkg::*;
#(
  parameter bit ASYNC = 1'b1,
  parameter bit COUNT = 1'b1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             evt_in,
  input  word_t            evt_data,
  output logic             pulse,
  output logic             ev_start,
  output logic [LEN_W-1:0] ev_len,
  output logic             ev_valid,
  output word_t            ev_data,
  input  logic             ev_ready
);

  logic  s1, s2, s3;
  logic  pending;
  word_t count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= 1'b0;
      s2 <= 1'b0;
      s3 <= 1'b0;
    end else begin
      s1 <= evt_in;
      s2 <= s1;
      s3 <= s2;
    end
  end

  assign pulse    = ASYNC ? (s2 & ~s3) : evt_in;
  assign ev_start = pulse && !pending;
  assign ev_len   = LEN_W'(1);
  assign ev_valid = pending;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending <= 1'b0;
      count   <= '0;
      ev_data <= '0;
    end else begin
      if (pulse) count <= count + 1'b1;
      if (ev_start) begin
        pending <= 1'b1;
        ev_data <= COUNT ? count + 1'b1 : evt_data;
      end else if (pending && ev_ready) begin
        pending <= 1'b0;
      end
    end
  end

endmodule
