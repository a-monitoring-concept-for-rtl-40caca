// bus_arbiter: owner of the local bus between the queues and the DPRAM.
//
// The arbiter looks at the dedicated queues in round-robin order. A queue
// is served when it holds a committed record and the DPRAM FIFO has room
// for the whole record, whose length it reads from the record header at
// the head of the queue. It then copies that record word by word over the
// local bus into the DPRAM, one word per clock, before it moves on. Records
// of different queues are therefore never interleaved in the DPRAM, and the
// host can walk the FIFO from one length field to the next.
//
// Interface: per queue 'q_avail' (committed words), 'q_data' (head word)
// and the pop strobe 'q_rd'; towards the DPRAM the local bus 'lb_we'/
// 'lb_data' and 'dp_free', the free words of the DPRAM FIFO. 'grant' shows
// which queue owns the bus.
// Timing: one cycle to pick a queue, then L cycles for a record of L words.
// An arbiter that copies the queues into the DPRAM follows the design; the
// round-robin order and whole-record bursts are this design's own choice.
module bus_arbiter
  import mon_pkg::*;
#(
  parameter int unsigned N_Q  = 4,
  parameter int unsigned AV_W = 8,
  parameter int unsigned DF_W = 15
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [AV_W-1:0]     q_avail [N_Q],
  input  word_t               q_data  [N_Q],
  output logic [N_Q-1:0]      q_rd,
  output logic                lb_we,
  output word_t               lb_data,
  input  logic [DF_W-1:0]     dp_free,
  output logic [N_Q-1:0]      grant
);

  localparam int unsigned QI_W = (N_Q > 1) ? $clog2(N_Q) : 1;

  logic             copying;
  logic [QI_W-1:0]  cur, last;
  logic [LEN_W-1:0] rem;
  logic             pick_ok;
  logic [QI_W-1:0]  pick;
  logic [LEN_W-1:0] pick_len;

  // Round-robin search, starting after the queue served last.
  always_comb begin
    pick_ok  = 1'b0;
    pick     = '0;
    pick_len = '0;
    for (int k = 1; k <= N_Q; k++) begin
      automatic int unsigned    idx = (int'(last) + k) % N_Q;
      automatic rec_hdr_t       h   = rec_hdr_t'(q_data[idx]);
      if (!pick_ok && q_avail[idx] != '0 && h.len != '0 &&
          DF_W'(h.len) <= dp_free) begin
        pick_ok  = 1'b1;
        pick     = QI_W'(idx);
        pick_len = h.len;
      end
    end
  end

  always_comb begin
    q_rd    = '0;
    grant   = '0;
    lb_we   = copying;
    lb_data = q_data[cur];
    if (copying) begin
      q_rd[cur]  = 1'b1;
      grant[cur] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      copying <= 1'b0;
      cur     <= '0;
      last    <= QI_W'(N_Q - 1);
      rem     <= '0;
    end else if (!copying) begin
      if (pick_ok) begin
        copying <= 1'b1;
        cur     <= pick;
        last    <= pick;
        rem     <= pick_len;
      end
    end else begin
      rem <= rem - 1'b1;
      if (rem == LEN_W'(1)) copying <= 1'b0;
    end
  end

  a_copy_committed: assert property (@(posedge clk) disable iff (!rst_n)
                                     copying |-> q_avail[cur] != '0);

endmodule
