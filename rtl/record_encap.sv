// record_encap: packs one monitored event into a record for its queue.
//
// An event source (the protocol engine's received-frame stream, its cluster
// sync events, the GPS pulse) announces an event with 'ev_start' and its
// payload length 'ev_len' in words, then hands over the payload words with a
// valid/ready handshake. The encapsulator samples the time base in the start
// cycle and writes  header (identifier REC_ID, total length, 'ev_info'),
// timestamp, payload  into the queue, committing the record with its last
// word.
//
// A record is only taken when the trigger line 'en' is high in the start
// cycle and the queue has room for the whole record. Otherwise the payload
// is still consumed, so the source never stalls, and the record is lost;
// if 'en' was high, 'dropped' counts it. 'ev_abort' discards a record in
// progress (for instance a frame that failed its checks).
//
// Timing: header in the start cycle, timestamp one cycle later, then one
// payload word per cycle at most; 'ev_ready' is low in the timestamp cycle.
// The gating by the trigger and the record layout (identifier, length at
// the head, timestamp) follow the design; the handshake, the drop policy
// and the counter are this design's own choice.
module record_encap
  import mon_pkg::*;
#(
  parameter logic [7:0]  REC_ID = ID_DATA_FRAME,
  parameter int unsigned QF_W   = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  ts_t              ts,
  // event source
  input  logic             ev_start,
  input  logic [LEN_W-1:0] ev_len,
  input  logic [15:0]      ev_info,
  input  logic             ev_valid,
  input  word_t            ev_data,
  output logic             ev_ready,
  input  logic             ev_abort,
  // queue write side
  output logic             q_wr_en,
  output word_t            q_wr_data,
  output logic             q_wr_commit,
  output logic             q_wr_abort,
  input  logic [QF_W-1:0]  q_free,
  // status
  output logic [15:0]      dropped,
  output logic             busy
);

  typedef enum logic [1:0] {E_IDLE, E_TS, E_PAY, E_SKIP} enc_state_e;

  enc_state_e       state;
  ts_t              ts_q;
  logic [LEN_W-1:0] rem;
  logic             fits;
  logic             accept;
  rec_hdr_t         hdr;

  assign fits   = (ev_len <= LEN_W'(MAX_PAYLOAD)) &&
                  ({1'b0, q_free} >= ((QF_W+1)'(ev_len) + (QF_W+1)'(HDR_WORDS)));
  assign accept = (state == E_IDLE) && ev_start && en && fits;
  assign hdr    = '{id: REC_ID, len: ev_len + LEN_W'(HDR_WORDS), info: ev_info};
  assign busy   = (state != E_IDLE);

  always_comb begin
    q_wr_en     = 1'b0;
    q_wr_data   = '0;
    q_wr_commit = 1'b0;
    q_wr_abort  = 1'b0;
    ev_ready    = 1'b0;
    unique case (state)
      E_IDLE: begin
        q_wr_en   = accept;
        q_wr_data = hdr;
      end
      E_TS: begin
        q_wr_abort  = ev_abort;
        q_wr_en     = !ev_abort;
        q_wr_data   = ts_q;
        q_wr_commit = (rem == '0);
      end
      E_PAY: begin
        ev_ready    = 1'b1;
        q_wr_abort  = ev_abort;
        q_wr_en     = ev_valid && !ev_abort;
        q_wr_data   = ev_data;
        q_wr_commit = ev_valid && (rem == LEN_W'(1));
      end
      E_SKIP: ev_ready = 1'b1;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= E_IDLE;
      ts_q    <= '0;
      rem     <= '0;
      dropped <= '0;
    end else begin
      unique case (state)
        E_IDLE: if (ev_start) begin
          ts_q <= ts;
          rem  <= ev_len;
          if (accept) begin
            state <= E_TS;
          end else begin
            if (en && dropped != '1) dropped <= dropped + 1'b1;
            if (ev_len != '0) state <= E_SKIP;
          end
        end
        E_TS: begin
          if (ev_abort || rem == '0) state <= E_IDLE;
          else                       state <= E_PAY;
        end
        E_PAY: begin
          if (ev_abort) begin
            state <= E_IDLE;
          end else if (ev_valid) begin
            rem <= rem - 1'b1;
            if (rem == LEN_W'(1)) state <= E_IDLE;
          end
        end
        E_SKIP: begin
          if (ev_abort) begin
            state <= E_IDLE;
          end else if (ev_valid) begin
            rem <= rem - 1'b1;
            if (rem == LEN_W'(1)) state <= E_IDLE;
          end
        end
        default: state <= E_IDLE;
      endcase
    end
  end

  a_start_when_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                      ev_start |-> state == E_IDLE);
  a_valid_in_record: assert property (@(posedge clk) disable iff (!rst_n)
                                      ev_valid |-> state inside {E_PAY, E_SKIP, E_TS});

endmodule
