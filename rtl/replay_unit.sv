// replay_unit: re-enacts recorded frames in their recorded time order.
//
// The host writes previously recorded records (possibly edited, e.g. with
// the frames of some nodes removed) into a FIFO in the reverse direction.
// The replay unit reads them one by one, extracts the frame from each data
// frame record and hands it to the protocol engine's transmit side at the
// moment given by the record's timestamp plus 'offset', so the frames
// reappear on the bus with their original spacing. Records of other kinds
// (cluster or global sync) are read and skipped.
//
// Release rule: a frame is due in the first cycle in which
// (ts - (rec_ts + offset)), taken as a signed number, is zero or positive,
// so the comparison is safe across a wrap-around of the time base;
// 'tx_start' follows in the next cycle, a fixed latency of one clock that
// keeps the spacing between frames exact. A frame
// whose time has already passed when it is read goes out at once and
// counts in 'late'.
//
// Interface: FIFO read port 'src_level', 'src_rd' and 'src_rdata' (valid
// the cycle after 'src_rd'); transmit side 'tx_start' with 'tx_len' and
// 'tx_info' (one cycle), then the payload words with 'tx_valid'/'tx_ready'.
// 'run' enables replay; when it is low the unit stops before the next
// record. Timing: a word takes two cycles to fetch; at 10 Mbit/s a 32-bit
// word lasts 256 sample clocks, so the fetch is never the bottleneck.
// Replaying recorded frames in their timely order from the timestamps
// follows the design; the release rule, the FIFO interface and the handling
// of late and non-frame records are this design's own choice.
module replay_unit
  import mon_pkg::*;
#(
  parameter int unsigned LV_W = 13
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             run,
  input  ts_t              ts,
  input  ts_t              offset,
  // record source
  input  logic [LV_W-1:0]  src_level,
  output logic             src_rd,
  input  word_t            src_rdata,
  // protocol engine transmit side
  output logic             tx_start,
  output logic [LEN_W-1:0] tx_len,
  output logic [15:0]      tx_info,
  output logic             tx_valid,
  output word_t            tx_data,
  input  logic             tx_ready,
  // status
  output logic [15:0]      late,
  output logic [15:0]      replayed,
  output logic             busy
);

  typedef enum logic [3:0] {
    P_IDLE, P_HDR, P_TS_RD, P_TS, P_WAIT, P_START, P_RD, P_WORD, P_SEND
  } rp_state_e;

  rp_state_e        state;
  rec_hdr_t         hdr;
  ts_t              target;
  logic [LEN_W-1:0] rem;
  logic             skip;
  logic             due;
  logic             have_word;

  assign have_word = (src_level != '0);
  ts_t              diff_now, diff_new;

  assign diff_now  = ts - target;
  assign diff_new  = ts - (src_rdata + offset);
  assign due       = !diff_now[TS_W-1];
  assign busy      = (state != P_IDLE);

  always_comb begin
    src_rd   = 1'b0;
    tx_start = (state == P_START);
    tx_len   = hdr.len - LEN_W'(HDR_WORDS);
    tx_info  = hdr.info;
    tx_valid = (state == P_SEND);
    unique case (state)
      P_IDLE:  src_rd = run && have_word;
      P_TS_RD: src_rd = have_word;
      P_RD:    src_rd = have_word;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= P_IDLE;
      hdr      <= '0;
      target   <= '0;
      rem      <= '0;
      skip     <= 1'b0;
      tx_data  <= '0;
      late     <= '0;
      replayed <= '0;
    end else begin
      unique case (state)
        P_IDLE:  if (run && have_word) state <= P_HDR;
        P_HDR: begin
          hdr   <= rec_hdr_t'(src_rdata);
          state <= P_TS_RD;
        end
        P_TS_RD: if (have_word) state <= P_TS;
        P_TS: begin
          target <= src_rdata + offset;
          rem    <= hdr.len - LEN_W'(HDR_WORDS);
          skip   <= (hdr.id != ID_DATA_FRAME);
          if (hdr.id != ID_DATA_FRAME) begin
            state <= (hdr.len > LEN_W'(HDR_WORDS)) ? P_RD : P_IDLE;
          end else begin
            state <= P_WAIT;
            if (diff_new != '0 && !diff_new[TS_W-1] && late != '1)
              late <= late + 1'b1;
          end
        end
        P_WAIT:  if (due) state <= P_START;
        P_START: begin
          if (replayed != '1) replayed <= replayed + 1'b1;
          state <= (rem != '0) ? P_RD : P_IDLE;
        end
        P_RD:    if (have_word) state <= P_WORD;
        P_WORD: begin
          tx_data <= src_rdata;
          if (skip) begin
            rem   <= rem - 1'b1;
            state <= (rem == LEN_W'(1)) ? P_IDLE : P_RD;
          end else begin
            state <= P_SEND;
          end
        end
        P_SEND: if (tx_ready) begin
          rem   <= rem - 1'b1;
          state <= (rem == LEN_W'(1)) ? P_IDLE : P_RD;
        end
        default: state <= P_IDLE;
      endcase
    end
  end

  a_len_sane: assert property (@(posedge clk) disable iff (!rst_n)
                               state == P_TS |-> hdr.len >= LEN_W'(HDR_WORDS));

endmodule
