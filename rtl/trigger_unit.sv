// trigger_unit: decides when the monitor records.
//
// Condition units (N_COND) each test one thing every sample clock: a rising
// or falling edge of one monitored signal, the state of the signal vector
// under a mask, the data word of the frame stream against a reference
// (equal under a mask) or a range, or the time base against a reference
// time. Product terms (N_TERM) AND any subset of the conditions, each one
// optionally negated, and the combination ORs the terms, so a trigger such
// as "(A and B) or (not C)" is one configuration.
//
// Two trigger paths exist. The fast path is the combination itself: it is
// purely combinational, so recording starts in the same sample-clock cycle
// as the trigger event. The sequence path is a small sequencer of N_STAGE
// stages; each stage waits until its product term has been true 'count'
// times ("A three times", "A first, then B"), and the final stage fires the
// trigger. Its output is registered, so it responds one cycle later.
//
// Trigger position: in post-trigger mode recording starts with the trigger;
// in pre-trigger mode recording runs from arming, so the bus history ahead
// of the trigger is captured, and stops 'post_len' cycles after it. A
// post_len of 0 records until 'arm' is taken away. The record enable is
// driven onto the per-queue 'triggers' lines, masked by 'q_sel'.
//
// Interface: 'cfg' is static configuration, held while armed. 'arm' is a
// level: raising it arms, lowering it returns to idle. 'trig' pulses in the
// trigger cycle and 'trig_ts' holds the timestamp of the last trigger;
// 'fired' stays high from the trigger until the unit is disarmed (it can
// start the replay of recorded frames).
// The kinds of conditions, combinations, sequences, counters, pre/post
// trigger and the fast/complex split follow the design; the numbers of
// units, the encoding and the state machine are this design's own choice.
module trigger_unit
  import mon_pkg::*;
#(
  parameter int unsigned N_Q = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  trig_cfg_t        cfg,
  input  logic [N_Q-1:0]   q_sel,
  input  logic             arm,
  input  logic [N_SIG-1:0] sig,
  input  word_t            data,
  input  logic             data_valid,
  input  ts_t              ts,
  output logic [N_Q-1:0]   triggers,
  output logic             rec_en,
  output logic             trig,
  output ts_t              trig_ts,
  output logic             armed,
  output logic             done,
  output logic             fired
);

  typedef enum logic [1:0] {S_IDLE, S_ARMED, S_RUN, S_DONE} acq_state_e;

  acq_state_e       state;
  logic [N_SIG-1:0] sig_q;
  logic [N_COND-1:0] hit;
  logic [N_TERM-1:0] term;
  logic             fast_trig;
  logic             seq_fire;
  logic [1:0]       stage;
  logic [CNT_W-1:0] cnt;
  logic             trig_now;
  ts_t              rem;
  logic             unlimited;

  // ---------------- condition units ----------------
  always_comb begin
    for (int i = 0; i < N_COND; i++) begin
      unique case (cfg.cond[i].kind)
        COND_RISE:  hit[i] = sig[cfg.cond[i].sel] & ~sig_q[cfg.cond[i].sel];
        COND_FALL:  hit[i] = ~sig[cfg.cond[i].sel] & sig_q[cfg.cond[i].sel];
        COND_STATE: hit[i] = ((WORD_W'(sig) ^ cfg.cond[i].refv) & cfg.cond[i].mask) == '0;
        COND_EQ:    hit[i] = data_valid &&
                             (((data ^ cfg.cond[i].refv) & cfg.cond[i].mask) == '0);
        COND_RANGE: hit[i] = data_valid && (data >= cfg.cond[i].lo) &&
                             (data <= cfg.cond[i].hi);
        COND_TIME:  hit[i] = (WORD_W'(ts) == cfg.cond[i].refv);
        default:    hit[i] = 1'b0;
      endcase
    end
  end

  // ---------------- combination: OR of product terms ----------------
  always_comb begin
    for (int j = 0; j < N_TERM; j++) begin
      term[j] = (cfg.term[j].use_c != '0) &&
                (((hit ^ cfg.term[j].neg_c) | ~cfg.term[j].use_c) == '1);
    end
    fast_trig = |term;
  end

  // ---------------- sequencer ----------------
  logic             stage_ev;
  logic [CNT_W-1:0] stage_need;
  always_comb begin
    stage_ev   = term[cfg.stage[stage].term];
    stage_need = (cfg.stage[stage].count == '0) ? CNT_W'(1) : cfg.stage[stage].count;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage    <= '0;
      cnt      <= '0;
      seq_fire <= 1'b0;
    end else begin
      seq_fire <= 1'b0;
      if (state != S_ARMED) begin
        stage <= '0;
        cnt   <= '0;
      end else if (stage_ev) begin
        if (cnt + 1'b1 >= stage_need) begin
          cnt <= '0;
          if (stage == cfg.last_stage) begin
            seq_fire <= 1'b1;
            stage    <= '0;
          end else begin
            stage <= stage + 1'b1;
          end
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

  // ---------------- acquisition control ----------------
  assign trig_now = (state == S_ARMED) && (cfg.use_seq ? seq_fire : fast_trig);
  assign trig     = trig_now;
  assign rec_en   = (state == S_RUN) ||
                    ((state == S_ARMED) && (trig_now || (cfg.pos == TRIG_PRE)));
  assign triggers = rec_en ? q_sel : '0;
  assign armed    = (state == S_ARMED);
  assign done     = (state == S_DONE);
  assign fired    = trig_now || (state == S_RUN) || (state == S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      sig_q     <= '0;
      rem       <= '0;
      unlimited <= 1'b0;
      trig_ts   <= '0;
    end else begin
      sig_q <= sig;
      unique case (state)
        S_IDLE:  if (arm) state <= S_ARMED;
        S_ARMED: begin
          if (!arm) begin
            state <= S_IDLE;
          end else if (trig_now) begin
            trig_ts   <= ts;
            unlimited <= (cfg.post_len == '0);
            rem       <= cfg.post_len - 1'b1;
            state     <= (cfg.post_len == TS_W'(1)) ? S_DONE : S_RUN;
          end
        end
        S_RUN: begin
          if (!arm) begin
            state <= S_IDLE;
          end else if (!unlimited) begin
            rem <= rem - 1'b1;
            if (rem == TS_W'(1)) state <= S_DONE;
          end
        end
        S_DONE:  if (!arm) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
