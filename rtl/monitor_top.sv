// monitor_top: hardware monitor for a FlexRay node.
//
// It sits next to the FlexRay protocol engine, in place of the usual
// controller-host interface, and records what happens on the bus with exact
// timestamps. Four event sources feed four record encapsulators:
//   - data frames: the frame stream received by the protocol engine;
//   - cluster sync: the engine's sync strobe with the cluster time;
//   - global sync: the GPS one-pulse-per-second input;
//   - line edges: every change of the bus drivers' receive lines, for
//     bit-level diagnosis.
// The time base stamps every record. Each encapsulator writes only while its
// line of the trigger unit's 'triggers' bus is high, into its own queue
// (the events arise in parallel). The bus arbiter copies complete records
// from the queues over the local bus into the dual-ported RAM, a FIFO the
// host CPU empties when its fill level crosses a threshold and raises 'irq'.
//
// In the reverse direction the host writes recorded (and possibly edited)
// records into a second dual-ported FIFO; the replay unit hands the frames
// to the protocol engine's transmit side at their recorded times plus
// 'rp_offset'. With 'rp_on_trig' set, replay waits for the trigger unit to
// fire.
//
// Queue index: 0 data frames, 1 cluster sync, 2 global sync, 3 line edges
// (for 'q_sel', 'dropped', 'enc_busy' and 'grant').
//
// Trigger signal vector (sig[7:0]): {pe_status[2:0], rxd[1:0] (synchronised),
// pps pulse, cluster sync strobe, frame start}. The data-word conditions watch the frame words
// as they are accepted from the protocol engine.
//
// Clocks: 'clk' is the sample clock Cs (80 MHz: 8 samples per bit at
// 10 Mbit/s), 'h_clk' the host clock of the DPRAM's second port.
// Configuration (trigger setup, queue selection, threshold) arrives as
// ports; a register interface for the host is not part of this module.
// The structure (time base, trigger unit, encapsulators with enables,
// dedicated queues, arbiter, DPRAM FIFO) follows the design; the sizes of
// the queues and the interfaces to the protocol engine are this design's
// own choice.
module monitor_top
  import mon_pkg::*;
#(
  parameter int unsigned DQ_DEPTH = 256,    // data frame queue, words
  parameter int unsigned SQ_DEPTH = 16,     // each sync queue, words
  parameter int unsigned EQ_DEPTH = 64,     // line edge queue, words
  parameter int unsigned DP_DEPTH = 16384,  // DPRAM FIFO, words
  parameter int unsigned RP_DEPTH = 4096    // replay FIFO, words
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      h_clk,
  input  logic                      h_rst_n,
  // configuration
  input  logic                      tb_run,
  input  trig_cfg_t                 trig_cfg,
  input  logic [3:0]                q_sel,
  input  logic                      arm,
  input  logic [$clog2(DP_DEPTH):0] threshold,
  // protocol engine: received frames
  input  logic                      pe_fr_start,
  input  logic [LEN_W-1:0]          pe_fr_len,
  input  logic [15:0]               pe_fr_info,
  input  logic                      pe_fr_valid,
  input  word_t                     pe_fr_data,
  output logic                      pe_fr_ready,
  input  logic                      pe_fr_abort,
  // protocol engine: cluster sync and status
  input  logic                      pe_csync,
  input  word_t                     pe_ctime,
  input  logic [2:0]                pe_status,
  // bus drivers: receive lines of channels A and B
  input  logic [1:0]                rxd,
  // external time base
  input  logic                      gps_pps,
  // host side of the DPRAM
  input  logic                      h_rd,
  output word_t                     h_rdata,
  output logic [$clog2(DP_DEPTH):0] h_level,
  output logic                      irq,
  // host side of the replay FIFO and replay control
  input  logic                      h_wr,
  input  word_t                     h_wdata,
  output logic [$clog2(RP_DEPTH):0] h_wfree,
  input  logic                      rp_run,
  input  logic                      rp_on_trig,
  input  ts_t                       rp_offset,
  // protocol engine: frames to transmit (replay)
  output logic                      pe_tx_start,
  output logic [LEN_W-1:0]          pe_tx_len,
  output logic [15:0]               pe_tx_info,
  output logic                      pe_tx_valid,
  output word_t                     pe_tx_data,
  input  logic                      pe_tx_ready,
  output logic [15:0]               rp_late,
  output logic [15:0]               rp_replayed,
  output logic                      rp_busy,
  // status
  output ts_t                       ts,
  output logic                      ts_wrap,
  output logic                      trig,
  output ts_t                       trig_ts,
  output logic                      armed,
  output logic                      done,
  output logic                      recording,
  output logic [3:0]                enc_busy,
  output logic [15:0]               edges_merged,
  output logic [15:0]               dropped [4],
  output logic [3:0]                grant
);

  localparam int unsigned N_Q  = 4;
  localparam int unsigned DQ_W = $clog2(DQ_DEPTH) + 1;
  localparam int unsigned SQ_W = $clog2(SQ_DEPTH) + 1;
  localparam int unsigned EQ_W = $clog2(EQ_DEPTH) + 1;
  localparam int unsigned AV_W = (DQ_W > SQ_W) ? ((DQ_W > EQ_W) ? DQ_W : EQ_W)
                                                : ((SQ_W > EQ_W) ? SQ_W : EQ_W);
  localparam int unsigned DF_W = $clog2(DP_DEPTH) + 1;

  // ---------------- time base and trigger ----------------
  logic [N_Q-1:0]   triggers;
  logic             cs_pulse, pps_pulse;
  logic [N_SIG-1:0] sig;
  logic             fired;
  logic [1:0]       rxd_sync;

  time_base u_time_base (
    .clk, .rst_n, .run(tb_run), .ts, .wrap(ts_wrap)
  );

  assign sig = {pe_status, rxd_sync, pps_pulse, cs_pulse, pe_fr_start};

  trigger_unit #(.N_Q(N_Q)) u_trigger (
    .clk, .rst_n, .cfg(trig_cfg), .q_sel, .arm, .sig,
    .data(pe_fr_data), .data_valid(pe_fr_valid && pe_fr_ready), .ts,
    .triggers, .rec_en(recording), .trig, .trig_ts, .armed, .done, .fired
  );

  // ---------------- sync event sources ----------------
  logic             cs_start, cs_valid, cs_ready;
  logic             gs_start, gs_valid, gs_ready;
  logic [LEN_W-1:0] cs_len, gs_len;
  word_t            cs_data, gs_data;

  sync_event_src #(.ASYNC(1'b0), .COUNT(1'b0)) u_cs_src (
    .clk, .rst_n, .evt_in(pe_csync), .evt_data(pe_ctime), .pulse(cs_pulse),
    .ev_start(cs_start), .ev_len(cs_len), .ev_valid(cs_valid),
    .ev_data(cs_data), .ev_ready(cs_ready)
  );

  sync_event_src #(.ASYNC(1'b1), .COUNT(1'b1)) u_gs_src (
    .clk, .rst_n, .evt_in(gps_pps), .evt_data('0), .pulse(pps_pulse),
    .ev_start(gs_start), .ev_len(gs_len), .ev_valid(gs_valid),
    .ev_data(gs_data), .ev_ready(gs_ready)
  );

  // ---------------- encapsulators and queues ----------------
  logic             qw_en   [N_Q];
  word_t            qw_data [N_Q];
  logic             qw_cm   [N_Q];
  logic             qw_ab   [N_Q];
  logic [AV_W-1:0]  q_avail [N_Q];
  word_t            q_data  [N_Q];
  logic [N_Q-1:0]   q_rd;
  logic [DQ_W-1:0]  dq_free, dq_avail;
  logic [SQ_W-1:0]  cq_free, cq_avail, gq_free, gq_avail;
  logic [EQ_W-1:0]  eq_free, eq_avail;
  logic             le_start;
  logic [15:0]      le_info;

  record_encap #(.REC_ID(ID_DATA_FRAME), .QF_W(DQ_W)) u_enc_data (
    .clk, .rst_n, .en(triggers[0]), .ts,
    .ev_start(pe_fr_start), .ev_len(pe_fr_len), .ev_info(pe_fr_info),
    .ev_valid(pe_fr_valid), .ev_data(pe_fr_data), .ev_ready(pe_fr_ready),
    .ev_abort(pe_fr_abort),
    .q_wr_en(qw_en[0]), .q_wr_data(qw_data[0]), .q_wr_commit(qw_cm[0]),
    .q_wr_abort(qw_ab[0]), .q_free(dq_free), .dropped(dropped[0]), .busy(enc_busy[0])
  );

  record_encap #(.REC_ID(ID_CLUSTER_SYNC), .QF_W(SQ_W)) u_enc_csync (
    .clk, .rst_n, .en(triggers[1]), .ts,
    .ev_start(cs_start), .ev_len(cs_len), .ev_info(16'h0000),
    .ev_valid(cs_valid), .ev_data(cs_data), .ev_ready(cs_ready),
    .ev_abort(1'b0),
    .q_wr_en(qw_en[1]), .q_wr_data(qw_data[1]), .q_wr_commit(qw_cm[1]),
    .q_wr_abort(qw_ab[1]), .q_free(cq_free), .dropped(dropped[1]), .busy(enc_busy[1])
  );

  record_encap #(.REC_ID(ID_GLOBAL_SYNC), .QF_W(SQ_W)) u_enc_gsync (
    .clk, .rst_n, .en(triggers[2]), .ts,
    .ev_start(gs_start), .ev_len(gs_len), .ev_info(16'h0000),
    .ev_valid(gs_valid), .ev_data(gs_data), .ev_ready(gs_ready),
    .ev_abort(1'b0),
    .q_wr_en(qw_en[2]), .q_wr_data(qw_data[2]), .q_wr_commit(qw_cm[2]),
    .q_wr_abort(qw_ab[2]), .q_free(gq_free), .dropped(dropped[2]), .busy(enc_busy[2])
  );

  line_edge_src #(.N_LINES(2)) u_le_src (
    .clk, .rst_n, .line_in(rxd), .enc_busy(enc_busy[3]), .line_sync(rxd_sync),
    .ev_start(le_start), .ev_info(le_info), .merged(edges_merged)
  );

  record_encap #(.REC_ID(ID_LINE_EDGE), .QF_W(EQ_W)) u_enc_edge (
    .clk, .rst_n, .en(triggers[3]), .ts,
    .ev_start(le_start), .ev_len('0), .ev_info(le_info),
    .ev_valid(1'b0), .ev_data('0), .ev_ready(),
    .ev_abort(1'b0),
    .q_wr_en(qw_en[3]), .q_wr_data(qw_data[3]), .q_wr_commit(qw_cm[3]),
    .q_wr_abort(qw_ab[3]), .q_free(eq_free), .dropped(dropped[3]), .busy(enc_busy[3])
  );

  record_queue #(.DEPTH(DQ_DEPTH)) u_q_data (
    .clk, .rst_n, .wr_en(qw_en[0]), .wr_data(qw_data[0]), .wr_commit(qw_cm[0]),
    .wr_abort(qw_ab[0]), .free(dq_free), .rd_en(q_rd[0]), .rd_data(q_data[0]),
    .avail(dq_avail)
  );

  record_queue #(.DEPTH(SQ_DEPTH)) u_q_csync (
    .clk, .rst_n, .wr_en(qw_en[1]), .wr_data(qw_data[1]), .wr_commit(qw_cm[1]),
    .wr_abort(qw_ab[1]), .free(cq_free), .rd_en(q_rd[1]), .rd_data(q_data[1]),
    .avail(cq_avail)
  );

  record_queue #(.DEPTH(SQ_DEPTH)) u_q_gsync (
    .clk, .rst_n, .wr_en(qw_en[2]), .wr_data(qw_data[2]), .wr_commit(qw_cm[2]),
    .wr_abort(qw_ab[2]), .free(gq_free), .rd_en(q_rd[2]), .rd_data(q_data[2]),
    .avail(gq_avail)
  );

  record_queue #(.DEPTH(EQ_DEPTH)) u_q_edge (
    .clk, .rst_n, .wr_en(qw_en[3]), .wr_data(qw_data[3]), .wr_commit(qw_cm[3]),
    .wr_abort(qw_ab[3]), .free(eq_free), .rd_en(q_rd[3]), .rd_data(q_data[3]),
    .avail(eq_avail)
  );

  assign q_avail[0] = AV_W'(dq_avail);
  assign q_avail[1] = AV_W'(cq_avail);
  assign q_avail[2] = AV_W'(gq_avail);
  assign q_avail[3] = AV_W'(eq_avail);

  // ---------------- local bus and DPRAM ----------------
  logic            lb_we;
  word_t           lb_data;
  logic [DF_W-1:0] dp_free;

  bus_arbiter #(.N_Q(N_Q), .AV_W(AV_W), .DF_W(DF_W)) u_arbiter (
    .clk, .rst_n, .q_avail, .q_data, .q_rd, .lb_we, .lb_data, .dp_free, .grant
  );

  dpram_fifo #(.DEPTH(DP_DEPTH), .W(WORD_W)) u_dpram (
    .w_clk(clk), .w_rst_n(rst_n), .w_en(lb_we), .w_data(lb_data), .w_free(dp_free),
    .h_clk, .h_rst_n, .h_rd, .h_rdata, .h_level, .threshold, .irq
  );

  // ---------------- replay: the reverse data path ----------------
  localparam int unsigned RL_W = $clog2(RP_DEPTH) + 1;
  logic            rp_rd;
  word_t           rp_rdata;
  logic [RL_W-1:0] rp_level;

  // Written by the host on its clock, read by the replay unit on the
  // sample clock; the threshold interrupt is not used in this direction.
  dpram_fifo #(.DEPTH(RP_DEPTH), .W(WORD_W)) u_replay_fifo (
    .w_clk(h_clk), .w_rst_n(h_rst_n), .w_en(h_wr), .w_data(h_wdata), .w_free(h_wfree),
    .h_clk(clk), .h_rst_n(rst_n), .h_rd(rp_rd), .h_rdata(rp_rdata), .h_level(rp_level),
    .threshold('0), .irq()
  );

  replay_unit #(.LV_W(RL_W)) u_replay (
    .clk, .rst_n, .run(rp_run && (!rp_on_trig || fired)), .ts, .offset(rp_offset),
    .src_level(rp_level), .src_rd(rp_rd), .src_rdata(rp_rdata),
    .tx_start(pe_tx_start), .tx_len(pe_tx_len), .tx_info(pe_tx_info),
    .tx_valid(pe_tx_valid), .tx_data(pe_tx_data), .tx_ready(pe_tx_ready),
    .late(rp_late), .replayed(rp_replayed), .busy(rp_busy)
  );

endmodule
