// tb_monitor_top: end-to-end test of the monitor at its default sizes.
//
// The testbench plays the protocol engine (received frames, cluster sync
// strobes with the cluster time, status lines), the bus drivers' receive
// lines (random single edges), a GPS receiver (1-pps) and
// the host CPU (it empties the DPRAM FIFO whenever the interrupt is raised,
// and parses the records). It keeps its own log of every event with the
// time base value of its start cycle and works out, from the recording
// windows it expects, which records must arrive.
//
// Three acquisitions are made:
//   A  fast trigger (rising edge of a status line), post-trigger window of
//      3000 cycles; a frame starts in the very cycle of the trigger event;
//   B  sequence trigger (a cluster sync strobe, then a data word matching
//      DEAD----h twice), pre-trigger mode: recorded from arming on, closed
//      2000 cycles after the trigger, which comes one cycle after the event;
//   C  time trigger, open window; the host stops reading so the DPRAM fills
//      (the arbiter has to wait), the data queue fills and records are
//      dropped; one frame is aborted. Then the host drains everything.
//   D  replay: the host writes five of the frame records of A back into the
//      replay FIFO; replay waits for a time trigger, then every frame must
//      leave towards the protocol engine at its recorded time plus the
//      offset (one clock of fixed latency), with its original payload.
// Every mechanism is counted and a failure is counted for any that never
// happened.
module tb_monitor_top;
  import mon_pkg::*;

  localparam int DP_DEPTH = 16384;

  logic clk = 1'b0, h_clk = 1'b0;
  logic rst_n = 1'b0, h_rst_n = 1'b0;
  logic tb_run = 1'b0;
  trig_cfg_t trig_cfg;
  logic [3:0] q_sel = 4'b1111;
  logic arm = 1'b0;
  logic [14:0] threshold = 15'd64;
  logic pe_fr_start = 1'b0, pe_fr_valid = 1'b0, pe_fr_abort = 1'b0, pe_fr_ready;
  logic [7:0] pe_fr_len = '0;
  logic [15:0] pe_fr_info = '0;
  word_t pe_fr_data = '0;
  logic pe_csync = 1'b0;
  word_t pe_ctime = '0;
  logic [2:0] pe_status = '0;
  logic [1:0] rxd = '0;
  logic gps_pps = 1'b0;
  logic h_rd = 1'b0;
  word_t h_rdata;
  logic [14:0] h_level;
  logic irq;
  ts_t ts, trig_ts;
  logic ts_wrap, trig, armed, done, recording;
  logic [3:0] enc_busy, grant;
  logic [15:0] dropped [4];
  logic [15:0] edges_merged;
  logic h_wr = 1'b0;
  word_t h_wdata = '0;
  logic [12:0] h_wfree;
  logic rp_run = 1'b0, rp_on_trig = 1'b0;
  ts_t rp_offset = '0;
  logic pe_tx_start, pe_tx_valid, rp_busy;
  logic [7:0] pe_tx_len;
  logic [15:0] pe_tx_info, rp_late, rp_replayed;
  word_t pe_tx_data;
  logic pe_tx_ready = 1'b1;

  int checks = 0, failures = 0;

  always #6.25 clk = ~clk;     // 80 MHz sample clock
  always #10   h_clk = ~h_clk; // 50 MHz host clock

  monitor_top dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 40) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #3_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- recording windows expected by the testbench ----------
  longint win_lo[$], win_hi[$];
  function automatic bit in_win(longint t);
    foreach (win_lo[i]) if (t >= win_lo[i] && t <= win_hi[i]) return 1'b1;
    return 1'b0;
  endfunction

  // ---------------- event logs ----------------
  longint fr_ts[int];         // frame number -> start timestamp
  int     fr_len[int];
  bit     fr_aborted[int];
  int     n_frames = 0;
  longint cs_ts[$];           // cluster sync strobes
  longint pps_ts[$];          // GPS edges (time base at the edge)
  longint marker_ts[$];       // times at which DEAD words were accepted

  function automatic word_t payload(int fr, int i);
    return {16'(fr), 16'(i * 7 + 3)};
  endfunction

  // time base check: one count per clock
  longint last_ts = -1;
  always @(negedge clk) if (tb_run && rst_n) begin
    if (last_ts >= 0) check(ts == ts_t'(last_ts + 1), "time base advances one count per cycle");
    last_ts = ts;
  end

  // ---------------- protocol engine: frames ----------------
  // 'marker' frames carry a DEAD----h word first.
  task automatic send_frame(int len, bit marker, int abort_at);
    int fr = n_frames++;
    @(negedge clk);
    pe_fr_start = 1'b1;
    pe_fr_len   = 8'(len);
    pe_fr_info  = 16'(fr);
    fr_ts[fr]   = ts;
    fr_len[fr]  = len;
    fr_aborted[fr] = 1'b0;
    @(negedge clk);
    pe_fr_start = 1'b0;
    for (int i = 0; i < len; i++) begin
      if (i == abort_at) begin
        pe_fr_abort = 1'b1;
        fr_aborted[fr] = 1'b1;
        @(negedge clk);
        pe_fr_abort = 1'b0;
        return;
      end
      pe_fr_valid = 1'b1;
      pe_fr_data  = (marker && i == 0) ? 32'hDEAD_0000 | 32'(fr) : payload(fr, i);
      #1;
      while (!pe_fr_ready) begin @(negedge clk); #1; end
      if (marker && i == 0) marker_ts.push_back(ts);
      @(negedge clk);
      pe_fr_valid = 1'b0;
    end
  endtask

  // frame start in the same cycle as a status edge (trigger event)
  longint same_cycle_ts = -1;
  task automatic send_frame_with_trigger(int len);
    int fr = n_frames++;
    @(negedge clk);
    pe_status[0] = 1'b1;
    pe_fr_start  = 1'b1;
    pe_fr_len    = 8'(len);
    pe_fr_info   = 16'(fr);
    fr_ts[fr]    = ts;
    fr_len[fr]   = len;
    fr_aborted[fr] = 1'b0;
    same_cycle_ts = ts;
    @(negedge clk);
    pe_fr_start = 1'b0;
    for (int i = 0; i < len; i++) begin
      pe_fr_valid = 1'b1;
      pe_fr_data  = payload(fr, i);
      #1;
      while (!pe_fr_ready) begin @(negedge clk); #1; end
      @(negedge clk);
      pe_fr_valid = 1'b0;
    end
  endtask

  // ---------------- protocol engine: cluster sync every 700 cycles -------
  bit bg_on = 1'b0;
  initial begin
    int k = 0;
    wait (bg_on);
    forever begin
      repeat (700) @(negedge clk);
      pe_csync = 1'b1;
      pe_ctime = 32'h1000_0000 + 32'(k++);
      cs_ts.push_back(ts);
      @(negedge clk);
      pe_csync = 1'b0;
    end
  end

  // ---------------- GPS: 1-pps, sped up to one pulse per 37 us ----------
  initial begin
    wait (bg_on);
    forever begin
      #(37_000.3);
      gps_pps = 1'b1;
      pps_ts.push_back(ts);
      #(5_000);
      gps_pps = 1'b0;
    end
  end

  // ---------------- bus driver receive lines: random single edges -------
  longint edge_ts[$];
  logic [1:0] edge_state[$];
  initial begin
    wait (bg_on);
    forever begin
      #($urandom_range(200, 2000) + 0.7);
      rxd[$urandom_range(0, 1)] ^= 1'b1;
      edge_ts.push_back(ts);
      edge_state.push_back(rxd);
    end
  end

  // ---------------- host ----------------
  bit    host_on = 1'b1;
  bit    in_isr  = 1'b0;
  bit    rd_prev = 1'b0;
  word_t rec[$];
  int    irq_rises = 0;
  bit    irq_q = 1'b0;
  int    max_level = 0;
  int    n_rec[4] = '{0, 0, 0, 0};
  int    got_edges = 0;
  int    got_frames[$];           // frame numbers in arrival order
  int    got_cs = 0, got_pps = 0;
  int    pre_records = 0;
  int    same_cycle_rec = 0;
  longint b_trig_ts = -1;
  word_t  keep_a[$];              // raw words of the first records of A
  longint keep_a_ts[$];
  int     keep_a_fr[$];

  // replay observation: transmit side towards the protocol engine
  longint tx_ts[$];
  int     tx_fr[$];
  int     tx_cur = -1, tx_word = 0;
  always @(posedge clk) if (rst_n) begin
    if (pe_tx_start) begin
      tx_ts.push_back(ts);
      tx_fr.push_back(pe_tx_info);
      tx_cur  = pe_tx_info;
      tx_word = 0;
      check(fr_len.exists(tx_cur) && int'(pe_tx_len) == fr_len[tx_cur], "replayed length");
    end
    if (pe_tx_valid && pe_tx_ready) begin
      check(pe_tx_data == payload(tx_cur, tx_word), "replayed payload");
      tx_word++;
    end
  end

  task automatic take_record();
    rec_hdr_t h = rec_hdr_t'(rec[0]);
    longint t = rec[1];
    check(in_win(t), $sformatf("record id %0d at ts %0d lies in a recording window", h.id, t));
    case (h.id)
      ID_DATA_FRAME: begin
        int fr = h.info;
        n_rec[0]++;
        check(fr_ts.exists(fr), "known frame");
        if (fr_ts.exists(fr)) begin
          check(!fr_aborted[fr], "aborted frame never recorded");
          check(t == fr_ts[fr], $sformatf("frame %0d timestamp %0d expected %0d", fr, t, fr_ts[fr]));
          check(int'(h.len) == fr_len[fr] + 2, "frame record length");
          for (int i = 0; i < fr_len[fr] && i + 2 < rec.size(); i++)
            if (i > 0 || rec[2][31:16] != 16'hDEAD)
              check(rec[i+2] == payload(fr, i), "frame payload");
          got_frames.push_back(fr);
          if (keep_a_ts.size() < 5 && t > same_cycle_ts && t <= win_hi[0] && fr_len[fr] > 0) begin
            foreach (rec[i]) keep_a.push_back(rec[i]);
            keep_a_ts.push_back(t);
            keep_a_fr.push_back(fr);
          end
          if (t == same_cycle_ts) same_cycle_rec++;
        end
      end
      ID_CLUSTER_SYNC: begin
        int found = 0;
        n_rec[1]++;
        got_cs++;
        foreach (cs_ts[i]) if (cs_ts[i] == t && rec[2] == 32'h1000_0000 + 32'(i)) found = 1;
        check(h.len == 3 && found == 1, $sformatf("cluster sync record ts %0d time %h", t, rec[2]));
      end
      ID_GLOBAL_SYNC: begin
        int n = int'(rec[2]);
        n_rec[2]++;
        got_pps++;
        check(h.len == 3 && n >= 1 && n <= pps_ts.size(), "pps count");
        if (n >= 1 && n <= pps_ts.size())
          check(t - pps_ts[n-1] >= 2 && t - pps_ts[n-1] <= 4,
                $sformatf("pps record %0d cycles after the edge", t - pps_ts[n-1]));
      end
      ID_LINE_EDGE: begin
        int found = 0;
        n_rec[3]++;
        got_edges++;
        foreach (edge_ts[i])
          if (t - edge_ts[i] >= 2 && t - edge_ts[i] <= 3 && h.info[1:0] == edge_state[i]) found = 1;
        check(h.len == 2 && h.info[15:8] == 0 && found == 1,
              $sformatf("line edge record ts %0d state %b", t, h.info[1:0]));
      end
      default: check(1'b0, $sformatf("unknown record id %h", h.id));
    endcase
  endtask

  always @(negedge h_clk) if (h_rst_n) begin
    if (irq && !irq_q) irq_rises++;
    irq_q = irq;
    if (int'(h_level) > max_level) max_level = h_level;
    if (rd_prev) begin
      rec.push_back(h_rdata);
      if (rec.size() >= 2 && rec.size() == int'(rec[0][23:16])) begin
        take_record();
        rec.delete();
      end
    end
    if (host_on && irq) in_isr = 1'b1;
    if (in_isr && h_level == 0 && !h_rd) in_isr = 1'b0;
    h_rd = in_isr && host_on && (h_level != 0) && !(h_level == 1 && h_rd);
    rd_prev = h_rd;
  end

  // ---------------- configuration helpers ----------------
  task automatic clear_cfg();
    for (int i = 0; i < N_COND; i++) trig_cfg.cond[i] = '{kind: COND_OFF, sel: '0, mask: '0, refv: '0, lo: '0, hi: '0};
    for (int j = 0; j < N_TERM; j++) trig_cfg.term[j] = '0;
    for (int k = 0; k < N_STAGE; k++) trig_cfg.stage[k] = '0;
    trig_cfg.use_seq    = 1'b0;
    trig_cfg.last_stage = '0;
    trig_cfg.pos        = TRIG_POST;
    trig_cfg.post_len   = '0;
  endtask

  task automatic drain();
    // let queues and DPRAM empty: host reads, sources idle
    threshold = 15'd1;
    repeat (4000) @(negedge clk);
    threshold = 15'd64;
  endtask

  // ---------------- the three acquisitions ----------------
  int mech_fast = 0, mech_seq = 0, mech_close = 0, mech_backpressure = 0, mech_abort = 0;
  int frames_c_lo, frames_c_hi;
  int drop0_before;

  initial begin
    longint ta, td;
    clear_cfg();
    #40;
    rst_n = 1'b1;
    h_rst_n = 1'b1;
    @(negedge clk);
    tb_run = 1'b1;
    bg_on  = 1'b1;

    // ---- A: fast trigger, post-trigger window
    trig_cfg.cond[0] = '{kind: COND_RISE, sel: 3'd5, mask: '0, refv: '0, lo: '0, hi: '0};  // pe_status[0]
    trig_cfg.term[0] = '{use_c: 4'b0001, neg_c: '0};
    trig_cfg.post_len = 32'd3000;
    @(negedge clk); arm = 1'b1;
    repeat (5) begin send_frame(10, 0, -1); repeat (200) @(negedge clk); end
    win_lo.push_back(ts + 1);        // the trigger cycle follows
    win_hi.push_back(ts + 1 + 3000 - 1);
    send_frame_with_trigger(6);
    check(trig_ts == ts_t'(same_cycle_ts), "fast trigger timestamp is the event cycle");
    if (trig_ts == ts_t'(same_cycle_ts)) mech_fast++;
    repeat (8) begin send_frame($urandom_range(1, 64), 0, -1); repeat (150) @(negedge clk); end
    wait (done);
    mech_close++;
    repeat (5) begin send_frame(8, 0, -1); repeat (100) @(negedge clk); end
    pe_status[0] = 1'b0;
    @(negedge clk); arm = 1'b0;
    drain();

    // ---- B: sequence trigger, pre-trigger mode
    clear_cfg();
    trig_cfg.cond[0] = '{kind: COND_STATE, sel: '0, mask: 32'h2, refv: 32'h2, lo: '0, hi: '0};
    trig_cfg.cond[1] = '{kind: COND_EQ, sel: '0, mask: 32'hFFFF_0000, refv: 32'hDEAD_0000, lo: '0, hi: '0};
    trig_cfg.term[0] = '{use_c: 4'b0001, neg_c: '0};
    trig_cfg.term[1] = '{use_c: 4'b0010, neg_c: '0};
    trig_cfg.use_seq = 1'b1;
    trig_cfg.last_stage = 2'd1;
    trig_cfg.stage[0] = '{term: 1'b0, count: 16'd1};
    trig_cfg.stage[1] = '{term: 1'b1, count: 16'd2};
    trig_cfg.pos = TRIG_PRE;
    trig_cfg.post_len = 32'd2000;
    @(negedge clk);
    arm = 1'b1;
    ta = ts;
    win_lo.push_back(ta + 1);
    win_hi.push_back(64'h7FFF_FFFF_FFFF);  // closed once the trigger is known
    repeat (4) begin send_frame($urandom_range(1, 30), 0, -1); repeat (300) @(negedge clk); end
    // marker frames: the trigger is due one cycle after the second DEAD
    // word that follows the first cluster sync strobe after arming
    repeat (3) begin send_frame(4, 1, -1); repeat (400) @(negedge clk); end
    wait (done || trig);
    @(negedge clk);
    begin
      longint c_first = -1;
      int     k = 0;
      longint expect_t = -1;
      foreach (cs_ts[i]) if (c_first < 0 && cs_ts[i] > ta) c_first = cs_ts[i];
      foreach (marker_ts[i]) if (marker_ts[i] > c_first && c_first >= 0) begin
        k++;
        if (k == 2) expect_t = marker_ts[i] + 1;
      end
      win_hi[1] = trig_ts + 2000 - 1;
      b_trig_ts = trig_ts;
      check(trig_ts == ts_t'(expect_t),
            $sformatf("sequence trigger %0d, expected one cycle after the event: %0d", trig_ts, expect_t));
      if (trig_ts == ts_t'(expect_t)) mech_seq++;
    end
    repeat (6) begin send_frame($urandom_range(1, 30), 0, -1); repeat (200) @(negedge clk); end
    wait (done);
    mech_close++;
    repeat (3) begin send_frame(5, 0, -1); repeat (100) @(negedge clk); end
    @(negedge clk); arm = 1'b0;
    drain();

    // ---- C: time trigger, open window, host stalls
    clear_cfg();
    trig_cfg.cond[2] = '{kind: COND_TIME, sel: '0, mask: '0, refv: '0, lo: '0, hi: '0};
    trig_cfg.cond[2].refv = ts + 32'd50;
    trig_cfg.term[1] = '{use_c: 4'b0100, neg_c: '0};
    trig_cfg.post_len = '0;
    win_lo.push_back(ts + 50);
    win_hi.push_back(64'h7FFF_FFFF_FFFF);
    drop0_before = dropped[0];
    @(negedge clk); arm = 1'b1;
    repeat (60) @(negedge clk);
    host_on = 1'b0;
    frames_c_lo = n_frames;
    for (int n = 0; n < 300; n++) begin
      send_frame(60, 0, (n == 40) ? 17 : -1);
      repeat (20) @(negedge clk);
      if (n == 40) mech_abort++;
      if (int'(h_level) >= DP_DEPTH - 62) mech_backpressure++;
    end
    frames_c_hi = n_frames;
    repeat (200) @(negedge clk);
    check(h_level > DP_DEPTH - 62, $sformatf("DPRAM filled up (%0d words)", h_level));
    host_on = 1'b1;
    repeat (60000) @(negedge clk);
    td = ts;
    @(negedge clk); arm = 1'b0;
    win_hi[2] = td;
    drain();

    // ---- D: replay of five records of A, started by a trigger
    begin
      int     nrec;
      longint t_trig;
      longint off;
      nrec = keep_a_ts.size();
      check(nrec == 5, $sformatf("five records of A kept, %0d", nrec));
      clear_cfg();
      t_trig = ts + 3000;
      trig_cfg.cond[2] = '{kind: COND_TIME, sel: '0, mask: '0, refv: 32'(t_trig), lo: '0, hi: '0};
      trig_cfg.term[0] = '{use_c: 4'b0100, neg_c: '0};
      trig_cfg.post_len = 32'd1;
      q_sel = 4'b0000;                     // nothing recorded meanwhile
      off = t_trig + 1000 - keep_a_ts[0];
      rp_offset  = ts_t'(off);
      rp_on_trig = 1'b1;
      rp_run     = 1'b1;
      @(negedge clk); arm = 1'b1;
      // host writes the records on its own clock
      foreach (keep_a[i]) begin
        @(negedge h_clk);
        h_wr = 1'b1;
        h_wdata = keep_a[i];
      end
      @(negedge h_clk);
      h_wr = 1'b0;
      wait (ts == ts_t'(t_trig - 10));
      check(tx_ts.size() == 0 && !rp_busy, "replay waits for the trigger");
      wait (ts == ts_t'(keep_a_ts[nrec-1] + off + 2000));
      check(tx_ts.size() == nrec, $sformatf("%0d frames replayed", tx_ts.size()));
      for (int i = 0; i < nrec && i < tx_ts.size(); i++) begin
        check(tx_fr[i] == keep_a_fr[i], "replay order");
        check(tx_ts[i] == keep_a_ts[i] + off + 1,
              $sformatf("frame replayed at %0d, expected %0d", tx_ts[i], keep_a_ts[i] + off + 1));
      end
      check(rp_late == 0 && rp_replayed == 16'(nrec), "replay counters");
      @(negedge clk); arm = 1'b0;
      rp_run = 1'b0;
      q_sel = 4'b1111;
    end

    // ---- final accounting
    begin
      int exp_frames[$];
      int j = 0;
      int sub_ok = 1;
      int exp_cs = 0;
      for (int fr = 0; fr < n_frames; fr++)
        if (in_win(fr_ts[fr]) && !fr_aborted[fr]) exp_frames.push_back(fr);
      // recorded frames: an in-order subsequence of the expected ones
      foreach (got_frames[i]) begin
        while (j < exp_frames.size() && exp_frames[j] != got_frames[i]) j++;
        if (j == exp_frames.size()) sub_ok = 0; else j++;
      end
      check(sub_ok == 1, "recorded frames are in order, each one expected");
      check(got_frames.size() + (dropped[0] - drop0_before) == exp_frames.size(),
            $sformatf("frames recorded %0d + dropped %0d == expected %0d",
                      got_frames.size(), dropped[0] - drop0_before, exp_frames.size()));
      // in A and B nothing may be lost
      foreach (exp_frames[i]) if (exp_frames[i] < frames_c_lo) begin
        int seen = 0;
        foreach (got_frames[k]) if (got_frames[k] == exp_frames[i]) seen = 1;
        check(seen == 1, $sformatf("frame %0d of acquisitions A/B recorded", exp_frames[i]));
      end
      foreach (cs_ts[i]) if (in_win(cs_ts[i])) exp_cs++;
      foreach (got_frames[i])
        if (fr_ts[got_frames[i]] >= win_lo[1] && fr_ts[got_frames[i]] < b_trig_ts) pre_records++;
      check(got_cs + dropped[1] == exp_cs,
            $sformatf("cluster sync recorded %0d + dropped %0d == %0d", got_cs, dropped[1], exp_cs));
      check(h_level == 0 && rec.size() == 0, "host emptied the FIFO at record boundaries");
      begin
        int lo_n = 0, hi_n = 0;
        foreach (edge_ts[i]) begin
          if (in_win(edge_ts[i] + 2) && in_win(edge_ts[i] + 3)) lo_n++;
          if (in_win(edge_ts[i] + 2) || in_win(edge_ts[i] + 3)) hi_n++;
        end
        check(got_edges + dropped[3] >= lo_n && got_edges + dropped[3] <= hi_n,
              $sformatf("line edges recorded %0d + dropped %0d within [%0d, %0d]", got_edges, dropped[3], lo_n, hi_n));
        check(edges_merged == 0, "no merged edges on a clean bus");
      end
    end

    // ---- mechanisms
    check(mech_fast > 0, "fast trigger");
    check(same_cycle_rec == 1, "frame starting in the trigger cycle recorded");
    check(mech_seq > 0, "sequence trigger");
    check(pre_records > 0, $sformatf("pre-trigger records %0d", pre_records));
    check(mech_close == 2, "post-trigger windows closed");
    check(mech_abort > 0, "frame abort");
    check(mech_backpressure > 0, "arbiter held back by a full DPRAM");
    check(dropped[0] - drop0_before > 0, "records dropped on a full queue");
    check(irq_rises > 3, $sformatf("threshold interrupts %0d", irq_rises));
    check(tx_ts.size() == 5, "replay");
    check(n_rec[0] > 0 && n_rec[1] > 0 && n_rec[2] > 0 && n_rec[3] > 0,
          $sformatf("records of all four queues: %0d %0d %0d %0d", n_rec[0], n_rec[1], n_rec[2], n_rec[3]));
    $display("mechanisms: fast=%0d seq=%0d same_cycle=%0d pre=%0d closed=%0d abort=%0d backpressure=%0d drops=%0d irq=%0d rec=%0d/%0d/%0d/%0d max_level=%0d",
             mech_fast, mech_seq, same_cycle_rec, pre_records, mech_close, mech_abort,
             mech_backpressure, dropped[0] - drop0_before, irq_rises, n_rec[0], n_rec[1], n_rec[2], n_rec[3], max_level);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
