// tb_full_speed_load: both FlexRay channels at full speed, at the default
// sizes of monitor_top, for four communication cycles of 1 ms, with the
// frame, cluster sync and line edge queues selected.
//
// Each channel receives frames back to back, as fast as the bus allows at
// 10 Mbit/s. A frame of n 32-bit words occupies the wire for about
// 19 + 40 n bit times: 10 bits per byte with its start sequence, plus
// transmission start, frame start, frame end and idle delimiter. At eight
// sample clocks per bit, the shortest frame (2 words: header and CRC) takes
// 792 clocks and the largest (66 words) 21272. Half of the frames are the
// shortest, which gives the highest record rate. The rest have random
// lengths.
//
// Half of the slots carry the same frame on both channels, so both end in
// the same clock. The protocol engine model buffers each received frame and hands it over
// as a burst on the single frame stream once the frame has ended. A frame
// of the other channel that ends meanwhile waits for the burst. A cluster
// sync strobe comes every 80000 clocks (1 ms cycle). The host answers the
// threshold interrupt after an interrupt latency of 10 us and then reads
// one word per 50 MHz host clock until the DPRAM FIFO is empty. At the
// same time both bus lines carry random bit-level traffic (a change at
// half of the bit boundaries), recorded as line edges.
//
// Checked:
// - every frame, cluster sync event and line edge is recorded, in order,
//   with no edge merged;
// - timestamps, lengths and payloads are right;
// - nothing is dropped;
// - a frame waits at most 70 clocks for its hand-over to start.
// The frame timing model, the burst hand-over and the host's behaviour are
// assumptions of this test. The 10 Mbit/s rate, eight samples per bit and
// the monitoring of both channels at full speed come from the monitor's
// requirements.
module tb_full_speed_load;
  import mon_pkg::*;

  localparam int RUN_CYCLES = 320_000;   // 4 ms at 80 MHz

  logic clk = 1'b0, h_clk = 1'b0;
  logic rst_n = 1'b0, h_rst_n = 1'b0;
  logic tb_run = 1'b0;
  trig_cfg_t trig_cfg;
  logic [3:0] q_sel = 4'b1011;           // data frames, cluster sync, line edges
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
      if (failures < 4000) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #6_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t payload(int ch, int fr, int i);
    return {1'(ch), 15'(fr), 16'(i * 13 + 5)};
  endfunction

  // bus time of a frame of n words, in sample clocks
  function automatic int wire_clocks(int n);
    return 8 * (19 + 40 * n);
  endfunction

  // ---------------- channels: frames received back to back -------------
  // A frame that has ended waits in 'pend' for the hand-over.
  int     pend_ch[$], pend_fr[$], pend_len[$];
  longint pend_end[$];
  bit     gen_on = 1'b0;
  int     n_sent[2] = '{0, 0};
  int     n_short = 0, n_long = 0;

  // One slot after another. In half of the slots both channels carry a
  // frame of the same length (redundant transmission), so both frames end
  // in the same clock. Otherwise each channel picks its own length and the
  // slot lasts as long as the longer frame.
  initial begin
    int len[2];
    int dur;
    wait (gen_on);
    while (gen_on) begin
      for (int c = 0; c < 2; c++)
        len[c] = ($urandom_range(0, 1) == 0) ? 2 : $urandom_range(2, 66);
      if ($urandom_range(0, 1) == 0) len[1] = len[0];
      dur = wire_clocks(len[0] > len[1] ? len[0] : len[1]);
      for (int c = 0; c < 2; c++) begin
        if (len[c] == 2) n_short++;
        if (len[c] == 66) n_long++;
      end
      for (int k = 1; k <= dur; k++) begin
        @(negedge clk);
        for (int c = 0; c < 2; c++)
          if (k == wire_clocks(len[c])) begin
            pend_ch.push_back(c);
            pend_fr.push_back(n_sent[c]++);
            pend_len.push_back(len[c]);
            pend_end.push_back(ts);
          end
      end
    end
  end

  // ---------------- protocol engine: hand-over on the frame stream -------
  int     exp_ch[$], exp_fr[$], exp_len[$];
  longint exp_ts[$];
  int     max_wait = 0;
  initial begin
    int ch, fr, len;
    longint t_end;
    forever begin
      @(negedge clk);
      if (pend_ch.size() != 0) begin
        ch = pend_ch.pop_front();
        fr = pend_fr.pop_front();
        len = pend_len.pop_front();
        t_end = pend_end.pop_front();
        pe_fr_start = 1'b1;
        pe_fr_len   = 8'(len);
        pe_fr_info  = {1'(ch), 15'(fr)};
        if (int'(longint'(ts) - t_end) > max_wait) max_wait = int'(longint'(ts) - t_end);
        check(longint'(ts) - t_end <= 70,
              $sformatf("hand-over of a frame waited %0d clocks", longint'(ts) - t_end));
        exp_ch.push_back(ch);
        exp_fr.push_back(fr);
        exp_len.push_back(len);
        exp_ts.push_back(ts);
        @(negedge clk);
        pe_fr_start = 1'b0;
        for (int i = 0; i < len; i++) begin
          pe_fr_valid = 1'b1;
          pe_fr_data  = payload(ch, fr, i);
          #1;
          while (!pe_fr_ready) begin @(negedge clk); #1; end
          @(negedge clk);
          pe_fr_valid = 1'b0;
        end
      end
    end
  end

  // ---------------- protocol engine: cluster sync once per cycle ---------
  longint cs_ts[$];
  initial begin
    int k = 0;
    wait (gen_on);
    while (gen_on) begin
      repeat (80_000) @(negedge clk);
      pe_csync = 1'b1;
      pe_ctime = 32'h2000_0000 + 32'(k++);
      cs_ts.push_back(ts);
      @(negedge clk);
      pe_csync = 1'b0;
    end
  end

  // ---------------- bus lines: bit-level traffic on both channels ------
  // Each line may change at every bit boundary (every 8 clocks); it does so
  // with probability 1/2, about the edge density of coded FlexRay traffic.
  // The two channels' bit cells are 3 clocks apart.
  logic [1:0] edge_at[longint];    // time base at a change -> lines after it
  int         n_edges = 0;
  for (genvar c = 0; c < 2; c++) begin : g_line
    initial begin
      wait (gen_on);
      repeat (1 + 3 * c) @(negedge clk);
      while (gen_on) begin
        if ($urandom_range(0, 1) == 1) begin
          rxd[c] = ~rxd[c];
          edge_at[ts] = rxd;
          n_edges++;
        end
        repeat (8) @(negedge clk);
      end
    end
  end

  // ---------------- host: interrupt latency, then read until empty ------
  bit    in_isr = 1'b0;
  bit    rd_prev = 1'b0;
  int    isr_delay = 0;
  word_t rec[$];
  int    got_fr = 0, got_cs = 0, got_edge = 0, edge_merged_sum = 0;
  longint last_edge_t = -1;
  int    max_level = 0;
  int    irq_count = 0;

  task automatic take_record();
    rec_hdr_t h = rec_hdr_t'(rec[0]);
    longint t = rec[1];
    case (h.id)
      ID_DATA_FRAME: begin
        check(got_fr < exp_ch.size(), "frame record expected");
        if (got_fr < exp_ch.size()) begin
          int ch = exp_ch[got_fr], fr = exp_fr[got_fr], len = exp_len[got_fr];
          check(h.info == {1'(ch), 15'(fr)},
                $sformatf("frame order: got %h, expected ch %0d frame %0d", h.info, ch, fr));
          check(t == exp_ts[got_fr], $sformatf("frame timestamp %0d expected %0d", t, exp_ts[got_fr]));
          check(int'(h.len) == len + 2, "frame record length");
          for (int i = 0; i < len && i + 2 < rec.size(); i++)
            check(rec[i+2] == payload(ch, fr, i), $sformatf("frame payload ch %0d fr %0d len %0d word %0d: %h expected %h", ch, fr, len, i, rec[i+2], payload(ch, fr, i)));
        end
        got_fr++;
      end
      ID_CLUSTER_SYNC: begin
        check(got_cs < cs_ts.size() && t == cs_ts[got_cs] && h.len == 3 &&
              rec[2] == 32'h2000_0000 + 32'(got_cs),
              $sformatf("cluster sync record %0d", got_cs));
        got_cs++;
      end
      ID_LINE_EDGE: begin
        // reported 2 to 3 clocks after the change, with the lines' new state
        bit found = 1'b0;
        for (longint d = 2; d <= 3; d++)
          if (edge_at.exists(t - d) && edge_at[t - d] == h.info[1:0]) found = 1'b1;
        check(found && h.len == 2 && t > last_edge_t,
              $sformatf("line edge record ts %0d state %b", t, h.info[1:0]));
        last_edge_t = t;
        edge_merged_sum += int'(h.info[15:8]);
        got_edge++;
      end
      default: check(1'b0, $sformatf("unexpected record id %h", h.id));
    endcase
  endtask

  always @(negedge h_clk) if (h_rst_n) begin
    if (int'(h_level) > max_level) max_level = h_level;
    if (rd_prev) begin
      rec.push_back(h_rdata);
      if (rec.size() >= 2 && rec.size() == int'(rec[0][23:16])) begin
        take_record();
        rec.delete();
      end
    end
    if (!in_isr && irq) begin
      if (isr_delay == 0) irq_count++;
      if (isr_delay == 500) begin   // 10 us at 50 MHz
        in_isr = 1'b1;
        isr_delay = 0;
      end else isr_delay++;
    end
    if (in_isr && h_level == 0 && !h_rd) in_isr = 1'b0;
    h_rd = in_isr && (h_level != 0) && !(h_level == 1 && h_rd);
    rd_prev = h_rd;
  end

  initial begin
    for (int i = 0; i < N_COND; i++) trig_cfg.cond[i] = '{kind: COND_OFF, sel: '0, mask: '0, refv: '0, lo: '0, hi: '0};
    for (int j = 0; j < N_TERM; j++) trig_cfg.term[j] = '0;
    for (int k = 0; k < N_STAGE; k++) trig_cfg.stage[k] = '0;
    trig_cfg.use_seq    = 1'b0;
    trig_cfg.last_stage = '0;
    trig_cfg.pos        = TRIG_PRE;   // record from arming on
    trig_cfg.post_len   = '0;

    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    h_rst_n = 1'b1;
    tb_run = 1'b1;
    @(negedge clk);
    arm = 1'b1;
    @(negedge clk);
    gen_on = 1'b1;
    repeat (RUN_CYCLES) @(negedge clk);
    gen_on = 1'b0;
    // let the last hand-overs finish, then drain with a low threshold
    wait (pend_ch.size() == 0);
    repeat (200) @(negedge clk);
    threshold = 15'd1;
    repeat (20_000) @(negedge clk);

    check(got_fr == exp_ch.size(),
          $sformatf("frame records %0d of %0d handed over", got_fr, exp_ch.size()));
    check(got_cs == cs_ts.size(),
          $sformatf("cluster sync records %0d of %0d", got_cs, cs_ts.size()));
    check(dropped[0] == 0 && dropped[1] == 0 && dropped[3] == 0,
          $sformatf("dropped %0d/%0d/%0d", dropped[0], dropped[1], dropped[3]));
    check(got_edge == n_edges && edges_merged == 0,
          $sformatf("line edge records %0d of %0d edges, %0d merged", got_edge, n_edges, edges_merged));
    check(n_short > 0 && n_long > 0, "shortest and largest frames occurred");
    check(max_wait > 0, "a hand-over had to wait for the other channel");
    check(irq_count > 0, "threshold interrupt used");
    check(got_cs >= 3, "cluster sync events occurred");
    $display("load: frames A=%0d B=%0d (shortest %0d, largest %0d), cluster sync %0d, line edges %0d, max hand-over wait %0d clocks, max DPRAM level %0d, interrupts %0d",
             n_sent[0], n_sent[1], n_short, n_long, got_cs, got_edge, max_wait, max_level, irq_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
