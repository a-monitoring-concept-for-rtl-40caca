// tb_replay_unit: checks that recorded frames are replayed at their
// timestamp plus the offset (tx_start exactly one cycle after the time
// base reaches that time), with their length, info and payload, that sync
// records are skipped, and that a record whose time has passed goes out at
// once and is counted as late. The record FIFO is modelled in the
// testbench with the same one-cycle read latency as the DPRAM FIFO.
module tb_replay_unit;
  import mon_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic run = 1'b0;
  ts_t  ts = '0;
  ts_t  offset = '0;
  logic [12:0] src_level;
  logic src_rd;
  word_t src_rdata = '0;
  logic tx_start, tx_valid, busy;
  logic [7:0] tx_len;
  logic [15:0] tx_info, late, replayed;
  word_t tx_data;
  logic tx_ready = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  always @(posedge clk) ts <= ts + 32'd1;

  replay_unit #(.LV_W(13)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  word_t fifo[$];
  assign src_level = 13'(fifo.size());
  always @(posedge clk) if (src_rd) begin
    src_rdata <= fifo[0];
    void'(fifo.pop_front());
  end

  // expected frames
  longint exp_t[$];
  int     exp_len[$], exp_info[$];
  int     n_started = 0;

  function automatic word_t pay(int info, int i);
    return {16'(info), 16'(i)} ^ 32'h0F0F_0000;
  endfunction

  task automatic put_frame(ts_t t, int len, int info);
    fifo.push_back({ID_DATA_FRAME, 8'(len + 2), 16'(info)});
    fifo.push_back(t);
    for (int i = 0; i < len; i++) fifo.push_back(pay(info, i));
  endtask

  // transmit side: random ready, check every frame
  int cur = -1, word_i = 0;
  always @(negedge clk) tx_ready = ($urandom_range(0, 2) != 0);
  always @(posedge clk) if (rst_n) begin
    if (tx_start) begin
      check(n_started < exp_t.size(), "expected frame");
      if (n_started < exp_t.size()) begin
        check(longint'(ts) == exp_t[n_started],
              $sformatf("frame %0d released at %0d expected %0d", n_started, ts, exp_t[n_started]));
        check(int'(tx_len) == exp_len[n_started] && int'(tx_info) == exp_info[n_started], "length and info");
      end
      cur = n_started;
      word_i = 0;
      n_started++;
    end
    if (tx_valid && tx_ready) begin
      check(tx_data == pay(exp_info[cur], word_i), "payload word");
      word_i++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // records recorded at 1000, 1400, 1410 (sync record in between), 2000
    put_frame(32'd1000, 3, 11);
    fifo.push_back({ID_CLUSTER_SYNC, 8'd3, 16'h0});
    fifo.push_back(32'd1200);
    fifo.push_back(32'h1234_5678);
    put_frame(32'd1400, 1, 12);
    put_frame(32'd1410, 0, 13);
    put_frame(32'd2000, 5, 14);
    offset = 32'd500;
    exp_t   = '{1501, 1901, 1911, 2501};
    exp_len = '{3, 1, 0, 5};
    exp_info = '{11, 12, 13, 14};
    @(negedge clk);
    run = 1'b1;
    wait (ts == 32'd2600);
    check(n_started == 4, $sformatf("four frames replayed, saw %0d", n_started));
    check(replayed == 4, "replayed counter");
    check(late == 0, "none late");
    check(fifo.size() == 0, "sync record consumed");
    // a late record: its time has passed; goes out at once
    @(negedge clk);
    exp_t.push_back(ts + 5);
    exp_len.push_back(2);
    exp_info.push_back(15);
    put_frame(32'd100, 2, 15);
    repeat (30) @(negedge clk);
    check(n_started == 5 && late == 1, "late record sent at once and counted");
    // run low: nothing starts
    run = 1'b0;
    put_frame(ts + 32'd10 - 32'd500, 1, 16);
    repeat (100) @(negedge clk);
    check(n_started == 5 && fifo.size() == 3, "stopped while run is low");
    fifo.delete();
    // wrap-around: the time base is about to wrap and the frame is due just
    // after the wrap; an unsigned comparison would release it at once
    @(negedge clk);
    ts = 32'hFFFF_FF00;
    offset = 32'd0;
    put_frame(32'h0000_0010, 1, 17);
    exp_t.push_back(64'h11);
    exp_len.push_back(1);
    exp_info.push_back(17);
    run = 1'b1;
    repeat (200) @(negedge clk);
    check(n_started == 5, "not released before the wrap");
    repeat (200) @(negedge clk);
    check(n_started == 6 && late == 1, "released after the wrap, not late");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
