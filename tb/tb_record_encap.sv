// tb_record_encap: checks record building, trigger gating, the drop on a
// full queue and the abort of a record.
// The testbench plays the event source and watches the queue write port.
// Expected records are built independently: header {id, len+2, info},
// the timestamp of the start cycle, then the payload in order, committed
// with the last word. Header and timestamp must leave in the start cycle
// and the cycle after it.
module tb_record_encap;
  import mon_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en = 1'b0;
  ts_t  ts = '0;
  logic ev_start = 1'b0, ev_valid = 1'b0, ev_abort = 1'b0, ev_ready;
  logic [7:0] ev_len = '0;
  logic [15:0] ev_info = '0;
  word_t ev_data = '0;
  logic q_wr_en, q_wr_commit, q_wr_abort;
  word_t q_wr_data;
  logic [7:0] q_free = 8'd128;
  logic [15:0] dropped;
  logic busy;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  always @(posedge clk) ts <= ts + 32'd1;

  record_encap #(.REC_ID(8'h5A), .QF_W(8)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // observed queue writes
  word_t seen[$];
  int    commits = 0, aborts = 0;
  int    start_cycle_write = 0;
  always @(posedge clk) if (rst_n) begin
    if (q_wr_abort) begin aborts++; seen.delete(); end
    else if (q_wr_en) seen.push_back(q_wr_data);
    if (q_wr_commit && !q_wr_abort) commits++;
  end

  // Send one event; returns the timestamp of its start cycle.
  task automatic send(int len, logic [15:0] info, int abort_after, output ts_t t0,
                      output word_t pay[$]);
    pay.delete();
    @(negedge clk);
    ev_start = 1'b1;
    ev_len   = 8'(len);
    ev_info  = info;
    t0       = ts;
    @(negedge clk);
    ev_start = 1'b0;
    for (int i = 0; i < len; i++) begin
      if (i == abort_after) begin
        ev_abort = 1'b1;
        @(negedge clk);
        ev_abort = 1'b0;
        return;
      end
      ev_valid = 1'b1;
      ev_data  = $urandom;
      pay.push_back(ev_data);
      do @(posedge clk); while (!ev_ready);
      @(negedge clk);
      ev_valid = 1'b0;
      if ($urandom_range(0, 1) == 1) @(negedge clk);
    end
    repeat (2) @(negedge clk);
  endtask

  initial begin
    ts_t t0;
    word_t pay[$];
    int c0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // 1: records with the trigger enabled, various lengths
    en = 1'b1;
    for (int n = 0; n < 20; n++) begin
      int len = (n == 0) ? 0 : $urandom_range(1, 40);
      seen.delete();
      c0 = commits;
      send(len, 16'(n * 3 + 1), -1, t0, pay);
      check(seen.size() == len + 2, $sformatf("record size %0d expected %0d", seen.size(), len + 2));
      if (seen.size() == len + 2) begin
        check(seen[0] == {8'h5A, 8'(len + 2), 16'(n * 3 + 1)}, $sformatf("header %h", seen[0]));
        check(seen[1] == t0, $sformatf("timestamp %0d expected %0d", seen[1], t0));
        for (int i = 0; i < len; i++) check(seen[i+2] == pay[i], "payload word");
      end
      check(commits == c0 + 1, "one commit per record");
    end

    // 2: header in the start cycle, timestamp one cycle later
    @(negedge clk);
    ev_start = 1'b1; ev_len = 8'd1; ev_info = 16'h0;
    #1;
    check(q_wr_en && q_wr_data[31:24] == 8'h5A, "header written in start cycle");
    @(negedge clk);
    ev_start = 1'b0;
    #1;
    check(q_wr_en && !ev_ready, "timestamp cycle, source held off");
    @(negedge clk);
    ev_valid = 1'b1; ev_data = 32'hCAFE_0001;
    #1;
    check(ev_ready && q_wr_en && q_wr_commit, "payload accepted and committed");
    @(negedge clk);
    ev_valid = 1'b0;
    repeat (2) @(negedge clk);

    // 3: trigger low: nothing written, source not stalled, nothing dropped
    en = 1'b0;
    seen.delete();
    send(5, 16'h1, -1, t0, pay);
    check(seen.size() == 0, "no write without trigger");
    check(dropped == 0, "not counted as drop");
    check(!busy, "back to idle");

    // 4: trigger high but the queue has no room
    en = 1'b1;
    q_free = 8'd6;
    send(5, 16'h2, -1, t0, pay);   // needs 7 words
    check(seen.size() == 0, "no write when the record does not fit");
    check(dropped == 1, $sformatf("drop counted (%0d)", dropped));
    send(4, 16'h3, -1, t0, pay);   // needs 6 words: fits exactly
    check(seen.size() == 6, "record that just fits is written");
    q_free = 8'd128;

    // 5: abort in the middle of the payload
    c0 = commits;
    seen.delete();
    send(10, 16'h4, 3, t0, pay);
    check(aborts == 1, "abort reaches the queue");
    check(commits == c0, "aborted record not committed");
    check(!busy, "idle after abort");
    // a following record is fine
    send(2, 16'h5, -1, t0, pay);
    check(seen.size() == 4 && seen[1] == t0, "record after abort");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
