// tb_bus_arbiter: checks that the arbiter copies whole records, never
// interleaves queues, keeps each queue's order, serves the queues in turn,
// never overfills the DPRAM and needs L+1 cycles for a record of L words.
// The queues and the DPRAM are modelled in the testbench.
module tb_bus_arbiter;
  import mon_pkg::*;
  localparam int N_Q = 3;
  localparam int DP  = 64;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [7:0] q_avail [N_Q];
  word_t      q_data  [N_Q];
  logic [N_Q-1:0] q_rd;
  logic lb_we;
  word_t lb_data;
  logic [6:0] dp_free;
  logic [N_Q-1:0] grant;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bus_arbiter #(.N_Q(N_Q), .AV_W(8), .DF_W(7)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  word_t q[N_Q][$];      // queue contents
  word_t exp_q[N_Q][$];  // records still expected from each queue, in order
  word_t dp[$];          // DPRAM contents
  int    recs_out = 0;

  always_comb begin
    for (int i = 0; i < N_Q; i++) begin
      q_avail[i] = 8'(q[i].size());
      q_data[i]  = (q[i].size() != 0) ? q[i][0] : '0;
    end
    dp_free = 7'(DP - dp.size());
  end

  // Record word: header {id = queue, len, serial}, then payload tagged.
  task automatic push_record(int qi, int len, int serial);
    word_t w;
    w = {8'(qi), 8'(len), 16'(serial)};
    q[qi].push_back(w);
    exp_q[qi].push_back(w);
    for (int i = 1; i < len; i++) begin
      w = {8'(qi), 8'(i), 16'(serial)};
      q[qi].push_back(w);
      exp_q[qi].push_back(w);
    end
  endtask

  // Checker of the local bus stream: reassemble records.
  int   cur_q = -1, cur_left = 0;
  int   grant_seq[$];
  bit   draining = 1'b0;
  always @(posedge clk) if (rst_n) begin
    check($countones(q_rd) <= 1, "one queue at a time");
    if (lb_we) begin
      int qi;
      qi = $clog2(q_rd);
      check(q_rd != 0 && grant == q_rd, "write comes from the granted queue");
      check(dp.size() < DP, "DPRAM not overfilled");
      if (cur_left == 0) begin
        cur_q    = lb_data[31:24];
        cur_left = lb_data[23:16];
        check(cur_q == qi, "header from the popped queue");
        grant_seq.push_back(cur_q);
        recs_out++;
      end
      check(lb_data[31:24] == cur_q, "no interleaving");
      check(exp_q[qi].size() != 0 && lb_data == exp_q[qi][0], "queue order kept");
      if (exp_q[qi].size() != 0) void'(exp_q[qi].pop_front());
      cur_left--;
      dp.push_back(lb_data);
    end
    for (int i = 0; i < N_Q; i++) if (q_rd[i] && q[i].size() != 0) void'(q[i].pop_front());
    if (draining && dp.size() != 0 && $urandom_range(0, 3) == 0) void'(dp.pop_front());
  end

  initial begin
    int t0, t1;
    int rr_ok;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // 1: timing of a single record of 6 words
    @(negedge clk);
    push_record(1, 6, 0);
    t0 = $time;
    wait (lb_we);
    @(negedge clk);
    while (lb_we) @(negedge clk);
    t1 = $time;
    check((t1 - t0) / 10 == 7, $sformatf("6-word record took %0d cycles, expected 7", (t1 - t0) / 10));
    dp.delete();

    // 2: all queues full of records: round robin 0,1,2,0,1,2...
    @(negedge clk);
    for (int s = 0; s < 4; s++)
      for (int i = 0; i < N_Q; i++) push_record(i, 2 + s, s);
    grant_seq.delete();
    draining = 1'b1;
    repeat (200) @(negedge clk);
    rr_ok = 1;
    // queue 1 was served last in step 1, so queue 2 comes first
    for (int k = 0; k < grant_seq.size(); k++) if (grant_seq[k] != (k + 2) % N_Q) rr_ok = 0;
    check(grant_seq.size() == 12, $sformatf("12 records copied, saw %0d", grant_seq.size()));
    check(rr_ok == 1, "round-robin order");

    // 3: DPRAM nearly full: no record may start unless it fits
    draining = 1'b0;
    dp.delete();
    @(negedge clk);
    repeat (DP - 5) dp.push_back('0);
    push_record(0, 8, 99);
    repeat (30) @(negedge clk);
    check(dp.size() == DP - 5, "record that does not fit waits");
    push_record(2, 4, 98);
    repeat (30) @(negedge clk);
    check(dp.size() == DP - 1, "smaller record from another queue passes");
    draining = 1'b1;
    repeat (300) @(negedge clk);
    check(exp_q[0].size() == 0, "waiting record copied once room is made");

    // 4: random traffic
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      if ($urandom_range(0, 2) == 0) begin
        automatic int qi = $urandom_range(0, N_Q - 1);
        if (q[qi].size() < 200) push_record(qi, $urandom_range(1, 12), n);
      end
    end
    repeat (2000) @(negedge clk);
    for (int i = 0; i < N_Q; i++) check(exp_q[i].size() == 0, "all records delivered");
    check(cur_left == 0, "no record cut short");
    check(recs_out > 100, $sformatf("records copied %0d", recs_out));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
