// tb_line_edge_src: checks bit-level edge events.
// Single, well separated edges on either line must give exactly one event
// each, two to three clocks after the edge, carrying the new line state
// and no merge count. Edges that arrive while the encapsulator is busy must
// wait, and further changes during the wait must be merged and counted.
module tb_line_edge_src;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [1:0] line_in = '0;
  logic enc_busy = 1'b0;
  logic [1:0] line_sync;
  logic ev_start;
  logic [15:0] ev_info, merged;
  int checks = 0, failures = 0;

  always #6.25 clk = ~clk;

  line_edge_src #(.N_LINES(2)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int events = 0;
  logic [15:0] last_info;
  always @(posedge clk) if (ev_start) begin
    events++;
    last_info = ev_info;
  end

  initial begin
    realtime t_edge;
    int e0;
    #30;
    rst_n = 1'b1;
    // 1: separated edges, encapsulator idle
    for (int n = 0; n < 100; n++) begin
      #($urandom_range(150, 600) + 0.3);
      e0 = events;
      line_in[$urandom_range(0, 1)] ^= 1'b1;
      t_edge = $realtime;
      wait (events == e0 + 1 || $realtime - t_edge > 100);
      check(events == e0 + 1, "one event per edge");
      check($realtime - t_edge >= 12.5 && $realtime - t_edge <= 3 * 12.5 + 6.3,
            $sformatf("edge reported after %0.1f ns", $realtime - t_edge));
      check(last_info[1:0] == line_in && last_info[15:8] == 0, "new line state, nothing merged");
    end
    check(merged == 0, "no merges on a clean bus");
    // 2: encapsulator busy: the event waits, further changes are merged
    @(negedge clk);
    enc_busy = 1'b1;
    e0 = events;
    line_in[0] ^= 1'b1;
    repeat (6) @(negedge clk);
    line_in[1] ^= 1'b1;
    repeat (6) @(negedge clk);
    line_in[0] ^= 1'b1;
    repeat (6) @(negedge clk);
    check(events == e0, "no event while the encapsulator is busy");
    enc_busy = 1'b0;
    @(negedge clk);
    check(events == e0 + 1, "waiting event issued once idle");
    check(last_info[1:0] == line_in, "reports the latest state");
    check(last_info[15:8] == 2, $sformatf("two changes merged, info says %0d", last_info[15:8]));
    check(merged == 2, "merge counter");
    repeat (10) @(negedge clk);
    check(events == e0 + 1, "no further event");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
