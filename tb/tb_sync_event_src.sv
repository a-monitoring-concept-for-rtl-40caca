// tb_sync_event_src: checks both uses of the sync event source.
// GPS use (ASYNC=1, COUNT=1): each rising edge of a slow asynchronous pulse
// gives exactly one event, two to three clocks after the edge, whose payload
// is the running pulse count; the word is held until accepted.
// Cluster sync use (ASYNC=0, COUNT=0): the strobe starts the event in the
// same cycle and the payload is the data word given with it.
module tb_sync_event_src;
  import mon_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic pps = 1'b0, cs = 1'b0;
  word_t cs_data = '0;
  logic g_pulse, g_start, g_valid, c_pulse, c_start, c_valid;
  logic [7:0] g_len, c_len;
  word_t g_data, c_data;
  logic g_ready = 1'b0, c_ready = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sync_event_src #(.ASYNC(1'b1), .COUNT(1'b1)) dut_g (
    .clk, .rst_n, .evt_in(pps), .evt_data('0), .pulse(g_pulse), .ev_start(g_start),
    .ev_len(g_len), .ev_valid(g_valid), .ev_data(g_data), .ev_ready(g_ready));
  sync_event_src #(.ASYNC(1'b0), .COUNT(1'b0)) dut_c (
    .clk, .rst_n, .evt_in(cs), .evt_data(cs_data), .pulse(c_pulse), .ev_start(c_start),
    .ev_len(c_len), .ev_valid(c_valid), .ev_data(c_data), .ev_ready(c_ready));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #200_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int g_starts = 0;
  always @(posedge clk) if (g_start) g_starts++;

  initial begin
    realtime t_edge;
    int lat;
    #23;
    rst_n = 1'b1;
    for (int n = 1; n <= 8; n++) begin
      #($urandom_range(200, 400) + 0.37);
      pps = 1'b1;
      t_edge = $realtime;
      // wait for the event start
      lat = 0;
      while (!g_start) begin @(negedge clk); lat++; if (lat > 10) break; end
      check(g_start, "pps event started");
      check(($realtime - t_edge) >= 15 && ($realtime - t_edge) <= 35,
            $sformatf("pps latency %0.1f ns", $realtime - t_edge));
      check(g_len == 8'd1, "one-word payload");
      @(negedge clk);
      check(g_valid && g_data == 32'(n), $sformatf("pps count %0d expected %0d", g_data, n));
      repeat ($urandom_range(0, 4)) begin
        @(negedge clk);
        check(g_valid, "payload held until ready");
      end
      g_ready = 1'b1;
      @(negedge clk);
      g_ready = 1'b0;
      check(!g_valid, "payload taken");
      #($urandom_range(100, 300) + 0.61);
      pps = 1'b0;
    end
    #200;
    check(g_starts == 8, $sformatf("one event per pulse, saw %0d", g_starts));

    for (int n = 0; n < 5; n++) begin
      @(negedge clk);
      cs = 1'b1;
      cs_data = $urandom;
      #1;
      check(c_start && c_pulse, "cluster sync starts in the strobe cycle");
      @(negedge clk);
      cs = 1'b0;
      check(c_valid && c_data == cs_data, "cluster time payload");
      c_ready = 1'b1;
      @(negedge clk);
      c_ready = 1'b0;
      check(!c_valid, "cluster payload taken");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
