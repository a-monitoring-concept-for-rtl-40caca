// tb_time_base: checks the time base counter.
// A full-width instance (32 bits) must advance exactly one count per sample
// clock while running and hold while stopped. A narrow 8-bit instance must
// wrap every 2^8 cycles with a single wrap pulse, which is the wrap-around
// period 2^b / Cs counted in clock cycles.
module tb_time_base;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic run = 1'b0;
  logic [31:0] ts;
  logic        wrap;
  logic [7:0]  ts8;
  logic        wrap8;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  time_base #(.TS_W(32)) dut   (.clk, .rst_n, .run, .ts,       .wrap);
  time_base #(.TS_W(8))  dut8  (.clk, .rst_n, .run, .ts(ts8),  .wrap(wrap8));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned expect_ts;
    int          wraps;
    int          last_wrap;
    repeat (3) @(posedge clk);
    check(ts == 0, "reset value");
    rst_n = 1'b1;
    @(negedge clk);
    run = 1'b1;
    expect_ts = 0;
    wraps = 0;
    last_wrap = -1;
    for (int c = 0; c < 600; c++) begin
      @(posedge clk);
      #1;
      expect_ts++;
      check(ts == expect_ts, $sformatf("ts=%0d expected %0d", ts, expect_ts));
      check(ts8 == 8'(expect_ts), "8-bit ts");
      if (wrap8) begin
        check(ts8 == 8'd0, "wrap pulse with count zero");
        if (last_wrap >= 0) check(c - last_wrap == 256, $sformatf("wrap period %0d", c - last_wrap));
        last_wrap = c;
        wraps++;
      end
    end
    check(wraps == 2, $sformatf("two wraps in 600 cycles, saw %0d", wraps));
    // stop: the count must hold
    @(negedge clk);
    run = 1'b0;
    expect_ts = ts;
    repeat (10) @(posedge clk);
    #1;
    check(ts == expect_ts, "holds while stopped");
    check(!wrap8, "no wrap while stopped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
