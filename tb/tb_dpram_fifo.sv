// tb_dpram_fifo: checks the dual-clock DPRAM FIFO.
// A writer on the sample clock and a reader on an unrelated host clock
// move random words through a 32-word FIFO. Checks: words arrive in order
// and none is lost, neither side's view overstates what is really there
// (free space for the writer, fill level for the host), and the interrupt
// rises when the level reaches the threshold and falls when the host has
// emptied the FIFO.
module tb_dpram_fifo;
  localparam int DEPTH = 32;
  logic w_clk = 1'b0, h_clk = 1'b0;
  logic w_rst_n = 1'b0, h_rst_n = 1'b0;
  logic w_en = 1'b0, h_rd = 1'b0;
  logic [31:0] w_data = '0, h_rdata;
  logic [5:0] w_free, h_level;
  logic [5:0] threshold = 6'd20;
  logic irq;
  int checks = 0, failures = 0;

  always #6.25 w_clk = ~w_clk;   // 80 MHz
  always #9.1  h_clk = ~h_clk;   // unrelated host clock

  dpram_fifo #(.DEPTH(DEPTH), .W(32)) dut (.*);

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

  logic [31:0] model[$];
  int written = 0, readn = 0, irq_rises = 0, irq_falls = 0;
  bit write_on = 1'b1;
  bit host_burst = 1'b0;
  bit prev_irq = 1'b0;
  logic [5:0] prev_level = '0;
  bit rd_pending = 1'b0;

  // writer
  int issued = 0;   // reads issued by the host (pointer already advanced)
  always @(posedge w_clk) if (w_rst_n) begin
    check(int'(w_free) <= DEPTH - (written - issued), "writer's free space not overstated");
    if (w_en) begin
      model.push_back(w_data);
      written++;
    end
  end
  always @(negedge w_clk) begin
    w_en   = write_on && (w_free != 0) && ($urandom_range(0, 3) == 0) && w_rst_n;
    w_data = $urandom;
  end

  // host: waits for the interrupt, then empties the FIFO
  always @(posedge h_clk) if (h_rst_n) begin
    check(int'(h_level) <= written - issued, "host's level not overstated");
    if (h_rd) issued++;
    if (rd_pending) begin
      check(h_rdata == model[0], $sformatf("data %h expected %h", h_rdata, model[0]));
      void'(model.pop_front());
      readn++;
    end
    rd_pending = h_rd;
    if (irq && !prev_irq) begin
      irq_rises++;
      check(prev_level >= threshold, "irq only at or above the threshold");
      host_burst = 1'b1;
    end
    if (!irq && prev_irq) irq_falls++;
    prev_irq = irq;
    prev_level = h_level;
  end
  always @(negedge h_clk) begin
    h_rd = host_burst && (h_level != 0) && !h_rd && h_rst_n;
    if (host_burst && h_level == 0 && !h_rd) host_burst = 1'b0;
  end

  initial begin
    #30;
    w_rst_n = 1'b1;
    h_rst_n = 1'b1;
    #100_000;
    check(irq_rises > 10, $sformatf("interrupts %0d", irq_rises));
    check(irq_falls > 10, "interrupt cleared by draining");
    // stop the writer: level below threshold stays without irq
    write_on = 1'b0;
    host_burst = 1'b1;
    #2000;
    check(!irq && h_level == 0, "empty, no interrupt");
    check(model.size() == 0, "every word read");
    check(readn == written && written > 500, $sformatf("read %0d of %0d", readn, written));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
