// tb_record_queue: checks the record queue against a software model.
// Random records of random length are written, committed or aborted, while
// the reader pops at random. Checks: committed words only become visible at
// the commit, aborted words never appear, data comes out in order, and
// 'free'/'avail' match the model at every cycle.
module tb_record_queue;
  localparam int DEPTH = 16;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic wr_en = 1'b0, wr_commit = 1'b0, wr_abort = 1'b0, rd_en = 1'b0;
  logic [31:0] wr_data = '0, rd_data;
  logic [4:0] free, avail;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  record_queue #(.DEPTH(DEPTH)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model
  logic [31:0] committed[$];
  logic [31:0] pending[$];
  int          total_pushed = 0;
  int          aborts = 0;

  initial begin
    int rec_len;
    int written;
    bit do_abort;
    logic [31:0] v;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      rec_len  = 1 + $urandom_range(0, 5);
      do_abort = ($urandom_range(0, 5) == 0);
      written  = 0;
      // wait for room as a real writer would
      while (int'(free) < rec_len) begin
        @(negedge clk);
        // reader side works in the same loop
      end
      while (written < rec_len) begin
        @(negedge clk);
        wr_en = 1'b1;
        wr_data = $urandom;
        written++;
        wr_commit = (written == rec_len) && !do_abort;
        wr_abort  = 1'b0;
        @(posedge clk);
        pending.push_back(wr_data);
        #1;
        wr_en = 1'b0;
        wr_commit = 1'b0;
      end
      if (do_abort) begin
        @(negedge clk);
        wr_abort = 1'b1;
        @(posedge clk);
        #1;
        wr_abort = 1'b0;
        pending.delete();
        aborts++;
      end else begin
        foreach (pending[i]) committed.push_back(pending[i]);
        pending.delete();
      end
    end
    repeat (200) @(posedge clk);
    check(committed.size() == 0, $sformatf("drained, %0d left", committed.size()));
    check(aborts > 0, "aborts happened");
    check(total_pushed > 1000, $sformatf("enough words %0d", total_pushed));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // random reader and per-cycle model comparison
  always @(negedge clk) begin
    if (rst_n) begin
      check(int'(avail) == committed.size(),
            $sformatf("avail %0d model %0d", avail, committed.size()));
      check(int'(free) == DEPTH - committed.size() - pending.size(),
            $sformatf("free %0d model %0d", free, DEPTH - committed.size() - pending.size()));
      rd_en = (avail != 0) && ($urandom_range(0, 2) != 0);
      if (rd_en) begin
        check(rd_data == committed[0], $sformatf("data %h model %h", rd_data, committed[0]));
        void'(committed.pop_front());
        total_pushed++;
      end
    end
  end
endmodule
