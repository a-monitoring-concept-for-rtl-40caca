// record_queue: one dedicated queue of the monitor.
//
// Each kind of record (data frames, cluster sync, global sync) has its own
// queue, because the events are produced in parallel. The queue is a
// synchronous FIFO of 32-bit words with record granularity: the writer
// appends the words of one record and then commits them, and only committed
// words are visible to the reader. The bus arbiter therefore never sees a
// half-written record and can copy a record in one burst. An abort drops
// the uncommitted words of a record that the source gave up on.
//
// Interface: write side 'wr_en'/'wr_data', 'wr_commit' (commits everything
// written so far, including a word written in the same cycle) and
// 'wr_abort'; 'free' is the number of free words. Read side: 'rd_data' is
// the oldest committed word (first-word fall-through), 'avail' the number
// of committed words, 'rd_en' pops one. DEPTH must be a power of two.
// Queues between the sources and the local bus follow the design; the
// commit mechanism and the depth are this design's own choice.
module record_queue #(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned W     = 32
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   wr_en,
  input  logic [W-1:0]           wr_data,
  input  logic                   wr_commit,
  input  logic                   wr_abort,
  output logic [$clog2(DEPTH):0] free,
  input  logic                   rd_en,
  output logic [W-1:0]           rd_data,
  output logic [$clog2(DEPTH):0] avail
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wr_ptr, cm_ptr, rd_ptr;
  logic [AW:0]  wr_ptr_nxt;

  assign free    = (AW+1)'(DEPTH) - (wr_ptr - rd_ptr);
  assign avail   = cm_ptr - rd_ptr;
  assign rd_data = mem[rd_ptr[AW-1:0]];
  assign wr_ptr_nxt = wr_ptr + (AW+1)'(wr_en);

  always_ff @(posedge clk) begin
    if (wr_en && !wr_abort) mem[wr_ptr[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      cm_ptr <= '0;
      rd_ptr <= '0;
    end else begin
      if (wr_abort) begin
        wr_ptr <= cm_ptr;
      end else begin
        wr_ptr <= wr_ptr_nxt;
        if (wr_commit) cm_ptr <= wr_ptr_nxt;
      end
      if (rd_en) rd_ptr <= rd_ptr + 1'b1;
    end
  end

  // The writer checks 'free' before it starts a record; the reader only
  // pops committed words.
  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n)
                                   wr_en |-> free != '0);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
                                   rd_en |-> avail != '0);

endmodule
