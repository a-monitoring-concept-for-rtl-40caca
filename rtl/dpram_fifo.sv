// dpram_fifo: the dual-ported RAM between the monitor and the host CPU,
// organised as a FIFO.
//
// Port A is written by the bus arbiter over the local bus in the sample
// clock domain; port B is read by the host processor in its own clock
// domain. Read and write pointers cross the clock boundary as Gray codes
// through two-flop synchronisers, so each side sees a safe, possibly
// slightly old, view of the other: the writer's free count is never too
// high and the reader's fill level never too high.
//
// When the fill level seen by the host reaches 'threshold', 'irq' is
// raised; the host's interrupt routine reads words with 'h_rd' until
// 'h_level' is zero, and 'irq' falls once the level is below the
// threshold again.
//
// Interface: write side 'w_en'/'w_data' and 'w_free'; host side 'h_rd'
// (pop one word), 'h_rdata' (valid in the cycle after 'h_rd', a synchronous
// RAM read), 'h_level', 'threshold' and 'irq'. DEPTH must be a power of two.
// Depth default: 16384 words of 32 bits (64 KiB), the size of the
// dual-port RAM of the Excalibur EPXA4 device; the design calls the memory
// only "large". A DPRAM used as a FIFO with a threshold interrupt follows
// the design; the clocking scheme and host port are this design's own choice.
module dpram_fifo #(
  parameter int unsigned DEPTH = 16384,
  parameter int unsigned W     = 32
) (
  input  logic                   w_clk,
  input  logic                   w_rst_n,
  input  logic                   w_en,
  input  logic [W-1:0]           w_data,
  output logic [$clog2(DEPTH):0] w_free,
  input  logic                   h_clk,
  input  logic                   h_rst_n,
  input  logic                   h_rd,
  output logic [W-1:0]           h_rdata,
  output logic [$clog2(DEPTH):0] h_level,
  input  logic [$clog2(DEPTH):0] threshold,
  output logic                   irq
);

  localparam int unsigned AW = $clog2(DEPTH);
  typedef logic [AW:0] ptr_t;

  function automatic ptr_t bin2gray(ptr_t b);
    return b ^ (b >> 1);
  endfunction

  function automatic ptr_t gray2bin(ptr_t g);
    ptr_t b;
    b[AW] = g[AW];
    for (int i = AW - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  logic [W-1:0] mem [DEPTH];

  ptr_t w_ptr, w_ptr_gray, r_ptr_gray_s1, r_ptr_gray_s2;
  ptr_t r_ptr, r_ptr_gray, w_ptr_gray_s1, w_ptr_gray_s2;

  // ---------------- write side ----------------
  always_ff @(posedge w_clk) begin
    if (w_en) mem[w_ptr[AW-1:0]] <= w_data;
  end

  always_ff @(posedge w_clk or negedge w_rst_n) begin
    if (!w_rst_n) begin
      w_ptr         <= '0;
      w_ptr_gray    <= '0;
      r_ptr_gray_s1 <= '0;
      r_ptr_gray_s2 <= '0;
    end else begin
      r_ptr_gray_s1 <= r_ptr_gray;
      r_ptr_gray_s2 <= r_ptr_gray_s1;
      if (w_en) begin
        w_ptr      <= w_ptr + 1'b1;
        w_ptr_gray <= bin2gray(w_ptr + 1'b1);
      end
    end
  end

  assign w_free = ptr_t'(DEPTH) - (w_ptr - gray2bin(r_ptr_gray_s2));

  // ---------------- host side ----------------
  always_ff @(posedge h_clk) begin
    if (h_rd) h_rdata <= mem[r_ptr[AW-1:0]];
  end

  always_ff @(posedge h_clk or negedge h_rst_n) begin
    if (!h_rst_n) begin
      r_ptr         <= '0;
      r_ptr_gray    <= '0;
      w_ptr_gray_s1 <= '0;
      w_ptr_gray_s2 <= '0;
      irq           <= 1'b0;
    end else begin
      w_ptr_gray_s1 <= w_ptr_gray;
      w_ptr_gray_s2 <= w_ptr_gray_s1;
      if (h_rd) begin
        r_ptr      <= r_ptr + 1'b1;
        r_ptr_gray <= bin2gray(r_ptr + 1'b1);
      end
      irq <= (threshold != '0) && (h_level >= threshold);
    end
  end

  assign h_level = gray2bin(w_ptr_gray_s2) - r_ptr;

  a_no_overflow:  assert property (@(posedge w_clk) disable iff (!w_rst_n)
                                   w_en |-> w_free != '0);
  a_no_underflow: assert property (@(posedge h_clk) disable iff (!h_rst_n)
                                   h_rd |-> h_level != '0);

endmodule
