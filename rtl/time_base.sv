// time_base: the monitor's global time base.
//
// A free-running binary counter clocked by the sample clock Cs, so one
// count is one sample period 1/Cs and every over-sampled bit on the bus
// gets its own timestamp. With TS_W = 32 bits and Cs = 80 MHz (8 samples
// per bit at 10 Mbit/s) the count wraps every 2^32/Cs = 53.7 s.
//
// The counter has no load input: nothing can make it jump, so the time
// scale never has a discontinuity and recorded events always stay in
// their true order. A one-cycle 'wrap' pulse marks the cycle in which the
// count is zero again after a wrap-around, for host software that extends
// the time stamps. Counting starts after reset when 'run' is high.
//
// Timing: 'ts' is a register output; it advances one step per cycle.
// The time base width and clock follow the design's timing figures; the
// 'run' input and the wrap pulse are this design's own additions.
module time_base #(
  parameter int unsigned TS_W = mon_pkg::TS_W
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            run,
  output logic [TS_W-1:0] ts,
  output logic            wrap
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ts   <= '0;
      wrap <= 1'b0;
    end else if (run) begin
      ts   <= ts + 1'b1;
      wrap <= &ts;
    end else begin
      wrap <= 1'b0;
    end
  end

endmodule
