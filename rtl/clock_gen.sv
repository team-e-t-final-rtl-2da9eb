// clock_gen: system clock enables derived from the 7.16 MHz Maria clock.
//
// The console runs every block on the Maria clock `clk` and paces the slower
// parts with one-cycle enables instead of divided clocks:
//   tia_ce - every 2nd cycle (3.58 MHz TIA rate)
//   cpu_ce - one CPU cycle ends every 4 cycles (1.79 MHz), or every 6 cycles
//            (1.19 MHz) when the device being accessed is slow (TIA, RIOT)
//   mem_ce - when the memory read bus latches: every cycle while the CPU is
//            halted for Maria DMA (RAM at 7.16 MHz), otherwise with cpu_ce
// The 4/6 choice is made from `slow` in the first cycle of each CPU cycle,
// the cycle after cpu_ce, when the CPU has placed its new address.
// The rates follow the Maria description; using enables rather than gated
// clocks is this design's choice.
module clock_gen (
  input  logic clk,
  input  logic rst,
  input  logic slow,
  input  logic halt,
  output logic tia_ce,
  output logic cpu_ce,
  output logic mem_ce
);

  logic [2:0] cnt_q;
  logic [2:0] last_q;   // count at which the current CPU cycle ends
  logic       tia_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt_q  <= '0;
      last_q <= 3'd3;
      tia_q  <= 1'b0;
    end else begin
      tia_q <= ~tia_q;
      if (cnt_q == 3'd0) last_q <= slow ? 3'd5 : 3'd3;
      if (cnt_q != 3'd0 && cnt_q == last_q) cnt_q <= 3'd0;
      else                                  cnt_q <= cnt_q + 3'd1;
    end
  end

  assign tia_ce = tia_q;
  assign cpu_ce = (cnt_q != 3'd0) && (cnt_q == last_q);
  assign mem_ce = halt | cpu_ce;

endmodule
