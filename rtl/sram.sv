// sram: one of the console's 2 KB work RAMs (RAM0, RAM1).
//
// A DEPTH x 8 array with a synchronous write and a read register: on a
// clock edge with `ce` high the byte at `addr` is written when `we` is set,
// and `rdata` takes the byte stored at `addr` (the old byte on a write).
// The read register matches the buffered chip select of the read bus: data
// for an address appears one enabled cycle later. The 2 KB size is the
// console's; the read register is this design's choice.
module sram #(
  parameter int unsigned DEPTH = 2048,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          ce,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [7:0]    wdata,
  output logic [7:0]    rdata
);

  logic [7:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (ce) begin
      if (we) mem[addr] <= wdata;
      rdata <= mem[addr];
    end
  end

endmodule
