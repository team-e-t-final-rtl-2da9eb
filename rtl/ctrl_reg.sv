// ctrl_reg: the console's hidden control register.
//
// A 4-bit latch written from the data bus on every TIA write (`tia_we`)
// until its lock bit is set; after that it ignores writes until reset.
//   bit 0 lock     - once 1, the register no longer changes
//   bit 1 maria_en - Maria drives video and the 7800 RAM/memory map is on
//   bit 2 cart_en  - 1: cartridge answers reads at 0x8000-0xFFFF,
//                    0: the BIOS ROM does
//   bit 3 tia_en   - TIA drives video and the controllers are held in
//                    one-button mode
// maria_en and tia_en may not both be 1: a write that would set both is
// ignored (this design's choice; the rule itself is the register's). Reset
// clears all four bits, so the console starts in the BIOS with the 2600 map.
// Timing: the write takes effect at the clock edge on which `tia_we` is high.
module ctrl_reg (
  input  logic       clk,
  input  logic       rst,
  input  logic       tia_we,
  input  logic [3:0] wdata,
  output logic       lock,
  output logic       maria_en,
  output logic       cart_en,
  output logic       tia_en
);

  always_ff @(posedge clk) begin
    if (rst) begin
      {tia_en, cart_en, maria_en, lock} <= 4'b0000;
    end else if (tia_we && !lock && !(wdata[1] && wdata[3])) begin
      {tia_en, cart_en, maria_en, lock} <= wdata;
    end
  end

  a_exclusive: assert property (@(posedge clk) disable iff (rst) !(maria_en && tia_en));

endmodule
