// bus_mux: the system read data bus with its buffered chip select.
//
// The address, write data and write strobes go to the device the memory map
// selects now (`dev`). The read data bus is driven by the device selected in
// the previous bus cycle: `dev` is latched on `ce` (mem_ce: the CPU cycle
// rate, or every Maria cycle during DMA) and picks one of the device read
// ports, each of which presents the byte for that earlier address. A bus
// cycle that selects no device reads 0xFF.
// This separated read/write bus and the buffered select follow the memory
// description; the value for an unmapped read is this design's choice.
module bus_mux
  import a78_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       ce,
  input  dev_e       dev,
  input  logic [7:0] tia_rdata,
  input  logic [7:0] maria_rdata,
  input  logic [7:0] riot_rdata,
  input  logic [7:0] ram0_rdata,
  input  logic [7:0] ram1_rdata,
  input  logic [7:0] cart_rdata,
  input  logic [7:0] bios_rdata,
  output dev_e       sel_q,
  output logic [7:0] rdata
);

  always_ff @(posedge clk) begin
    if (rst)     sel_q <= DEV_NONE;
    else if (ce) sel_q <= dev;
  end

  always_comb begin
    unique case (sel_q)
      DEV_TIA:   rdata = tia_rdata;
      DEV_MARIA: rdata = maria_rdata;
      DEV_RIOT:  rdata = riot_rdata;
      DEV_RAM0:  rdata = ram0_rdata;
      DEV_RAM1:  rdata = ram1_rdata;
      DEV_CART:  rdata = cart_rdata;
      DEV_BIOS:  rdata = bios_rdata;
      default:   rdata = 8'hFF;
    endcase
  end

endmodule
