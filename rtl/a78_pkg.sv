// a78_pkg: types and constants shared by the Atari 7800 system blocks.
//
// Holds the bus-device enumeration used by the memory map and the read-data
// multiplexer, the Maria scanline timing constants, the VGA timing constants
// and a few small decode functions. Constants whose numbers come from the
// Maria/VGA description (452-cycle scanline, DMA start at column 28, kill at
// 436, zone-list DMA at 420, 9-cycle halt lead-in, 6-cycle NMI, 800x525 VGA
// frame with sync at 656-751 / 490-491) are taken as given; the rest are
// marked where they are defined.
package a78_pkg;

  // Device selected by the memory map for the current bus address.
  typedef enum logic [2:0] {
    DEV_NONE  = 3'd0,
    DEV_TIA   = 3'd1,
    DEV_MARIA = 3'd2,
    DEV_RIOT  = 3'd3,
    DEV_RAM0  = 3'd4,
    DEV_RAM1  = 3'd5,
    DEV_CART  = 3'd6,
    DEV_BIOS  = 3'd7
  } dev_e;

  // Maria scanline timing, in 7.16 MHz Maria clock cycles.
  localparam int unsigned LINE_CYCLES   = 452;  // cycles in one scanline
  localparam int unsigned DP_DMA_COL    = 28;   // display-list DMA begins
  localparam int unsigned DP_KILL_COL   = 436;  // display-list DMA is cut off
  localparam int unsigned ZP_DMA_COL    = 420;  // zone-list DMA begins
  localparam int unsigned HALT_LEAD     = 9;    // cycles between halt and DMA start
  localparam int unsigned NMI_CYCLES    = 6;    // NMI pulse length

  // VGA 640x480 timing (in VGA pixel clocks / rows).
  localparam int unsigned VGA_COLS      = 800;
  localparam int unsigned VGA_ROWS      = 525;
  localparam int unsigned VGA_HS_BEGIN  = 656;
  localparam int unsigned VGA_HS_END    = 751;
  localparam int unsigned VGA_VS_BEGIN  = 490;
  localparam int unsigned VGA_VS_END    = 491;
  localparam int unsigned VGA_VIS_COLS  = 640;
  localparam int unsigned VGA_VIS_ROWS  = 480;
  localparam int unsigned VBLANK_ROW    = 512;  // STATRD VBlank bit from this row to 524

  // Maria register addresses (low 6 bits of the address, 0x20..0x3F).
  localparam logic [5:0] REG_BACKGRND = 6'h20;
  localparam logic [5:0] REG_WSYNC    = 6'h24;
  localparam logic [5:0] REG_STATRD   = 6'h28;
  localparam logic [5:0] REG_ZPH      = 6'h2C;
  localparam logic [5:0] REG_ZPL      = 6'h30;
  localparam logic [5:0] REG_CHARBASE = 6'h34;
  localparam logic [5:0] REG_CONTROL  = 6'h3C;

  // Contents of the Maria CONTROL register.
  typedef struct packed {
    logic       ck;       // colour kill (stored, not used)
    logic [1:0] dm;       // display mode, 2'b10 = DMA on
    logic       cwidth;   // indirect mode reads 2 bytes per character
    logic       bcntl;    // border control (stored, not used)
    logic       km;       // kangaroo mode (line RAM two-cell writes)
    logic [1:0] rm;       // line RAM read mode
  } maria_ctrl_t;

  // True for addresses the Maria DMA treats as slow cartridge space
  // (0x4000-0xFFFF, held for four Maria cycles).
  function automatic logic is_cart_space(input logic [15:0] a);
    return a >= 16'h4000;
  endfunction

endpackage
