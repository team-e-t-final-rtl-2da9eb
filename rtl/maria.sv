// maria: the Maria graphics chip, built from its four parts plus the clock
// enables it supplies to the system.
//
//   maria_timing - places the DMAs on the raster, halts the CPU, NMI, RDY
//   memory_map   - address decode, Maria registers, colour map
//   maria_dma    - zone-list / display-list DMA engine
//   line_ram     - input and playback line buffers
//   clock_gen    - TIA / CPU / memory clock enables
//
// While `halt` is high the Maria owns the address bus (`bus_addr` is the DMA
// address) and the CPU cannot write; otherwise the CPU's address and write
// go to the bus. The read bus `bus_rdata` comes back from the system's
// buffered-select multiplexer. DMA runs only with `maria_en` (control
// register) and CONTROL.DM = 2'b10.
// Video: on the VGA clock, `vga_col` (640 wide, halved to 320) reads the
// playback line RAM; the colour map turns the {palette, color} index into
// the colour byte `uv`, two VGA clocks after the column.
// The split into four parts follows the Maria description; the clock-enable
// scheme is this design's own.
// Lint notes: vga_col[0] is unused because a line RAM cell spans two
// 640-wide columns; CONTROL bits CK (colour kill) and BCNTL (border
// control) are stored but have no effect in this design; the
// timing block's column counter is left unconnected here (it is an
// observation port used by its own test).
module maria
  import a78_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        vga_clk,
  input  logic [9:0]  vga_row,
  input  logic [9:0]  vga_col,
  input  logic [15:0] cpu_addr,
  input  logic [7:0]  cpu_wdata,
  input  logic        cpu_we,
  input  logic        maria_en,
  input  logic        cart_en,
  input  logic [7:0]  bus_rdata,
  output logic [15:0] bus_addr,
  output logic        bus_we,
  output dev_e        dev,
  output logic [7:0]  maria_rdata,
  output logic        halt,
  output logic        nmi,
  output logic        ready,
  output logic        tia_ce,
  output logic        cpu_ce,
  output logic        mem_ce,
  output logic [7:0]  uv,
  // activity, for observation
  output logic        zp_dma_start,
  output logic        dp_dma_start,
  output logic        dp_dma_kill,
  output logic        lram_swap
);

  logic        slow, wsync, zp_written, vblank, enable;
  logic [15:0] zp, dma_addr;
  logic [7:0]  charbase, lr_data;
  maria_ctrl_t ctrl;
  logic        last_line, zp_dma_done, dp_dma_done, dli, dma_busy;
  logic        input_w, palette_w, wm_w, pixels_w;
  logic [4:0]  rd_index;
  logic [8:0]  col_cnt;

  assign enable   = maria_en && (ctrl.dm == 2'b10);
  assign bus_addr = halt ? dma_addr : cpu_addr;
  assign bus_we   = cpu_we && !halt;

  clock_gen u_clk (
    .clk, .rst, .slow, .halt, .tia_ce, .cpu_ce, .mem_ce
  );

  memory_map u_map (
    .clk, .rst, .ce(mem_ce), .addr(bus_addr), .wdata(cpu_wdata), .we(bus_we),
    .maria_en, .cart_en, .vblank, .dev, .slow, .rdata(maria_rdata), .wsync,
    .zp, .zp_written, .charbase, .ctrl, .cm_index(rd_index), .cm_uv(uv)
  );

  maria_timing u_tim (
    .clk, .rst, .enable, .zp_written, .wsync, .vga_row,
    .zp_dma_done, .dp_dma_done, .dli,
    .halt, .zp_dma_start, .dp_dma_start, .dp_dma_kill, .last_line,
    .lram_swap, .nmi, .ready, .vblank, .col_cnt
  );

  maria_dma u_dma (
    .clk, .rst, .zp_dma_start, .dp_dma_start, .dp_dma_kill, .last_line,
    .zp_base(zp), .charbase, .cwidth(ctrl.cwidth),
    .addr(dma_addr), .rdata(bus_rdata), .busy(dma_busy),
    .lr_data, .input_w, .palette_w, .wm_w, .pixels_w,
    .zp_dma_done, .dp_dma_done, .dli
  );

  line_ram u_lram (
    .clk, .rst, .data(lr_data), .input_w, .palette_w, .wm_w, .pixels_w,
    .swap(lram_swap), .rclk(vga_clk), .rcol(vga_col[9:1]), .rm(ctrl.rm), .km(ctrl.km),
    .rd_index
  );

  // The DMA engine only runs while the CPU is halted.
  a_dma_halted: assert property (@(posedge clk) disable iff (rst) dma_busy |-> halt);

endmodule
