// atari7800: Atari 7800 console core, everything between the CPU, the TIA
// video/input core, the RIOT, the BIOS ROM and the cartridge.
//
// Blocks: the Maria (graphics, memory map, DMA, clock enables), the hidden
// control register, RAM0 and RAM1 (2 KB each), the buffered-select read bus,
// the VGA raster generator, the 2600-mode frame buffer, the colour-to-RGB
// converter, the TIA sound system and the controller inputs.
//
// Not inside: the 6502 CPU, the TIA's video and input logic, the RIOT, the
// BIOS ROM and the cartridge. Their bus connections are ports: the CPU
// drives cpu_addr/cpu_wdata/cpu_we and advances one bus cycle per `cpu_ce`,
// reading `cpu_rdata` (the read bus) one cycle after its address, and is
// stopped by `cpu_rdy` low (halt for DMA, or WSYNC). Each outside device
// sees the shared `bus_addr`/`bus_wdata`/`bus_we` and its select
// (`tia_cs`, `riot_cs`, `cart_cs`, `bios_cs`) and returns a registered read
// byte, updated on `mem_ce`. In 2600 mode the TIA's pixels arrive on the
// tia_px_* port and are shown from the frame buffer; in 7800 mode the
// Maria's line RAM is shown. `maria_en` from the control register picks.
//
// Clocks: `clk` is the 7.16 MHz Maria clock for everything on the bus;
// `vga_clk` is the 25.175 MHz VGA pixel clock for the raster, the line RAM
// playback and the frame buffer read.
module atari7800
  import a78_pkg::*;
(
  input  logic        clk,
  input  logic        vga_clk,
  input  logic        rst,
  // CPU
  input  logic [15:0] cpu_addr,
  input  logic [7:0]  cpu_wdata,
  input  logic        cpu_we,
  output logic [7:0]  cpu_rdata,
  output logic        cpu_ce,
  output logic        cpu_rdy,
  output logic        cpu_halt,
  output logic        cpu_nmi,
  // shared bus towards outside devices
  output logic [15:0] bus_addr,
  output logic [7:0]  bus_wdata,
  output logic        bus_we,
  output logic        mem_ce,
  output logic        tia_ce,
  output logic        tia_cs,
  output logic        riot_cs,
  output logic        cart_cs,
  output logic        bios_cs,
  input  logic [7:0]  tia_rdata,
  input  logic [7:0]  riot_rdata,
  input  logic [7:0]  cart_rdata,
  input  logic [7:0]  bios_rdata,
  // TIA pixel stream (2600 mode)
  input  logic        tia_px_we,
  input  logic [7:0]  tia_px_x,
  input  logic [7:0]  tia_px_y,
  input  logic [7:0]  tia_px_uv,
  input  logic        tia_frame_done,
  // controllers
  input  logic [3:0]  joy0_n,
  input  logic [3:0]  joy1_n,
  input  logic [1:0]  btn0,
  input  logic [1:0]  btn1,
  input  logic        one_button_sel,
  output logic [7:0]  swcha,
  output logic [5:0]  inpt,
  // video and audio
  output logic        vga_hsync_n,
  output logic        vga_vsync_n,
  output logic [11:0] vga_rgb,
  output logic signed [15:0] audio,
  // state, for observation (bus_sel: device of the last bus cycle, as the
  // dev_e code; vga_de: VGA active area; audio_bits: channel pattern bits)
  output logic        maria_en,
  output logic        tia_en,
  output logic        cart_en,
  output logic        zp_dma_start,
  output logic        dp_dma_start,
  output logic        dp_dma_kill,
  output logic        lram_swap,
  output logic        audio_tick,
  output logic [1:0]  audio_bits,
  output logic [2:0]  bus_sel,
  output logic        ctrl_lock,
  output logic        vga_de
);

  dev_e       dev, sel_q;
  logic [7:0] maria_rdata, ram0_rdata, ram1_rdata, rdata;
  logic       halt, nmi, ready;
  logic [9:0] vga_row, vga_col;
  logic [7:0] maria_uv, fb_uv, uv;
  logic [11:0] rgb;
  logic        cpu_cycle_we;

  assign bus_wdata = cpu_wdata;
  assign bus_sel   = sel_q;
  assign cpu_rdata = rdata;
  assign cpu_halt  = halt;
  assign cpu_nmi   = nmi;
  assign cpu_rdy   = ready && !halt;
  assign tia_cs    = (dev == DEV_TIA);
  assign riot_cs   = (dev == DEV_RIOT);
  assign cart_cs   = (dev == DEV_CART);
  assign bios_cs   = (dev == DEV_BIOS);
  // A CPU write happens on the enabled edge that ends its bus cycle.
  assign cpu_cycle_we = bus_we && cpu_ce;

  maria u_maria (
    .clk, .rst, .vga_clk, .vga_row, .vga_col,
    .cpu_addr, .cpu_wdata, .cpu_we, .maria_en, .cart_en,
    .bus_rdata(rdata), .bus_addr, .bus_we, .dev, .maria_rdata,
    .halt, .nmi, .ready, .tia_ce, .cpu_ce, .mem_ce, .uv(maria_uv),
    .zp_dma_start, .dp_dma_start, .dp_dma_kill, .lram_swap
  );

  ctrl_reg u_ctrl (
    .clk, .rst, .tia_we(cpu_cycle_we && tia_cs), .wdata(cpu_wdata[3:0]),
    .lock(ctrl_lock), .maria_en, .cart_en, .tia_en
  );

  sram #(.DEPTH(2048)) u_ram0 (
    .clk, .ce(mem_ce), .we(cpu_cycle_we && dev == DEV_RAM0),
    .addr(bus_addr[10:0]), .wdata(cpu_wdata), .rdata(ram0_rdata)
  );

  sram #(.DEPTH(2048)) u_ram1 (
    .clk, .ce(mem_ce), .we(cpu_cycle_we && dev == DEV_RAM1),
    .addr(bus_addr[10:0]), .wdata(cpu_wdata), .rdata(ram1_rdata)
  );

  bus_mux u_bus (
    .clk, .rst, .ce(mem_ce), .dev,
    .tia_rdata, .maria_rdata, .riot_rdata, .ram0_rdata, .ram1_rdata,
    .cart_rdata, .bios_rdata, .sel_q, .rdata
  );

  sound u_sound (
    .clk, .rst, .tia_ce, .we(cpu_cycle_we && tia_cs), .addr(bus_addr[5:0]),
    .wdata(cpu_wdata[4:0]), .tick(audio_tick), .ch_bit(audio_bits), .mix(audio)
  );

  controller_if u_ctl (
    .clk, .rst, .one_button(tia_en || one_button_sel),
    .joy0_n, .joy1_n, .btn0, .btn1, .swcha, .inpt
  );

  frame_buffer_2600 u_fb (
    .wclk(clk), .rst, .we(tia_px_we), .wx(tia_px_x), .wy(tia_px_y),
    .wuv(tia_px_uv), .frame_done(tia_frame_done),
    .rclk(vga_clk), .row(vga_row), .col(vga_col), .uv(fb_uv)
  );

  assign uv = maria_en ? maria_uv : fb_uv;

  uv_to_rgb u_rgb (.clk(vga_clk), .uv, .rgb);

  vga_ctrl u_vga (
    .clk(vga_clk), .rst, .rgb_in(rgb), .row(vga_row), .col(vga_col),
    .active(vga_de), .hsync_n(vga_hsync_n), .vsync_n(vga_vsync_n),
    .rgb(vga_rgb)
  );

endmodule
