// tb_atari7800: end-to-end test of the console core at its default size.
//
// The testbench stands in for the parts that sit outside the core: a CPU
// that performs bus reads and writes (honouring cpu_ce and cpu_rdy), a TIA
// that returns a fixed byte and streams a 160x192 picture in 2600 mode, a
// RIOT, a BIOS ROM and a 48 KB cartridge, each answering on mem_ce like the
// real buffered bus. Clocks run at the 7.16 MHz / 25.175 MHz ratio.
//
// Sequence:
//   1. Out of reset the BIOS answers at 0xFFFC. The CPU unlocks the Maria
//      and the cartridge through the control register (a TIA write), fills
//      RAM with a zone list, two display lists and a character index, reads
//      RAM back, sets the palette, CHARBASE, ZP and CONTROL, starts a tone
//      and does a WSYNC. The last zone holds more slow cartridge objects
//      than a line's DMA time allows, so its lines are cut short.
//   2. A whole displayed frame is read back from the VGA pins (position
//      recovered from the sync pulses) and compared with the expected
//      picture; grey-scale colours give known RGB values.
//   3. The CPU switches to 2600 mode and locks the control register; the
//      TIA stream draws a frame into the frame buffer, which is compared on
//      the VGA pins; a later write that tries to leave 2600 mode must be
//      ignored; the 2600 memory map is checked.
// Counted along the way, and each required to happen at least once: zone
// list DMA, display DMA, DMA cut at end of line, line RAM swap, NMI,
// WSYNC stall, DMA halt, slow cartridge access, BIOS and cartridge select,
// mode switch, lock, audio ticks and audio sign changes. Also checked:
// nothing is written while the CPU is halted, no DMA in 2600 mode, and the
// joystick pins reach swcha/inpt.
module tb_atari7800;
  import a78_pkg::*;
  logic clk = 0, vga_clk = 0, rst = 1;
  logic [15:0] cpu_addr = 16'h1800;
  logic [7:0]  cpu_wdata = 0;
  logic        cpu_we = 0;
  logic [7:0]  cpu_rdata;
  logic        cpu_ce, cpu_rdy, cpu_halt, cpu_nmi;
  logic [15:0] bus_addr;
  logic [7:0]  bus_wdata;
  logic        bus_we, mem_ce, tia_ce, tia_cs, riot_cs, cart_cs, bios_cs;
  logic [7:0]  tia_rdata = 0, riot_rdata = 0, cart_rdata = 0, bios_rdata = 0;
  logic        tia_px_we = 0;
  logic [7:0]  tia_px_x = 0, tia_px_y = 0, tia_px_uv = 0;
  logic        tia_frame_done = 0;
  logic [3:0]  joy0_n = 4'hF, joy1_n = 4'hF;
  logic [1:0]  btn0 = 0, btn1 = 0;
  logic        one_button_sel = 0;
  logic [7:0]  swcha;
  logic [5:0]  inpt;
  logic        vga_hsync_n, vga_vsync_n;
  logic [11:0] vga_rgb;
  logic signed [15:0] audio;
  logic        maria_en, tia_en, cart_en;
  logic        zp_dma_start, dp_dma_start, dp_dma_kill, lram_swap, audio_tick;
  logic [1:0]  audio_bits;
  logic [2:0]  bus_sel;
  logic        ctrl_lock, vga_de;
  int checks = 0, failures = 0;

  atari7800 dut (.*);

  always #70 clk = ~clk;
  always #20 vga_clk = ~vga_clk;

  initial begin
    #400000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ---- outside devices ------------------------------------------------
  logic [7:0] cart [65536];
  function automatic logic [7:0] bios_byte(input logic [15:0] a);
    return a[7:0] ^ 8'h3C;
  endfunction
  always @(posedge clk) if (mem_ce) begin
    tia_rdata  <= 8'h5A;
    riot_rdata <= 8'hA5;
    cart_rdata <= cart[bus_addr];
    bios_rdata <= bios_byte(bus_addr);
  end

  // ---- CPU bus cycles ---------------------------------------------------
  task automatic cpu_cycle(input logic [15:0] a, input logic we, input logic [7:0] d,
                           output logic [7:0] q);
    @(negedge clk); cpu_addr = a; cpu_wdata = d; cpu_we = we;
    do @(posedge clk); while (!(cpu_ce && cpu_rdy));
    #1 q = cpu_rdata; cpu_we = 0; cpu_addr = 16'h1800;
  endtask
  task automatic cpu_write(input logic [15:0] a, input logic [7:0] d);
    logic [7:0] q;
    cpu_cycle(a, 1'b1, d, q);
  endtask
  task automatic cpu_read(input logic [15:0] a, output logic [7:0] q);
    cpu_cycle(a, 1'b0, 8'h00, q);
  endtask

  // ---- mechanism counters ---------------------------------------------
  int n_zp = 0, n_dp = 0, n_kill = 0, n_swap = 0, n_nmi = 0, n_wsync = 0;
  int n_halt = 0, n_slow = 0, n_bios = 0, n_cart = 0, n_tick = 0, n_sign = 0;
  int n_switch = 0, n_halt_2600 = 0;
  logic nmi_d = 0, maria_en_d = 0;
  logic signed [15:0] audio_d = 0;
  always @(posedge clk) if (!rst) begin
    nmi_d <= cpu_nmi;
    maria_en_d <= maria_en;
    audio_d <= audio;
    if (zp_dma_start) n_zp++;
    if (dp_dma_start) n_dp++;
    if (dp_dma_kill) n_kill++;
    if (lram_swap) n_swap++;
    if (cpu_nmi && !nmi_d) n_nmi++;
    if (!cpu_rdy && !cpu_halt) n_wsync++;
    if (cpu_halt) n_halt++;
    if (cpu_halt && !maria_en) n_halt_2600++;
    if (cpu_halt && mem_ce && cart_cs) n_slow++;
    if (mem_ce && bios_cs) n_bios++;
    if (mem_ce && cart_cs) n_cart++;
    if (audio_tick) n_tick++;
    if ((audio < 0) != (audio_d < 0)) n_sign++;
    if (maria_en != maria_en_d) n_switch++;
    if (bus_we && cpu_halt) begin failures++; $display("write during halt"); end
  end

  // ---- VGA position from the sync pins ----------------------------------
  int trow = -1, tcol = -1;
  logic hs_d = 1, vs_d = 1;
  always @(negedge vga_clk) begin
    if (tcol >= 0) begin
      if (tcol == 799) begin
        tcol = 0;
        trow = (trow == 524) ? 0 : trow + 1;
      end else tcol++;
    end
    if (!vga_vsync_n && vs_d && trow < 0) begin trow = 490; tcol = 1; end
    if (!vga_hsync_n && hs_d && tcol >= 0) check(tcol == 657, "hsync position");
    if (!vga_vsync_n && vs_d && trow >= 0) check(trow == 490 && tcol == 1, "vsync position");
    hs_d = vga_hsync_n; vs_d = vga_vsync_n;
  end

  // pixel delay from the raster counters to the RGB pins
  localparam int K = 0;

  // ---- picture contents -------------------------------------------------
  localparam logic [7:0] BG = 8'h02;
  function automatic logic [7:0] pcol(input int p, input int c);
    if (p == 1) return 8'h0E;
    return 8'(4 * c + 1);   // palette 0: 05, 09, 0D
  endfunction
  function automatic logic [7:0] byte0(input int o);
    return {2'(o), 2'(o + 1), 2'(o + 2), 2'(o + 3)};
  endfunction
  // expected colour byte at cell x of display line s (1..239)
  function automatic logic [7:0] maria_uv(input int s, input int x);
    int o; logic [1:0] c;
    o = 15 - (s % 16);
    if (x >= 10 && x < 14) begin
      c = byte0(o) >> (2 * (13 - x));
      return (c == 0) ? BG : pcol(0, c);
    end
    if (x >= 14 && x < 18) begin
      c = 8'hE4 >> (2 * (17 - x));
      return (c == 0) ? BG : pcol(0, c);
    end
    if (x >= 50 && x < 54) return pcol(1, 3);
    return BG;
  endfunction
  function automatic logic [7:0] tia_uv(input int x, input int y);
    return 8'((x + y) % 16);
  endfunction
  function automatic logic [11:0] grey(input logic [7:0] uv);
    return {uv[3:0], uv[3:0], uv[3:0]};
  endfunction

  // ---- sequence -----------------------------------------------------------
  logic [7:0] q;
  initial begin
    for (int i = 0; i < 65536; i++) cart[i] = 8'(i * 7);
    for (int o = 0; o < 16; o++) begin
      cart[{8'hA0 + 8'(o), 8'h00}] = byte0(o);
      cart[{8'hA0 + 8'(o), 8'h01}] = 8'hE4;
      cart[{8'hB0 + 8'(o), 8'h10}] = 8'hFF;
    end

    repeat (4) @(negedge clk); rst = 0;
    repeat (4) @(negedge clk);

    // 1. reset state: BIOS, 7800 side off
    cpu_read(16'hFFFC, q);
    check(q == bios_byte(16'hFFFC), "BIOS read at reset");
    check(!maria_en && !tia_en && !cart_en && !ctrl_lock, "control register reset");
    cpu_write(16'h0001, 8'h06);   // Maria on, cartridge on, unlocked
    check(maria_en && cart_en && !tia_en, "control register write");
    cpu_read(16'hFFFC, q);
    check(q == cart[16'hFFFC], "cartridge read after enable");

    // zone list in RAM1: 15 zones of 16 lines, one of 2 lines
    for (int z = 0; z < 16; z++) begin
      cpu_write(16'h1800 + 16'(3 * z), (z == 15) ? 8'h01 : ((z == 0) ? 8'h8F : 8'h0F));
      cpu_write(16'h1801 + 16'(3 * z), (z == 15) ? 8'h20 : 8'h20);
      cpu_write(16'h1802 + 16'(3 * z), (z == 15) ? 8'h40 : 8'h00);
    end
    // display list for zones 0..14 in RAM0: direct object, indirect object
    begin
      logic [7:0] dl [11] = '{8'h00, 8'h1E, 8'hA0, 8'd10,
                              8'h80, 8'h60, 8'h20, 8'h3F, 8'd50, 8'h00, 8'h00};
      for (int i = 0; i < 11; i++) cpu_write(16'h2000 + 16'(i), dl[i]);
    end
    cpu_write(16'h2080, 8'h10);
    // last zone: three 31-byte objects from the cartridge, too long a line
    for (int k = 0; k < 3; k++) begin
      cpu_write(16'h2040 + 16'(4 * k), 8'h00);
      cpu_write(16'h2041 + 16'(4 * k), 8'h41);
      cpu_write(16'h2042 + 16'(4 * k), 8'hC0);
      cpu_write(16'h2043 + 16'(4 * k), 8'(40 * k));
    end
    cpu_write(16'h204C, 8'h00); cpu_write(16'h204D, 8'h00);
    // read back a few RAM bytes
    cpu_read(16'h1800, q); check(q == 8'h8F, "RAM1 read back");
    cpu_read(16'h2005, q); check(q == 8'h60, "RAM0 read back");
    cpu_read(16'h2041, q); check(q == 8'h41, "RAM0 read back 2");
    // RIOT and TIA in the 7800 map
    cpu_read(16'h0280, q); check(q == 8'hA5, "RIOT read (7800 map)");
    cpu_read(16'h0008, q); check(q == 8'h5A, "TIA read (7800 map)");

    // sound: values keep the control register bits at 0110
    cpu_write(16'h0015, 8'h06);
    cpu_write(16'h0017, 8'h16);
    cpu_write(16'h0019, 8'h06);

    // Maria registers
    cpu_write(16'h0020, BG);
    for (int p = 0; p < 8; p++)
      for (int c = 1; c < 4; c++) cpu_write(16'h0020 + 16'(4 * p + c), pcol(p, c));
    cpu_write(16'h0034, 8'hB0);
    cpu_write(16'h002C, 8'h18);
    cpu_write(16'h0030, 8'h00);
    cpu_write(16'h003C, 8'h40);   // DMA on, 160 mode
    cpu_write(16'h0024, 8'h00);   // WSYNC
    cpu_read(16'h1800, q);

    // controllers
    joy0_n = 4'b1010; joy1_n = 4'b0110; btn0 = 2'b01; btn1 = 2'b10;
    repeat (4) @(negedge clk);
    check(swcha == 8'b1010_0110, "swcha");
    check(inpt == 6'b11_1001, "inpt two-button");

    // 2. one displayed frame
    wait (trow == 520);
    wait (trow == 0);
    wait (trow == 1);
    wait (trow == 0);
    for (int r = 0; r < 478; r++) begin
      wait (trow == r && tcol == 0);
      for (int c = 0; c < 800; c++) begin
        @(negedge vga_clk);
        if (tcol >= 32 + K && tcol < 640 + K) begin
          int x;
          x = (tcol - K) / 4;
          check(vga_rgb == grey(maria_uv(r / 2 + 1, x)),
                $sformatf("7800 row %0d col %0d: %h", r, tcol, vga_rgb));
        end else if (tcol >= 640 + K && tcol < 800) begin
          check(vga_rgb == 12'h000, $sformatf("blank row %0d col %0d", r, tcol));
        end
      end
    end

    // 3. 2600 mode, locked
    cpu_write(16'h0001, 8'h0D);
    check(!maria_en && tia_en && cart_en && ctrl_lock, "2600 mode locked");
    cpu_write(16'h0002, 8'h06);
    check(!maria_en && tia_en, "lock holds");
    cpu_read(16'h1234, q); check(q == cart[16'h1234], "cartridge read (2600 map)");
    cpu_read(16'h0080, q); check(q == 8'hA5, "RIOT read (2600 map)");
    cpu_read(16'h0003, q); check(q == 8'h5A, "TIA read (2600 map)");
    check(inpt == 6'b00_0000, "inpt one-button");
    for (int y = 0; y < 192; y++)
      for (int x = 0; x < 160; x++) begin
        @(negedge clk);
        tia_px_we = 1; tia_px_x = 8'(x); tia_px_y = 8'(y); tia_px_uv = tia_uv(x, y);
      end
    @(negedge clk); tia_px_we = 0; tia_frame_done = 1;
    @(negedge clk); tia_frame_done = 0;
    wait (trow == 1);
    wait (trow == 0);
    for (int r = 0; r < 480; r++) begin
      wait (trow == r && tcol == 0);
      for (int c = 0; c < 800; c++) begin
        @(negedge vga_clk);
        if (tcol >= K && tcol < 640 + K) begin
          logic [7:0] e;
          e = (r >= 48 && r < 432) ? tia_uv((tcol - K) / 4, (r - 48) / 2) : 8'h00;
          check(vga_rgb == grey(e), $sformatf("2600 row %0d col %0d: %h", r, tcol, vga_rgb));
        end
      end
    end

    $display("zp=%0d dp=%0d kill=%0d swap=%0d nmi=%0d wsync=%0d halt=%0d slow=%0d",
             n_zp, n_dp, n_kill, n_swap, n_nmi, n_wsync, n_halt, n_slow);
    $display("bios=%0d cart=%0d tick=%0d sign=%0d switch=%0d halt2600=%0d",
             n_bios, n_cart, n_tick, n_sign, n_switch, n_halt_2600);
    check(n_zp > 0, "zone list DMA");
    check(n_dp >= 242, "display DMA");
    check(n_kill > 0, "DMA cut at end of line");
    check(n_swap >= 242, "line RAM swap");
    check(n_nmi > 0, "NMI");
    check(n_wsync > 0, "WSYNC stall");
    check(n_halt > 0, "DMA halt");
    check(n_slow > 0, "slow cartridge DMA");
    check(n_bios > 0, "BIOS select");
    check(n_cart > 0, "cartridge select");
    check(n_tick > 0, "audio ticks");
    check(n_sign > 1, "audio output toggles");
    check(n_switch >= 2, "mode switches");
    check(n_halt_2600 == 0, "no DMA in 2600 mode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
