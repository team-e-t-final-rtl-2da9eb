// tb_maria: end-to-end test of the Maria with a behavioural memory.
//
// Clocks run at the real ratio (7.16 MHz Maria, 25.175 MHz VGA, modelled as
// 140 ns and 40 ns). The testbench plays the CPU for register writes only
// (colours, CHARBASE, ZP, CONTROL) and provides a 64 KB memory behind the
// read bus, latched on mem_ce like the system's buffered bus. The zone list
// at 0x1800 covers 242 scanlines with 15 zones of 16 lines and one of 2;
// the first zone requests a display-list interrupt. Every zone uses one
// display list with a direct object in slow cartridge space whose data
// depends on the zone offset (so every scanline differs) and an indirect
// object through CHARBASE. A whole displayed frame is then compared,
// pixel by pixel over both objects, with colours worked out here from the
// same layout. Also checked: one NMI per frame, the CPU is halted on every
// displayed line, and the Maria registers are only written outside halt.
module tb_maria;
  import a78_pkg::*;
  logic clk = 0, rst = 1, vga_clk = 0;
  logic [9:0] vga_row = 0, vga_col = 0;
  logic [15:0] cpu_addr = 16'h1800;
  logic [7:0] cpu_wdata = 0;
  logic cpu_we = 0, maria_en = 1, cart_en = 1;
  logic [7:0] bus_rdata = 0;
  logic [15:0] bus_addr;
  logic bus_we;
  dev_e dev;
  logic [7:0] maria_rdata, uv;
  logic halt, nmi, ready, tia_ce, cpu_ce, mem_ce;
  logic zp_dma_start, dp_dma_start, dp_dma_kill, lram_swap;
  int checks = 0, failures = 0;

  maria dut (.*);

  always #70 clk = ~clk;
  always #20 vga_clk = ~vga_clk;

  always @(posedge vga_clk) begin
    if (vga_col == 10'd799) begin
      vga_col <= 0;
      vga_row <= (vga_row == 10'd524) ? 10'd0 : vga_row + 10'd1;
    end else vga_col <= vga_col + 10'd1;
  end

  logic [7:0] mem [65536];
  always @(posedge clk) if (mem_ce) bus_rdata <= mem[bus_addr];

  initial begin
    #200000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cpu_write(input logic [15:0] a, input logic [7:0] d);
    @(negedge clk); cpu_addr = a; cpu_wdata = d; cpu_we = 1;
    do @(posedge clk); while (!(cpu_ce && !halt));
    #1 cpu_we = 0; cpu_addr = 16'h1800;
  endtask

  // palette colours: grey levels so they are easy to tell apart
  function automatic logic [7:0] pcol(input int p, input int c);
    return 8'(16 * p + 4 * c + 1);
  endfunction

  function automatic logic [7:0] byte0(input int o);
    return {2'(o), 2'(o + 1), 2'(o + 2), 2'(o + 3)};
  endfunction

  // expected colour byte at cell x of scanline s
  function automatic logic [7:0] expect_uv(input int s, input int x);
    int o; logic [1:0] c;
    o = (s < 240) ? 15 - (s % 16) : 241 - s;
    if (x >= 10 && x < 14) begin
      c = byte0(o) >> (2 * (13 - x));
      return (c == 0) ? 8'h00 : pcol(0, c);
    end
    if (x >= 14 && x < 18) begin
      c = 8'hE4 >> (2 * (17 - x));
      return (c == 0) ? 8'h00 : pcol(0, c);
    end
    if (x >= 50 && x < 54) return pcol(1, 3);
    return 8'h00;
  endfunction

  int n_nmi = 0, n_dp = 0;
  logic nmi_d = 0;
  always @(posedge clk) begin
    nmi_d <= nmi;
    if (nmi && !nmi_d) n_nmi++;
    if (dp_dma_start) n_dp++;
    if (bus_we && halt) begin failures++; $display("write during halt"); end
  end

  initial begin
    for (int i = 0; i < 65536; i++) mem[i] = 8'h00;
    // zone list
    for (int z = 0; z < 16; z++) begin
      mem[16'h1800 + 3 * z]     = (z == 15) ? 8'h01 : 8'h0F;
      mem[16'h1800 + 3 * z + 1] = 8'h19;
      mem[16'h1800 + 3 * z + 2] = 8'h00;
    end
    mem[16'h1800] |= 8'h80;   // DLI on the first zone
    // display list: direct object from cartridge space, indirect object
    mem[16'h1900] = 8'h00; mem[16'h1901] = 8'h1E; mem[16'h1902] = 8'hA0; mem[16'h1903] = 8'd10;
    mem[16'h1904] = 8'h80; mem[16'h1905] = 8'h60; mem[16'h1906] = 8'h19; mem[16'h1907] = 8'h3F; mem[16'h1908] = 8'd50;
    mem[16'h1909] = 8'h00; mem[16'h190A] = 8'h00;
    mem[16'h1980] = 8'h10;
    for (int o = 0; o < 16; o++) begin
      mem[{8'hA0 + 8'(o), 8'h00}] = byte0(o);
      mem[{8'hA0 + 8'(o), 8'h01}] = 8'hE4;
      mem[{8'h30 + 8'(o), 8'h10}] = 8'hFF;
    end

    repeat (4) @(negedge clk); rst = 0;
    // registers
    cpu_write(16'h0020, 8'h00);
    for (int p = 0; p < 8; p++)
      for (int c = 1; c < 4; c++) cpu_write(16'h0020 + 16'(4 * p + c), pcol(p, c));
    cpu_write(16'h0034, 8'h30);
    cpu_write(16'h002C, 8'h18);
    cpu_write(16'h0030, 8'h00);
    cpu_write(16'h003C, 8'h40);   // DM = 10, RM = 00

    // wait for the start of a frame that follows a zone-list DMA
    wait (vga_row == 10'd520);
    wait (vga_row == 10'd0);
    wait (vga_row == 10'd1);
    wait (vga_row == 10'd0);
    // check one whole frame of displayed lines
    for (int r = 0; r < 480; r++) begin
      int s;
      wait (vga_row == 10'(r) && vga_col == 10'd30);
      s = r / 2 + 1;
      for (int col = 36; col < 224; col++) begin
        int x;
        @(negedge vga_clk);
        x = (int'(vga_col) - 1) / 4;
        if (x >= 8 && (x < 20 || (x >= 48 && x < 56))) begin
          checks++;
          if (uv !== expect_uv(s, x)) begin
            failures++;
            if (failures < 12) $display("row %0d line %0d cell %0d: %h want %h", r, s, x, uv, expect_uv(s, x));
          end
        end
      end
    end
    checks++; if (n_nmi < 1) begin failures++; $display("no NMI"); end
    checks++; if (n_dp < 242) begin failures++; $display("display DMAs %0d", n_dp); end
    $display("nmi=%0d dp=%0d", n_nmi, n_dp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
