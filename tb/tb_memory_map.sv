// tb_memory_map: self-checking test of the address decoder and the Maria
// registers. Decoding is checked against a table of hand-worked addresses
// in the 7800 map, the 2600 map and with the BIOS in and out; then the
// colour map, ZP/CHARBASE/CONTROL, WSYNC and the STATRD read are exercised.
module tb_memory_map;
  import a78_pkg::*;
  logic clk = 0, rst = 1, ce = 1, we = 0, maria_en = 1, cart_en = 1, vblank = 0;
  logic [15:0] addr = 0;
  logic [7:0] wdata = 0, rdata, charbase, cm_uv;
  dev_e dev;
  logic slow, wsync, zp_written;
  logic [15:0] zp;
  maria_ctrl_t ctrl;
  logic [4:0] cm_index = 0;
  int checks = 0, failures = 0;

  memory_map dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_dev(input logic [15:0] a, input dev_e d);
    addr = a; #1;
    checks++;
    if (dev !== d) begin failures++; $display("addr %h men=%b cart=%b: dev %s want %s", a, maria_en, cart_en, dev.name(), d.name()); end
    checks++;
    if (slow !== (d == DEV_TIA || d == DEV_RIOT)) begin failures++; $display("addr %h slow wrong", a); end
  endtask

  task automatic wr(input logic [15:0] a, input logic [7:0] d);
    @(negedge clk); addr = a; wdata = d; we = 1;
    @(negedge clk); we = 0;
  endtask

  logic [7:0] shadow [32];
  initial begin
    repeat (2) @(negedge clk); rst = 0;
    // 7800 map, cartridge in
    expect_dev(16'h0000, DEV_TIA);   expect_dev(16'h001F, DEV_TIA);
    expect_dev(16'h0100, DEV_TIA);   expect_dev(16'h031F, DEV_TIA);
    expect_dev(16'h0020, DEV_MARIA); expect_dev(16'h003F, DEV_MARIA);
    expect_dev(16'h0040, DEV_RAM0);  expect_dev(16'h00FF, DEV_RAM0);
    expect_dev(16'h0140, DEV_RAM0);  expect_dev(16'h01FF, DEV_RAM0);
    expect_dev(16'h0280, DEV_RIOT);  expect_dev(16'h02FF, DEV_RIOT);
    expect_dev(16'h0380, DEV_RIOT);  expect_dev(16'h0480, DEV_RIOT);
    expect_dev(16'h05FF, DEV_RIOT);  expect_dev(16'h0240, DEV_RAM0);
    expect_dev(16'h1800, DEV_RAM1);  expect_dev(16'h1FFF, DEV_RAM1);
    expect_dev(16'h2000, DEV_RAM0);  expect_dev(16'h27FF, DEV_RAM0);
    expect_dev(16'h4000, DEV_CART);  expect_dev(16'hFFFF, DEV_CART);
    expect_dev(16'h0800, DEV_NONE);  expect_dev(16'h3000, DEV_NONE);
    // BIOS in
    cart_en = 0;
    expect_dev(16'hF000, DEV_BIOS);  expect_dev(16'h8000, DEV_BIOS);
    expect_dev(16'h7FFF, DEV_CART);  expect_dev(16'h1800, DEV_RAM1);
    // 2600 map
    maria_en = 0;
    expect_dev(16'hFFFC, DEV_BIOS);
    cart_en = 1;
    expect_dev(16'h1000, DEV_CART);  expect_dev(16'hF000, DEV_CART);
    expect_dev(16'h0080, DEV_RIOT);  expect_dev(16'h0280, DEV_RIOT);
    expect_dev(16'h0000, DEV_TIA);   expect_dev(16'h0030, DEV_TIA);
    expect_dev(16'h0020, DEV_TIA);   // no Maria registers in the 2600 map
    maria_en = 1;

    // registers: write every colour slot
    for (int o = 0; o < 32; o++) shadow[o] = 0;
    for (int o = 0; o < 32; o++) begin
      if (o[1:0] != 0 || o == 0) begin
        shadow[o] = 8'($urandom);
        wr(16'h0020 + 16'(o), shadow[o]);
      end
    end
    // a write with the 2600 map active must not reach the registers
    maria_en = 0; wr(16'h0021, 8'h99); maria_en = 1;
    for (int p = 0; p < 8; p++)
      for (int c = 0; c < 4; c++) begin
        cm_index = 5'(p * 4 + c); #1;
        checks++;
        if (cm_uv !== (c == 0 ? shadow[0] : shadow[p * 4 + c])) begin
          failures++; $display("colour p%0d c%0d: %h", p, c, cm_uv);
        end
      end
    checks++; if (zp_written) begin failures++; $display("zp_written early"); end
    wr(16'h002C, 8'h18);
    checks++; if (zp_written) begin failures++; $display("zp_written after ZPH"); end
    wr(16'h0030, 8'h42);
    checks++; if (!zp_written || zp !== 16'h1842) begin failures++; $display("zp %h", zp); end
    wr(16'h0034, 8'hC0);
    checks++; if (charbase !== 8'hC0) begin failures++; $display("charbase"); end
    wr(16'h003C, 8'b0_10_1_0_1_11);
    checks++; if (ctrl.dm !== 2'b10 || !ctrl.cwidth || ctrl.bcntl || !ctrl.km || ctrl.rm !== 2'b11 || ctrl.ck)
      begin failures++; $display("control %b", ctrl); end
    // WSYNC pulse
    begin
      int seen; seen = 0;
      @(negedge clk); addr = 16'h0024; we = 1;
      @(negedge clk); we = 0; if (wsync) seen++;
      @(negedge clk); if (wsync) seen++;
      checks++; if (seen != 1) begin failures++; $display("wsync pulses %0d", seen); end
    end
    // STATRD
    vblank = 1; @(negedge clk); addr = 16'h0028; @(negedge clk);
    checks++; if (rdata !== 8'h80) begin failures++; $display("statrd %h", rdata); end
    vblank = 0; @(negedge clk);
    checks++; if (rdata !== 8'h00) begin failures++; $display("statrd %h", rdata); end
    // reads only latch on ce
    ce = 0; vblank = 1; @(negedge clk); @(negedge clk);
    checks++; if (rdata !== 8'h00) begin failures++; $display("rdata moved without ce"); end
    ce = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
