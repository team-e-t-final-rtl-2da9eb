// tb_line_ram: self-checking test of the Maria line RAM.
//
// Hand-worked cases first (160A-style four-cell writes, two-cell writes,
// the right edge at cell 159, transparency of zero data), then 300 random
// header/pixel operations checked against a reference model kept in the
// testbench, with the read mode and kangaroo mode changed at random too.
// A hand-worked kangaroo-mode case follows. After each swap every cell is
// read back in all three read modes, both pixels, and compared; a final
// swap must show a cleared line.
module tb_line_ram;
  logic clk = 0, rclk = 0, rst = 1;
  logic [7:0] data;
  logic input_w, palette_w, wm_w, pixels_w, swap;
  logic [8:0] rcol;
  logic [1:0] rm;
  logic km;
  logic [4:0] rd_index;
  int checks = 0, failures = 0;

  line_ram dut (.*);

  always #5 clk = ~clk;
  always #3 rclk = ~rclk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model
  logic [4:0] mbuf [160], mplay [160];
  logic [7:0] mpos; logic [2:0] mpal; logic mwm;

  // kangaroo mode, written per pixel: the left/right pixel's colour bits in
  // the 320-wide read modes; an invisible pixel keeps the old cell bits
  function automatic logic [4:0] kmodel(input logic [4:0] nv, input logic [4:0] ov);
    logic [4:0] r;
    r = nv;
    if (!(km && rm[1])) return nv;
    if (rm == 2'b10) begin
      if (nv[1] == 0 && nv[3] == 0) begin r[1] = ov[1]; r[3] = ov[3]; end
      if (nv[0] == 0 && nv[2] == 0) begin r[0] = ov[0]; r[2] = ov[2]; end
    end else begin
      if (nv[1] == 0) r[1] = ov[1];
      if (nv[0] == 0) r[0] = ov[0];
    end
    return r;
  endfunction

  task automatic strobe(input int kind, input logic [7:0] d);
    data = d;
    {input_w, palette_w, wm_w, pixels_w, swap} = '0;
    unique case (kind)
      0: input_w = 1; 1: palette_w = 1; 2: wm_w = 1; 3: pixels_w = 1; 4: swap = 1;
    endcase
    @(posedge clk); #1;
    {input_w, palette_w, wm_w, pixels_w, swap} = '0;
    // model
    unique case (kind)
      0: mpos = d;
      1: mpal = d[7:5];
      2: mwm = d[7];
      3: begin
        if (mwm) begin
          logic [3:0] c0, c1;
          c0 = {d[3], d[2], d[7], d[6]};
          c1 = {d[1], d[0], d[5], d[4]};
          if (c0 != 0 && mpos < 160) mbuf[mpos] = kmodel({mpal[2], c0}, mbuf[mpos]);
          if (c1 != 0 && 8'(mpos + 1) < 160) mbuf[8'(mpos + 1)] = kmodel({mpal[2], c1}, mbuf[8'(mpos + 1)]);
          mpos = mpos + 2;
        end else begin
          for (int k = 0; k < 4; k++) begin
            logic [1:0] px;
            px = d[7 - 2*k -: 2];
            if (px != 0 && 8'(mpos + k) < 160) mbuf[8'(mpos + k)] = {mpal, px};
          end
          mpos = mpos + 4;
        end
      end
      4: for (int i = 0; i < 160; i++) begin mplay[i] = mbuf[i]; mbuf[i] = 0; end
    endcase
  endtask

  function automatic logic [4:0] expect_idx(input logic [4:0] l, input logic r, input logic [1:0] m);
    if (m == 2'b10) return {l[4], 2'b00, r ? l[0] : l[1], r ? l[2] : l[3]};
    if (m == 2'b11) return {l[4:2], r ? l[0] : l[1], 1'b0};
    return l;
  endfunction

  task automatic check_line();
    for (int m = 0; m < 4; m++) begin
      if (m == 1) continue;
      rm = 2'(m);
      for (int c = 0; c < 160; c++) begin
        for (int r = 0; r < 2; r++) begin
          @(negedge rclk); rcol = 9'(2*c + r);
          @(posedge rclk); #1;
          checks++;
          if (rd_index !== expect_idx(mplay[c], r[0], 2'(m))) begin
            failures++;
            if (failures < 10) $display("cell %0d r%0d rm%0d: got %b want %b", c, r, m, rd_index, expect_idx(mplay[c], r[0], 2'(m)));
          end
        end
      end
    end
  endtask

  initial begin
    {input_w, palette_w, wm_w, pixels_w, swap} = '0;
    data = 0; rcol = 0; rm = 0; km = 0;
    for (int i = 0; i < 160; i++) begin mbuf[i] = 0; mplay[i] = 0; end
    mpos = 0; mpal = 0; mwm = 0;
    repeat (3) @(posedge clk); #1 rst = 0;

    // hand-worked: palette 5, four-cell mode, x = 10, byte 0xE4
    strobe(1, 8'hA0); strobe(2, 8'h00); strobe(0, 8'd10); strobe(3, 8'hE4);
    strobe(3, 8'h40);
    // two-cell mode, palette 2, x = 20, byte 0x5A
    strobe(2, 8'h80); strobe(1, 8'h40); strobe(0, 8'd20); strobe(3, 8'h5A);
    // right edge
    strobe(2, 8'h00); strobe(1, 8'hE0); strobe(0, 8'd158); strobe(3, 8'hFF);
    strobe(4, 8'h00);
    // explicit expectations, worked by hand
    checks++; if (mplay[10] != 5'b10111 || mplay[11] != 5'b10110 || mplay[12] != 5'b10101
                 || mplay[13] != 0 || mplay[14] != 5'b10101) begin failures++; $display("model mismatch A"); end
    checks++; if (mplay[20] != 5'b01001 || mplay[21] != 5'b01001) begin failures++; $display("model mismatch B"); end
    checks++; if (mplay[158] != 5'b11111 || mplay[159] != 5'b11111) begin failures++; $display("model mismatch C"); end
    check_line();

    // random operations
    for (int line = 0; line < 3; line++) begin
      for (int n = 0; n < 100; n++) begin
        int k;
        k = $urandom_range(0, 9);
        if (k == 0)      strobe(0, 8'($urandom));
        else if (k == 1) strobe(1, 8'($urandom));
        else if (k == 2) strobe(2, 8'($urandom));
        else if (k == 3) begin rm = 2'($urandom); km = 1'($urandom); end
        else             strobe(3, 8'($urandom));
      end
      strobe(4, 8'h00);
      check_line();
    end
    // kangaroo mode by hand: two-cell mode, rm = 11, palette 4 (P2 = 1),
    // x = 30: byte 0xC0 fills cell 30 with both pixels on (L1 = D7, L0 = D6);
    // then byte 0x80 (left pixel only) again at x = 30
    rm = 2'b11; km = 1;
    strobe(2, 8'h80); strobe(1, 8'h80); strobe(0, 8'd30); strobe(3, 8'hC0);
    strobe(0, 8'd30); strobe(3, 8'h80);
    km = 0;
    strobe(0, 8'd32); strobe(3, 8'hC0); strobe(0, 8'd32); strobe(3, 8'h80);
    strobe(4, 8'h00);
    checks++; if (mplay[30] != 5'b10011) begin failures++; $display("kangaroo: right pixel lost %b", mplay[30]); end
    checks++; if (mplay[32] != 5'b10010) begin failures++; $display("no kangaroo: right pixel kept %b", mplay[32]); end
    check_line();
    // a swap with nothing buffered shows an empty line
    strobe(4, 8'h00);
    check_line();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
