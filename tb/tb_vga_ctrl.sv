// tb_vga_ctrl: self-checking test of the VGA raster: two full frames,
// checking the counter ranges, 800 columns per row, 525 rows per frame,
// a 96-column hsync pulse starting at column 656, a 2-row vsync pulse at
// rows 490-491, 640x480 active pixels and black output outside them. The
// colour input changes randomly every cycle; syncs and colour must come out
// delayed by PIPE_DELAY + 1 cycles from the counters, colour passing only
// for visible pixels.
module tb_vga_ctrl;
  logic clk = 0, rst = 1;
  logic [11:0] rgb_in = 12'hABC, rgb;
  logic [9:0] row, col;
  logic active, hsync_n, vsync_n;
  int checks = 0, failures = 0;
  vga_ctrl dut (.*);
  always #2 clk = ~clk;

  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s row %0d col %0d", what, row, col); end
  endtask

  initial begin
    int nact, hs_len, hs_start, vs_rows;
    logic [9:0] hc [4];
    logic ha [4];
    logic [11:0] prev_in;
    for (int i = 0; i < 4; i++) begin hc[i] = 0; ha[i] = 0; end
    repeat (2) @(negedge clk); rst = 0;
    for (int f = 0; f < 2; f++) begin
      nact = 0; vs_rows = 0;
      for (int r = 0; r < 525; r++) begin
        hs_len = 0; hs_start = -1;
        for (int c = 0; c < 800; c++) begin
          if (c == 0) begin check(col == 0, "row starts at column 0"); check(row == 10'(r), "row count"); end
          if (active) nact++;
          check(active == (col < 640 && row < 480), "active");
          // outputs reflect the position three cycles back
          if (!(f == 0 && r == 0 && c < 3)) begin
            if (!hsync_n) begin hs_len++; if (hs_start < 0) hs_start = int'(hc[2]); end
            check(rgb == (ha[2] ? prev_in : 12'h000), "rgb blanking");
            if (hc[2] == 0) begin if (!vsync_n) vs_rows++; end
          end
          for (int i = 3; i > 0; i--) begin hc[i] = hc[i-1]; ha[i] = ha[i-1]; end
          hc[0] = col; ha[0] = active;
          prev_in = rgb_in;
          @(negedge clk);
          rgb_in = 12'($urandom);
        end
        if (r > 0) begin
          check(hs_len == 96, $sformatf("hsync length %0d", hs_len));
          check(hs_start == 656, $sformatf("hsync start %0d", hs_start));
        end
      end
      check(nact == 640 * 480, "active pixel count");
      check(vs_rows == 2, $sformatf("vsync rows %0d", vs_rows));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
