// tb_maria_timing: self-checking test of Maria timing and control.
//
// The VGA row is stepped every 228 Maria cycles (two rows ~ one 452-cycle
// scanline) for two full frames, starting at row 500. A DMA responder
// answers zone-list starts after 7 cycles and display-list starts after 60
// cycles, with a display-list interrupt on every 50th line; on a few lines
// it never answers so the kill at column 436 must happen. Checked: halt
// rises at column 28 (display list) and at column 420 of the line begun at
// row 519, which falls in row 520 (zone list), the
// start pulse follows HALT_LEAD cycles later, halt falls the cycle after
// done or one cycle after the kill (the DMA stops first), NMI lasts NMI_CYCLES cycles with halt low,
// 242 display-list DMAs, one zone-list DMA and one last_line per frame,
// a line RAM swap after each display-list line, WSYNC holding RDY low to the
// next line start, VBlank from row 512, and no DMA while disabled.
module tb_maria_timing;
  import a78_pkg::*;
  logic clk = 0, rst = 1;
  logic enable = 1, zp_written = 1, wsync = 0;
  logic [9:0] vga_row = 10'd500;
  logic zp_dma_done = 0, dp_dma_done = 0, dli = 0;
  logic halt, zp_dma_start, dp_dma_start, dp_dma_kill, last_line, lram_swap, nmi, ready, vblank;
  logic [8:0] col_cnt;
  int checks = 0, failures = 0;

  maria_timing dut (.*);
  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s (row %0d col %0d)", what, vga_row, col_cnt);
    end
  endtask

  // DMA responder
  int nline = 0;
  initial begin
    forever begin
      @(posedge clk);
      if (zp_dma_start) begin
        repeat (6) @(posedge clk);
        #1 zp_dma_done = 1; dli = 1;
        @(posedge clk); #1 zp_dma_done = 0; dli = 0;
      end else if (dp_dma_start) begin
        nline++;
        if (nline % 97 == 5) begin
          // no answer: must be killed
        end else begin
          repeat (59) @(posedge clk);
          #1 dp_dma_done = 1; dli = (nline % 50 == 0);
          @(posedge clk); #1 dp_dma_done = 0; dli = 0;
        end
      end
    end
  end

  // monitors
  int n_zp = 0, n_dp = 0, n_kill = 0, n_swap = 0, n_last = 0, n_nmi_pulses = 0;
  int since_halt = 0, nmi_len = 0;
  logic halt_d = 0, nmi_d = 0, was_zp = 0;
  logic dp_kill_d = 0, done_d = 0;
  always @(posedge clk) if (!rst) begin
    halt_d <= halt; nmi_d <= nmi;
    dp_kill_d <= dp_dma_kill;
    done_d <= zp_dma_done || dp_dma_done;
    if (halt && !halt_d) begin
      since_halt <= 1;
      was_zp <= (col_cnt > 9'd400);
      if (col_cnt > 9'd400) check(col_cnt == 9'(ZP_DMA_COL + 1) && vga_row == 10'd520, "zone DMA halt position");
      else                  check(col_cnt == 9'(DP_DMA_COL + 1), "display DMA halt position");
    end else if (halt) since_halt <= since_halt + 1;
    if (zp_dma_start) begin n_zp++; check(since_halt == HALT_LEAD && was_zp, "zone start after lead"); end
    if (dp_dma_start) begin
      n_dp++;
      check(since_halt == HALT_LEAD && !was_zp, "display start after lead");
      if (last_line) n_last++;
    end
    if (dp_dma_kill) begin
      n_kill++;
      check(col_cnt == 9'(DP_KILL_COL + 1), "kill column");
      check(halt, "halt still high while the kill reaches the DMA");
    end
    if (!halt && halt_d)
      check(dp_kill_d || done_d, "halt only falls after done or one cycle after a kill");
    if (lram_swap) n_swap++;
    if ((zp_dma_done || dp_dma_done) && halt) begin
      @(posedge clk); #1;
      check(!halt, "halt falls after done");
    end
    if (nmi) begin
      check(!halt, "nmi only with halt low");
      nmi_len <= nmi_len + 1;
    end
    if (!nmi && nmi_d) begin
      n_nmi_pulses++;
      check(nmi_len == NMI_CYCLES, "nmi length");
      nmi_len <= 0;
    end
    if (row_age > 5 && vga_row == row_prev) check(vblank == (vga_row >= 10'd512), "vblank");
  end

  int row_age = 0;
  logic [9:0] row_prev = 0;
  always @(posedge clk) begin
    row_prev <= vga_row;
    row_age <= (vga_row != row_prev) ? 0 : row_age + 1;
  end

  int frame_dp0, frame_swap0, frame_last0;
  initial begin
    repeat (4) @(posedge clk); #1 rst = 0;
    for (int f = 0; f < 2; f++) begin
      frame_dp0 = n_dp; frame_swap0 = n_swap; frame_last0 = n_last;
      for (int i = 0; i < 525; i++) begin
        #1 vga_row = 10'((500 + i) % 525);
        // WSYNC test once per frame on row 100
        if (vga_row == 10'd100) begin
          repeat (50) @(posedge clk);
          #1 wsync = 1; @(posedge clk); #1 wsync = 0;
          repeat (3) @(posedge clk); #1;
          check(!ready, "ready low after WSYNC");
          repeat (174) @(posedge clk);
          check(!ready, "ready still low before next line");
        end else begin
          repeat (228) @(posedge clk);
        end
        if (vga_row == 10'd102) check(ready, "ready back after line start");
      end
      check(n_dp - frame_dp0 == 242, $sformatf("display DMAs per frame %0d", n_dp - frame_dp0));
      check(n_last - frame_last0 == 1, "one last line per frame");
      check(n_swap - frame_swap0 == 242, $sformatf("swaps per frame %0d", n_swap - frame_swap0));
    end
    check(n_zp == 2, "zone DMA once per frame");
    check(n_kill >= 2, "kills happened");
    check(n_nmi_pulses >= 4, "NMIs happened");
    // disabled: no halt for a whole frame
    enable = 0;
    begin
      int h; h = 0;
      for (int i = 0; i < 525; i++) begin
        #1 vga_row = 10'((500 + i) % 525);
        repeat (228) begin @(posedge clk); if (halt) h++; end
      end
      check(h == 0, "no DMA while disabled");
    end
    $display("dp=%0d zp=%0d kills=%0d swaps=%0d nmis=%0d", n_dp, n_zp, n_kill, n_swap, n_nmi_pulses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
