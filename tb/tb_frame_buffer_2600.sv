// tb_frame_buffer_2600: self-checking test of the 2600-mode double frame
// buffer. Frame A is written and published with frame_done; while frame B
// is being written the VGA side must still show A everywhere; after the
// second frame_done it shows B. Pixels are checked at sampled VGA positions
// (4 columns and 2 rows per TIA pixel, 48-row top margin) and outside the
// picture the output must be black.
module tb_frame_buffer_2600;
  logic wclk = 0, rclk = 0, rst = 1, we = 0, frame_done = 0;
  logic [7:0] wx = 0, wy = 0, wuv = 0, uv;
  logic [9:0] row = 0, col = 0;
  int checks = 0, failures = 0;
  frame_buffer_2600 dut (.*);
  always #5 wclk = ~wclk;
  always #2 rclk = ~rclk;

  initial begin
    #50000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] pat(input int x, input int y, input int f);
    return 8'(x * 3 + y * 5 + f * 101);
  endfunction

  task automatic write_frame(input int f);
    for (int y = 0; y < 192; y++)
      for (int x = 0; x < 160; x++) begin
        @(negedge wclk); we = 1; wx = 8'(x); wy = 8'(y); wuv = pat(x, y, f);
      end
    @(negedge wclk); we = 0;
  endtask

  task automatic done();
    @(negedge wclk); frame_done = 1; @(negedge wclk); frame_done = 0;
    repeat (4) @(negedge rclk);
  endtask

  task automatic check_frame(input int f, input int n);
    for (int k = 0; k < n; k++) begin
      int r, c;
      logic [7:0] e;
      r = $urandom_range(0, 479); c = $urandom_range(0, 639);
      @(negedge rclk); row = 10'(r); col = 10'(c);
      @(negedge rclk);
      e = (r >= 48 && r < 432) ? pat(c / 4, (r - 48) / 2, f) : 8'h00;
      checks++;
      if (uv !== e) begin failures++; if (failures < 10) $display("f%0d r%0d c%0d: %h want %h", f, r, c, uv, e); end
    end
  endtask

  initial begin
    repeat (3) @(negedge wclk); rst = 0;
    write_frame(1); done();
    check_frame(1, 400);
    fork
      write_frame(2);
      check_frame(1, 400);
    join
    // out-of-frame writes are ignored
    @(negedge wclk); we = 1; wx = 8'd200; wy = 8'd10; wuv = 8'hEE;
    @(negedge wclk); we = 0;
    done();
    check_frame(2, 600);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
