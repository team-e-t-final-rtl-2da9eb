// tb_uv_to_rgb: self-checking test of the colour converter. All 256 colour
// bytes are compared with the conversion formula evaluated here in real
// arithmetic (hue angle 167 - 24*(h-1) degrees, chroma radius 40, Y = 17*lum)
// allowing one step of the 4-bit output for rounding; greys must be exact.
module tb_uv_to_rgb;
  logic clk = 0;
  logic [7:0] uv = 0;
  logic [11:0] rgb;
  int checks = 0, failures = 0;
  uv_to_rgb dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int q4(input real v);
    if (v < 0) return 0;
    if (v > 255) return 15;
    return int'($floor(v)) / 16;
  endfunction

  function automatic bit near(input int a, input int b);
    return (a - b <= 1) && (b - a <= 1);
  endfunction

  initial begin
    for (int i = 0; i < 256; i++) begin
      real y, cb, cr, ang;
      int er, eg, eb, h;
      @(negedge clk); uv = 8'(i);
      @(negedge clk);
      h = i / 16;
      y = 17.0 * (i % 16);
      if (h == 0) begin cb = 0; cr = 0; end
      else begin
        ang = (167.0 - 24.0 * (h - 1)) * 3.14159265358979 / 180.0;
        cb = 40.0 * $cos(ang); cr = 40.0 * $sin(ang);
      end
      er = q4(y + 1.5 * cr); eg = q4(y - (cb + 2.0 * cr) / 3.0); eb = q4(y + 1.75 * cb);
      checks++;
      if (h == 0) begin
        if (rgb !== {4'(er), 4'(eg), 4'(eb)}) begin failures++; $display("grey %h: %h", i, rgb); end
      end else if (!near(rgb[11:8], er) || !near(rgb[7:4], eg) || !near(rgb[3:0], eb)) begin
        failures++; $display("uv %h: %h want ~%h%h%h", i, rgb, er[3:0], eg[3:0], eb[3:0]);
      end
    end
    // hue 4 (red) at mid brightness must be red-dominant, hue 8 (blue) blue-dominant
    @(negedge clk); uv = 8'h48; @(negedge clk);
    checks++; if (!(rgb[11:8] > rgb[3:0] && rgb[11:8] > rgb[7:4])) begin failures++; $display("red"); end
    @(negedge clk); uv = 8'h88; @(negedge clk);
    checks++; if (!(rgb[3:0] > rgb[11:8])) begin failures++; $display("blue"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
