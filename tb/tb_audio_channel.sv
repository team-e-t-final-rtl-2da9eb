// tb_audio_channel: self-checking test of one TIA sound channel. For each of
// the 16 tone settings the output bit is recorded for 1200 pattern steps and
// its shortest repeat length is compared with the table of pattern lengths
// (1, 15, 465, 465, 2, 2, 31, 31, 511, 31, 31, 1, 6, 6, 93, 93). Then the
// AUDF divider is checked (the bit may change only every AUDF+1 ticks, and a
// toggle tone has period 2*(AUDF+1)), and the sample value +/-AUDV*2184.
module tb_audio_channel;
  logic clk = 0, rst = 1, tick = 0;
  logic [3:0] audc = 0, audv = 15;
  logic [4:0] audf = 0;
  logic bit_out;
  logic signed [15:0] sample;
  int checks = 0, failures = 0;
  audio_channel dut (.*);
  always #5 clk = ~clk;

  initial begin
    #50000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int rep [16] = '{1, 15, 465, 465, 2, 2, 31, 31, 511, 31, 31, 1, 6, 6, 93, 93};
  bit seq [1200];

  function automatic int min_period(input int n);
    for (int p = 1; p <= 600; p++) begin
      bit ok; ok = 1;
      for (int i = 0; i + p < n; i++) if (seq[i] != seq[i + p]) begin ok = 0; break; end
      if (ok) return p;
    end
    return -1;
  endfunction

  initial begin
    repeat (2) @(negedge clk); rst = 0;
    tick = 1;
    for (int c = 0; c < 16; c++) begin
      int p;
      @(negedge clk); audc = 4'(c);
      repeat (1100) @(negedge clk);         // settle past any start-up
      for (int i = 0; i < 1200; i++) begin seq[i] = bit_out; @(negedge clk); end
      p = min_period(1200);
      checks++;
      if (p != rep[c]) begin failures++; $display("AUDC %h: repeat %0d want %0d", c, p, rep[c]); end
      checks++;
      if (sample !== (bit_out ? 16'sd32760 : -16'sd32760)) begin failures++; $display("sample %0d", sample); end
    end
    // divider: toggle tone with AUDF = 4 -> period 10 ticks
    audc = 4'h4; audf = 5'd4; tick = 0;
    repeat (5) @(negedge clk);
    begin
      int changes, last_change, t; bit prev;
      changes = 0; last_change = -1; prev = bit_out; t = 0;
      for (int n = 0; n < 200; n++) begin
        @(negedge clk); tick = 1; @(negedge clk); tick = 0; t++;
        if (bit_out != prev) begin
          if (last_change >= 0) begin
            checks++;
            if (t - last_change != 5) begin failures++; $display("divider spacing %0d", t - last_change); end
          end
          last_change = t; changes++; prev = bit_out;
        end
      end
      checks++; if (changes < 30) begin failures++; $display("too few changes %0d", changes); end
    end
    // volume
    audc = 4'h0; audv = 4'd7; repeat (3) @(negedge clk);
    checks++; if (sample !== 16'sd15288) begin failures++; $display("volume 7: %0d", sample); end
    audv = 4'd0; #1;
    checks++; if (sample !== 16'sd0) begin failures++; $display("volume 0: %0d", sample); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
