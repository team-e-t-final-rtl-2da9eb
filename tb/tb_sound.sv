// tb_sound: self-checking test of the two-channel sound system. Registers
// are written at the TIA audio addresses; checked are the audio tick rate
// (one per 114 TIA clocks), that each register reaches the right channel
// (constant tones at set volumes give the averaged sample
// (v0 + v1) * 2184 / 2), and that a write to another TIA address changes
// nothing.
module tb_sound;
  logic clk = 0, rst = 1, tia_ce = 0, we = 0, tick;
  logic [5:0] addr = 0;
  logic [4:0] wdata = 0;
  logic [1:0] ch_bit;
  logic signed [15:0] mix;
  int checks = 0, failures = 0;
  sound dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) tia_ce <= ~tia_ce;

  initial begin
    #50000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [5:0] a, input logic [4:0] d);
    @(negedge clk); addr = a; wdata = d; we = 1;
    @(negedge clk); we = 0;
  endtask

  task automatic expect_mix(input int e, input string what);
    repeat (4) @(negedge clk);
    checks++;
    if (mix !== 16'(e)) begin failures++; $display("%s: mix %0d want %0d", what, mix, e); end
  endtask

  initial begin
    repeat (3) @(negedge clk); rst = 0;
    // tick rate
    begin
      int last, n;
      last = -1; n = 0;
      for (int t = 0; t < 2000; t++) begin
        @(negedge clk);
        if (tick) begin
          if (last >= 0) begin
            checks++;
            if (t - last != 228) begin failures++; $display("tick spacing %0d", t - last); end
          end
          last = t; n++;
        end
      end
      checks++; if (n < 8) begin failures++; $display("ticks %0d", n); end
    end
    // AUDC = 0 gives a constant 1
    wr(6'h19, 5'd15); expect_mix(16380, "ch0 vol 15");
    wr(6'h1A, 5'd15); expect_mix(32760, "both vol 15");
    wr(6'h1A, 5'd4);  expect_mix((15 + 4) * 2184 / 2, "ch1 vol 4");
    wr(6'h14, 5'd0);  expect_mix((15 + 4) * 2184 / 2, "unrelated address");
    // AUDC1 = 4 (toggle), AUDF1 = 0: channel 1 bit toggles once per tick
    wr(6'h16, 5'd4); wr(6'h18, 5'd0);
    begin
      int changes; logic pb;
      changes = 0; pb = ch_bit[1];
      for (int t = 0; t < 2300; t++) begin
        @(negedge clk);
        if (ch_bit[1] != pb) begin changes++; pb = ch_bit[1]; end
        checks++;
        if (ch_bit[0] !== 1'b1) begin failures++; end
      end
      checks++; if (changes < 9 || changes > 11) begin failures++; $display("ch1 changes %0d", changes); end
    end
    // AUDF0 = 1 with toggle on channel 0: half the change rate of channel 1
    wr(6'h15, 5'd4); wr(6'h17, 5'd1);
    begin
      int c0; logic pb0;
      c0 = 0; pb0 = ch_bit[0];
      for (int t = 0; t < 4600; t++) begin
        @(negedge clk);
        if (ch_bit[0] != pb0) begin c0++; pb0 = ch_bit[0]; end
      end
      checks++; if (c0 < 9 || c0 > 11) begin failures++; $display("ch0 changes %0d", c0); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
