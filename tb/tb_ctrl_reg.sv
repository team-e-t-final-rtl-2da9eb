// tb_ctrl_reg: self-checking test of the hidden control register: writes
// only on TIA writes, refuses maria_en together with tia_en, and freezes
// once the lock bit is written.
module tb_ctrl_reg;
  logic clk = 0, rst = 1, tia_we = 0;
  logic [3:0] wdata = 0;
  logic lock, maria_en, cart_en, tia_en;
  int checks = 0, failures = 0;
  ctrl_reg dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [3:0] d, input logic en);
    @(negedge clk); wdata = d; tia_we = en;
    @(negedge clk); tia_we = 0;
  endtask
  task automatic expect_bits(input logic [3:0] e, input string what);
    checks++;
    if ({tia_en, cart_en, maria_en, lock} !== e) begin
      failures++; $display("%s: %b want %b", what, {tia_en, cart_en, maria_en, lock}, e);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst = 0;
    expect_bits(4'b0000, "reset");
    wr(4'b0110, 0);  expect_bits(4'b0000, "no strobe");
    wr(4'b0110, 1);  expect_bits(4'b0110, "maria+cart");
    wr(4'b1010, 1);  expect_bits(4'b0110, "both video enables refused");
    wr(4'b1000, 1);  expect_bits(4'b1000, "tia");
    wr(4'b0111, 1);  expect_bits(4'b0111, "lock");
    wr(4'b1000, 1);  expect_bits(4'b0111, "locked");
    wr(4'b0000, 1);  expect_bits(4'b0111, "still locked");
    @(negedge clk); rst = 1; @(negedge clk); rst = 0;
    expect_bits(4'b0000, "reset again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
