// tb_controller_if: self-checking test of the controller inputs: joystick
// pins to RIOT port A (after the two-flop input stage), two-button mode
// buttons on INPT0..3, and one-button mode merging both buttons into the
// active-low INPT4/INPT5 fire inputs. Random pin states, each compared with
// the expected mapping two cycles later.
module tb_controller_if;
  logic clk = 0, rst = 1, one_button = 0;
  logic [3:0] joy0_n = 4'hF, joy1_n = 4'hF;
  logic [1:0] btn0 = 0, btn1 = 0;
  logic [7:0] swcha;
  logic [5:0] inpt;
  int checks = 0, failures = 0;
  controller_if dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst = 0;
    for (int n = 0; n < 400; n++) begin
      logic [5:0] e;
      joy0_n = 4'($urandom); joy1_n = 4'($urandom);
      btn0 = 2'($urandom); btn1 = 2'($urandom);
      one_button = n[5];
      repeat (2) @(negedge clk);
      if (one_button) e = {!(btn1[0] || btn1[1]), !(btn0[0] || btn0[1]), 4'b0000};
      else            e = {1'b1, 1'b1, btn1[1], btn1[0], btn0[1], btn0[0]};
      checks++;
      if (swcha !== {joy0_n, joy1_n}) begin failures++; $display("swcha %h", swcha); end
      checks++;
      if (inpt !== e) begin failures++; $display("inpt %b want %b (one=%b)", inpt, e, one_button); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
