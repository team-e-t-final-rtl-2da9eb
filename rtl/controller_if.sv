// controller_if: joystick inputs for two Atari 7800 controllers.
//
// Each controller gives four active-low direction pins and two buttons
// (active high here; the controllers are held in two-button mode by their
// wiring). Every pin passes two flops to meet the Maria clock. Outputs:
//   swcha[7:4] = player 0 {right, left, down, up}, swcha[3:0] = player 1,
//                active low, for RIOT port A
//   inpt[5:0]  = TIA input pins INPT0..INPT5
// Two-button mode (`one_button` = 0): INPT0/INPT1 = player 0 right/left
// button, INPT2/INPT3 = player 1, active high; INPT4/INPT5 read 1 (released).
// One-button mode (the TIA video mode, or a program choosing it):
// INPT4/INPT5 = active-low fire, pressed when either button of that player
// is; INPT0..3 read 0. So the logic here, not the controller, turns the two
// buttons into the single 2600 trigger.
// The pin roles follow the controller description; the button-to-INPT
// mapping and the synchronizer are this design's choices.
module controller_if (
  input  logic       clk,
  input  logic       rst,
  input  logic       one_button,
  input  logic [3:0] joy0_n,
  input  logic [3:0] joy1_n,
  input  logic [1:0] btn0,     // {left, right}
  input  logic [1:0] btn1,
  output logic [7:0] swcha,
  output logic [5:0] inpt
);

  logic [11:0] s1, s2;

  always_ff @(posedge clk) begin
    if (rst) begin
      s1 <= {8'hFF, 4'h0};
      s2 <= {8'hFF, 4'h0};
    end else begin
      s1 <= {joy0_n, joy1_n, btn0, btn1};
      s2 <= s1;
    end
  end

  logic [1:0] b0, b1;
  assign swcha = s2[11:4];
  assign b0    = s2[3:2];
  assign b1    = s2[1:0];

  always_comb begin
    if (one_button) inpt = {~|b1, ~|b0, 4'b0000};
    else            inpt = {2'b11, b1[1], b1[0], b0[1], b0[0]};
  end

endmodule
