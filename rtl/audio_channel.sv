// audio_channel: one TIA sound channel (divider, tone pattern, volume).
//
// `tick` is the ~31 kHz audio clock enable. A counter divides it by
// AUDF+1; each divided step advances the tone pattern selected by AUDC,
// whose current bit is `bit_out`. The sample is +AUDV*2184 for a 1 and
// -AUDV*2184 for a 0, so full volume gives +/-32760 (close to the 16-bit
// limits).
// Patterns (repeat length in steps) are built from a 4-bit (x^4+x^3+1), a
// 5-bit (x^5+x^3+1) and a 9-bit (x^9+x^5+1) polynomial counter, a divide-by-
// 31 square wave and a divide-by-3 prescaler:
//   0,B constant 1 (1)        1 poly4 (15)           2 poly4 stepped every
//   3 poly4 stepped on poly5 ones (465)              31 steps (465)
//   4,5 toggle (2)            6,A div31 square (31)  7,9 poly5 (31)
//   8 poly9 (511)             C,D toggle every 3 steps (6)
//   E div31 square every 3 steps (93)                F poly5 every 3 steps (93)
// The divider, the repeat lengths and the volume scaling follow the sound
// description; how each pattern is generated (polynomials, the 15/16 duty
// of the div31 square) is this design's own, chosen to give those lengths.
module audio_channel (
  input  logic               clk,
  input  logic               rst,
  input  logic               tick,
  input  logic [3:0]         audc,
  input  logic [4:0]         audf,
  input  logic [3:0]         audv,
  output logic               bit_out,
  output logic signed [15:0] sample
);

  logic [4:0] div_q;
  logic       step;
  logic [3:0] p4_q;
  logic [4:0] p5_q;
  logic [8:0] p9_q;
  logic [4:0] d31_q;
  logic [1:0] d3_q;
  logic       tog_q;
  logic [3:0] audc_q;

  always_ff @(posedge clk) begin
    if (rst) div_q <= '0;
    else if (tick) div_q <= (div_q >= audf) ? 5'd0 : div_q + 5'd1;
  end
  assign step = tick && (div_q >= audf);

  // Advance conditions for the pattern state.
  logic d3_wrap, d31_wrap;
  assign d3_wrap  = (d3_q == 2'd2);
  assign d31_wrap = (d31_q == 5'd30);

  always_ff @(posedge clk) begin
    if (rst) begin
      p4_q <= 4'hF; p5_q <= 5'h1F; p9_q <= 9'h1FF;
      d31_q <= '0; d3_q <= '0; tog_q <= 1'b0;
      audc_q <= '0;
    end else begin
      audc_q <= audc;
      if (audc != audc_q) begin
        // restart the pattern when the tone changes
        p4_q <= 4'hF; p5_q <= 5'h1F; p9_q <= 9'h1FF;
        d31_q <= '0; d3_q <= '0; tog_q <= 1'b0;
      end else if (step) begin
        d3_q <= d3_wrap ? 2'd0 : d3_q + 2'd1;
        unique case (audc)
          4'h1: p4_q <= {p4_q[2:0], p4_q[3] ^ p4_q[2]};
          4'h2: begin
            d31_q <= d31_wrap ? 5'd0 : d31_q + 5'd1;
            if (d31_wrap) p4_q <= {p4_q[2:0], p4_q[3] ^ p4_q[2]};
          end
          4'h3: begin
            p5_q <= {p5_q[3:0], p5_q[4] ^ p5_q[2]};
            if (p5_q[4]) p4_q <= {p4_q[2:0], p4_q[3] ^ p4_q[2]};
          end
          4'h4, 4'h5: tog_q <= ~tog_q;
          4'h6, 4'hA: d31_q <= d31_wrap ? 5'd0 : d31_q + 5'd1;
          4'h7, 4'h9: p5_q <= {p5_q[3:0], p5_q[4] ^ p5_q[2]};
          4'h8: p9_q <= {p9_q[7:0], p9_q[8] ^ p9_q[4]};
          4'hC, 4'hD: if (d3_wrap) tog_q <= ~tog_q;
          4'hE: if (d3_wrap) d31_q <= d31_wrap ? 5'd0 : d31_q + 5'd1;
          4'hF: if (d3_wrap) p5_q <= {p5_q[3:0], p5_q[4] ^ p5_q[2]};
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    unique case (audc_q)
      4'h1, 4'h2, 4'h3:       bit_out = p4_q[3];
      4'h4, 4'h5, 4'hC, 4'hD: bit_out = tog_q;
      4'h6, 4'hA, 4'hE:       bit_out = (d31_q < 5'd15);
      4'h7, 4'h9, 4'hF:       bit_out = p5_q[4];
      4'h8:                   bit_out = p9_q[8];
      default:                bit_out = 1'b1;
    endcase
  end

  logic signed [15:0] mag;
  assign mag    = 16'(audv) * 16'sd2184;
  assign sample = bit_out ? mag : -mag;

endmodule
