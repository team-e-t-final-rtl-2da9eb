// uv_to_rgb: converts an 8-bit Atari colour byte to 12-bit VGA RGB.
//
// The colour byte is {hue[3:0], lum[3:0]}: the high nibble picks one of 16
// hues (0 = grey), the low nibble the brightness. The conversion is one
// combinational lookup per channel, registered on the VGA clock (one cycle
// of latency), as a 256-entry ROM would be.
// Table formula (this design's own approximation of the console's NTSC
// palette): Y = 17*lum; for hue h > 0 the chroma vector is
// (Cb, Cr) = 40*(cos a, sin a) with a = 167 - 24*(h-1) degrees, so the hues
// run gold, orange, red, pink, purple, blue, cyan, green, olive as on an NTSC
// set; R = Y + 1.5*Cr, G = Y - (Cb + 2*Cr)/3, B = Y + 1.75*Cb, each clamped
// to 0..255, and the top four bits of each are output. Only the angles'
// rounded sine/cosine values are stored.
module uv_to_rgb (
  input  logic        clk,
  input  logic [7:0]  uv,
  output logic [11:0] rgb
);

  // 40*cos(a), 40*sin(a) for hues 1..15 (index 0 unused: grey).
  function automatic logic signed [7:0] cb_of(input logic [3:0] h);
    unique case (h)
      4'd1: return -8'sd39;  4'd2: return -8'sd32;  4'd3: return -8'sd19;
      4'd4: return -8'sd3;   4'd5: return  8'sd13;  4'd6: return  8'sd27;
      4'd7: return  8'sd37;  4'd8: return  8'sd40;  4'd9: return  8'sd36;
      4'd10: return 8'sd26;  4'd11: return 8'sd12;  4'd12: return -8'sd5;
      4'd13: return -8'sd21; 4'd14: return -8'sd33; 4'd15: return -8'sd39;
      default: return 8'sd0;
    endcase
  endfunction

  function automatic logic signed [7:0] cr_of(input logic [3:0] h);
    unique case (h)
      4'd1: return 8'sd9;    4'd2: return 8'sd24;   4'd3: return 8'sd35;
      4'd4: return 8'sd40;   4'd5: return 8'sd38;   4'd6: return 8'sd29;
      4'd7: return 8'sd16;   4'd8: return -8'sd1;   4'd9: return -8'sd17;
      4'd10: return -8'sd30; 4'd11: return -8'sd38; 4'd12: return -8'sd40;
      4'd13: return -8'sd34; 4'd14: return -8'sd23; 4'd15: return -8'sd8;
      default: return 8'sd0;
    endcase
  endfunction

  function automatic logic [3:0] clamp4(input logic signed [11:0] v);
    if (v < 0)        return 4'h0;
    else if (v > 255) return 4'hF;
    else              return v[7:4];
  endfunction

  logic signed [11:0] y, cb, cr, r, g, b;
  always_comb begin
    y  = 12'(17 * uv[3:0]);
    cb = 12'(cb_of(uv[7:4]));
    cr = 12'(cr_of(uv[7:4]));
    r  = y + cr + (cr >>> 1);
    g  = y - (cb + 2 * cr) / 3;
    b  = y + cb + (cb >>> 1) + (cb >>> 2);
  end

  always_ff @(posedge clk) rgb <= {clamp4(r), clamp4(g), clamp4(b)};

endmodule
