// sound: the console's two-channel TIA sound system.
//
// Holds the six TIA audio registers, written over the system bus when the
// TIA is selected (`we` high for one cycle, `addr` = TIA register number):
//   0x15 AUDC0  0x16 AUDC1 (tone, 4 bits)   0x17 AUDF0  0x18 AUDF1 (divide, 5 bits)
//   0x19 AUDV0  0x1A AUDV1 (volume, 4 bits)
// The audio clock enable is the TIA rate (`tia_ce`, 3.58 MHz) divided by
// AUDIO_DIV (114, giving ~31.4 kHz, two steps per 228-clock TIA line). Each
// channel is an audio_channel; the two 16-bit samples are averaged into
// `mix` for the audio codec, updated every Maria cycle; `ch_bit` shows each
// channel's current pattern bit.
// Register addresses and widths follow the TIA tables; the audio clock
// divisor and the averaging mix are this design's choice.
module sound #(
  parameter int unsigned AUDIO_DIV = 114
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               tia_ce,
  input  logic               we,
  input  logic [5:0]         addr,
  input  logic [4:0]         wdata,
  output logic               tick,
  output logic [1:0]         ch_bit,
  output logic signed [15:0] mix
);

  logic [3:0] audc [2];
  logic [4:0] audf [2];
  logic [3:0] audv [2];
  logic [$clog2(AUDIO_DIV)-1:0] div_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 2; i++) begin
        audc[i] <= '0; audf[i] <= '0; audv[i] <= '0;
      end
    end else if (we) begin
      unique case (addr)
        6'h15: audc[0] <= wdata[3:0];
        6'h16: audc[1] <= wdata[3:0];
        6'h17: audf[0] <= wdata[4:0];
        6'h18: audf[1] <= wdata[4:0];
        6'h19: audv[0] <= wdata[3:0];
        6'h1A: audv[1] <= wdata[3:0];
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      div_q <= '0;
      tick  <= 1'b0;
    end else begin
      tick <= 1'b0;
      if (tia_ce) begin
        if (div_q == $bits(div_q)'(AUDIO_DIV - 1)) begin
          div_q <= '0;
          tick  <= 1'b1;
        end else begin
          div_q <= div_q + 1'b1;
        end
      end
    end
  end

  logic signed [15:0] s [2];
  for (genvar c = 0; c < 2; c++) begin : g_ch
    audio_channel u_ch (
      .clk, .rst, .tick,
      .audc(audc[c]), .audf(audf[c]), .audv(audv[c]),
      .bit_out(ch_bit[c]), .sample(s[c])
    );
  end

  always_ff @(posedge clk) begin
    if (rst) mix <= '0;
    else     mix <= 16'((17'(s[0]) + 17'(s[1])) >>> 1);
  end

endmodule
