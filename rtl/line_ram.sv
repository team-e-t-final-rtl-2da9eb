// line_ram: Maria double line buffer (input line RAM + playback line RAM).
//
// Two arrays of 160 five-bit cells. Each cell holds two horizontal pixels.
// The DMA controller fills the input (buffer) array during one scanline while
// the VGA side reads the playback array; on `swap` the buffer is copied into
// the playback array and cleared to zero.
//
// Write side (clk, the 7.16 MHz Maria clock), all strobes one cycle wide and
// sampling `data`:
//   input_w   - load the 8-bit horizontal position (cell index) register
//   palette_w - load the 3-bit palette register from data[7:5]
//   wm_w      - load the write-mode bit from data[7]
//   pixels_w  - write one byte of graphics data at the position register and
//               advance the position by the number of cells written
// With palette {P2,P1,P0} and data {D7..D0}:
//   wm = 1 : two cells  {P2,D3,D2,D7,D6}, {P2,D1,D0,D5,D4}
//   wm = 0 : four cells {P2,P1,P0,D7,D6}, {..,D5,D4}, {..,D3,D2}, {..,D1,D0}
// A cell whose data bits are all zero is not written (transparent), nor is a
// cell whose index is above 159. The position register wraps at 256.
// Kangaroo mode (`km`, CONTROL.KM, Maria clock domain like `rm`): with a
// two-cell write and a 320-wide read mode (rm = 1x), a pixel of the written
// cell whose new colour bits are zero keeps its old bits, so it stays
// transparent instead of showing the background. Without it the whole
// cell is replaced and that pixel shows the background.
//
// Read side (rclk, the VGA pixel clock): `rcol` is a 320-wide pixel column;
// rcol[8:1] picks the cell and rcol[0] (R) the right pixel. One cycle later
// `rd_index` = {palette[2:0], color[1:0]} per the read mode `rm`:
//   rm = 00/01 : palette {L4,L3,L2}, color {L1,L0}
//   rm = 10    : palette {L4,0,0},   color R ? {L0,L2} : {L1,L3}
//   rm = 11    : palette {L4,L3,L2}, color R ? {L0,0}  : {L1,0}
// color == 0 means background; the colour-map lookup handles that.
// The two-cell write layout and the rm = 10/11 decodes follow the Maria
// description, as does the kangaroo-mode rule; the four-cell layout, the
// pixel bit groups used for it, the choice of which wm value selects
// which layout, the rm = 00 decode and the per-cell transparency test are
// this design's own reading.
module line_ram
#(
  parameter int unsigned CELLS = 160
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] data,
  input  logic       input_w,
  input  logic       palette_w,
  input  logic       wm_w,
  input  logic       pixels_w,
  input  logic       swap,
  input  logic       rclk,
  input  logic [8:0] rcol,
  input  logic [1:0] rm,
  input  logic       km,
  output logic [4:0] rd_index
);

  logic [4:0] buf_q  [CELLS];
  logic [4:0] play_q [CELLS];
  logic [7:0] pos_q;
  logic [2:0] pal_q;
  logic       wm_q;

  // Kangaroo mode: in the 320-wide read modes a two-cell write keeps the
  // old bits of a pixel whose new colour is zero. Bits of each pixel:
  //   rm = 10: left {L1,L3}, right {L0,L2};  rm = 11: left L1, right L0.
  function automatic logic [4:0] km_merge(input logic [4:0] nv, input logic [4:0] ov,
                                          input logic [1:0] m);
    logic [4:0] lmask, rmask, keep;
    lmask = (m == 2'b10) ? 5'b01010 : 5'b00010;
    rmask = (m == 2'b10) ? 5'b00101 : 5'b00001;
    keep  = ((nv & lmask) == 5'd0 ? lmask : 5'd0) | ((nv & rmask) == 5'd0 ? rmask : 5'd0);
    return (nv & ~keep) | (ov & keep);
  endfunction

  // Cells produced by one pixels_w byte.
  logic [4:0] cval [4];
  logic [3:0] cval_ok;
  always_comb begin
    if (wm_q) begin
      cval[0] = {pal_q[2], data[3:2], data[7:6]};
      cval[1] = {pal_q[2], data[1:0], data[5:4]};
      cval[2] = '0;
      cval[3] = '0;
      cval_ok = {2'b00, |{data[1:0], data[5:4]}, |{data[3:2], data[7:6]}};
    end else begin
      cval[0] = {pal_q, data[7:6]};
      cval[1] = {pal_q, data[5:4]};
      cval[2] = {pal_q, data[3:2]};
      cval[3] = {pal_q, data[1:0]};
      cval_ok = {|data[1:0], |data[3:2], |data[5:4], |data[7:6]};
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pos_q <= '0;
      pal_q <= '0;
      wm_q  <= 1'b0;
      for (int i = 0; i < CELLS; i++) begin
        buf_q[i]  <= '0;
        play_q[i] <= '0;
      end
    end else if (swap) begin
      for (int i = 0; i < CELLS; i++) begin
        play_q[i] <= buf_q[i];
        buf_q[i]  <= '0;
      end
    end else begin
      if (input_w)   pos_q <= data;
      if (palette_w) pal_q <= data[7:5];
      if (wm_w)      wm_q  <= data[7];
      if (pixels_w) begin
        for (int k = 0; k < 4; k++) begin
          logic [7:0] idx;
          idx = pos_q + 8'(k);
          if ((wm_q == 1'b0 || k < 2) && cval_ok[k] && idx < 8'(CELLS))
            buf_q[idx] <= (km && wm_q && rm[1]) ? km_merge(cval[k], buf_q[idx], rm) : cval[k];
        end
        pos_q <= pos_q + (wm_q ? 8'd2 : 8'd4);
      end
    end
  end

  // Playback read, VGA clock domain.
  always_ff @(posedge rclk) begin
    logic [4:0] l;
    logic       r;
    l = (rcol[8:1] < 8'(CELLS)) ? play_q[rcol[8:1]] : 5'd0;
    r = rcol[0];
    unique case (rm)
      2'b10:   rd_index <= {l[4], 2'b00, (r ? {l[0], l[2]} : {l[1], l[3]})};
      2'b11:   rd_index <= {l[4:2], (r ? {l[0], 1'b0} : {l[1], 1'b0})};
      default: rd_index <= l;
    endcase
  end

endmodule
