// frame_buffer_2600: two-frame buffer used for video in 2600 mode.
//
// In 2600 mode the TIA's own frame timing cannot be locked to the VGA
// raster, so the TIA writes whole frames of W x H colour bytes (160 x 192)
// into one buffer while the VGA side shows the other. When the TIA finishes
// a frame (`frame_done`, one-cycle pulse on the write clock) the two swap.
//
// Write side (wclk): `we` stores `wuv` at (`wx`, `wy`); positions outside
// the frame are ignored.
// Read side (rclk, VGA pixel clock): VGA (`col`, `row`) maps to frame pixel
// (col/4, (row-48)/2), so the 192 lines fill rows 48..431 centred in the
// 480-row screen; elsewhere the output is 0 (black). `uv` is registered, one
// cycle after the position. The index of the buffer being shown is passed
// to the VGA side through two flops.
// The frame size and the two-buffer queue follow the VGA description; the
// screen placement is this design's choice.
module frame_buffer_2600 #(
  parameter int unsigned W = 160,
  parameter int unsigned H = 192
) (
  input  logic       wclk,
  input  logic       rst,
  input  logic       we,
  input  logic [7:0] wx,
  input  logic [7:0] wy,
  input  logic [7:0] wuv,
  input  logic       frame_done,
  input  logic       rclk,
  input  logic [9:0] row,
  input  logic [9:0] col,
  output logic [7:0] uv
);

  localparam int unsigned FRAME = W * H;
  localparam int unsigned AW    = $clog2(2 * FRAME);
  localparam int unsigned TOP   = (480 - 2 * H) / 2;

  logic [7:0] mem [2 * FRAME];
  logic       wsel_q;              // buffer being written
  logic       rsel_s1, rsel_s2;    // buffer being shown, VGA domain

  always_ff @(posedge wclk) begin
    if (rst) begin
      wsel_q <= 1'b0;
    end else begin
      if (we && wx < 8'(W) && wy < 8'(H))
        mem[AW'(wsel_q) * AW'(FRAME) + AW'(wy) * AW'(W) + AW'(wx)] <= wuv;
      if (frame_done) wsel_q <= ~wsel_q;
    end
  end

  logic [9:0] fy, fx;
  logic       in_frame;
  always_comb begin
    fy = (row - 10'(TOP)) >> 1;
    fx = col >> 2;
    in_frame = (row >= 10'(TOP)) && (fy < 10'(H)) && (fx < 10'(W));
  end

  always_ff @(posedge rclk) begin
    rsel_s1 <= ~wsel_q;
    rsel_s2 <= rsel_s1;
    uv <= in_frame ? mem[AW'(rsel_s2) * AW'(FRAME) + AW'(fy) * AW'(W) + AW'(fx)] : 8'h00;
  end

endmodule
