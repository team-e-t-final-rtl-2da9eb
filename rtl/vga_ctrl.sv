// vga_ctrl: 640x480 VGA raster generator.
//
// A column counter runs 0..799 and a row counter 0..524 on the VGA pixel
// clock. hsync_n is low for columns 656..751 and vsync_n for rows 490..491;
// `active` marks the visible 640x480 area. The counters themselves are
// outputs: the Maria uses the row to place its DMA and the column (halved)
// to read the line RAM, and the 2600 frame buffer uses both. The colour
// for a pixel (`rgb_in`) arrives from outside PIPE_DELAY cycles after its
// column is on the counters (the line RAM or frame buffer read plus the
// colour conversion); the sync and visible-area flags are delayed by the
// same amount so that colour and syncs leave the output flops together,
// black outside the visible area. `active` itself is undelayed.
// The counter ranges and sync positions follow the VGA description; the sync
// polarity is this design's choice (the usual negative polarity of 640x480).
module vga_ctrl
  import a78_pkg::*;
#(
  parameter int unsigned PIPE_DELAY = 2
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [11:0] rgb_in,
  output logic [9:0]  row,
  output logic [9:0]  col,
  output logic        active,
  output logic        hsync_n,
  output logic        vsync_n,
  output logic [11:0] rgb
);

  always_ff @(posedge clk) begin
    if (rst) begin
      row <= '0;
      col <= '0;
    end else if (col == 10'(VGA_COLS - 1)) begin
      col <= '0;
      row <= (row == 10'(VGA_ROWS - 1)) ? 10'd0 : row + 10'd1;
    end else begin
      col <= col + 10'd1;
    end
  end

  assign active = (col < 10'(VGA_VIS_COLS)) && (row < 10'(VGA_VIS_ROWS));

  // index 0: flags of the current counters; index i: i cycles old
  logic [PIPE_DELAY:0] hs_p, vs_p, act_p;
  assign hs_p[0]  = (col >= 10'(VGA_HS_BEGIN) && col <= 10'(VGA_HS_END));
  assign vs_p[0]  = (row >= 10'(VGA_VS_BEGIN) && row <= 10'(VGA_VS_END));
  assign act_p[0] = active;

  always_ff @(posedge clk) begin
    if (rst) begin
      hsync_n <= 1'b1;
      vsync_n <= 1'b1;
      rgb     <= '0;
      for (int i = 1; i <= PIPE_DELAY; i++) begin
        hs_p[i] <= 1'b0; vs_p[i] <= 1'b0; act_p[i] <= 1'b0;
      end
    end else begin
      for (int i = 1; i <= PIPE_DELAY; i++) begin
        hs_p[i] <= hs_p[i-1]; vs_p[i] <= vs_p[i-1]; act_p[i] <= act_p[i-1];
      end
      hsync_n <= !hs_p[PIPE_DELAY];
      vsync_n <= !vs_p[PIPE_DELAY];
      rgb     <= act_p[PIPE_DELAY] ? rgb_in : 12'h000;
    end
  end

endmodule
