// maria_timing: Maria timing and control. Schedules the zone-list and
// display-list DMAs against the VGA raster, halts the CPU around them, swaps
// the line RAM, and drives NMI, RDY (WSYNC) and the VBlank status bit.
//
// One NTSC scanline is shown on two VGA rows. The VGA row number arrives
// from the VGA clock domain and is re-timed here (two flops plus a
// stable-for-two-samples check). A new Maria scanline starts at every even
// row 0..518 and at rows 519, 521 and 523; row 518 alone is a short line.
// A column counter restarts at each line start and counts Maria cycles,
// saturating at LINE_CYCLES-1.
//   row 519, column ZP_DMA_COL : zone-list DMA (once per frame)
//   rows 521, 523, 0, 2 .. 478 : display-list DMA for scanlines 0..241,
//                                starting at column DP_DMA_COL; the line
//                                starting at row 478 is the last (last_line)
// For each DMA, halt rises, HALT_LEAD cycles later the start pulse goes to
// the DMA controller, and halt falls when it reports done. A display-list DMA
// still running at column DP_KILL_COL is killed and halt falls one cycle
// later, once the DMA controller has stopped. A done pulse
// carrying a display-list interrupt raises NMI for NMI_CYCLES cycles from the
// cycle halt falls. The line RAM is swapped at the first line start after a
// display-list DMA, so scanline s is buffered on one line and shown on the
// next two VGA rows. DMA runs only while `enable` is set, ZP has been
// written, and a zone-list DMA has been done since `enable` rose.
// `ready` (RDY) drops on a WSYNC write and rises at the next line start.
// `vblank` is set for VGA rows VBLANK_ROW..524.
// Cycle numbers follow the Maria description; the exact line boundaries,
// the swap at the line start and the re-timing are this design's own.
module maria_timing
  import a78_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       enable,
  input  logic       zp_written,
  input  logic       wsync,
  input  logic [9:0] vga_row,
  input  logic       zp_dma_done,
  input  logic       dp_dma_done,
  input  logic       dli,
  output logic       halt,
  output logic       zp_dma_start,
  output logic       dp_dma_start,
  output logic       dp_dma_kill,
  output logic       last_line,
  output logic       lram_swap,
  output logic       nmi,
  output logic       ready,
  output logic       vblank,
  output logic [8:0] col_cnt
);

  typedef enum logic [1:0] {H_IDLE, H_LEAD, H_ZP, H_DP} hstate_e;

  logic [9:0] row_s1, row_s2, row_s3, row_q;
  logic       line_start;
  logic [3:0] lead_q;
  logic [2:0] nmi_q;
  logic       dp_line_q, did_dp_q, frame_ok_q, is_zp_q, lead_zp_q;
  hstate_e    hs_q;

  function automatic logic boundary(input logic [9:0] r);
    return (r[0] == 1'b0 && r <= 10'd518) || r == 10'd519 || r == 10'd521 || r == 10'd523;
  endfunction

  function automatic logic dp_row(input logic [9:0] r);
    return (r[0] == 1'b0 && r <= 10'd478) || r == 10'd521 || r == 10'd523;
  endfunction

  // Row re-timing from the VGA clock domain.
  always_ff @(posedge clk) begin
    if (rst) begin
      row_s1 <= '0; row_s2 <= '0; row_s3 <= '0; row_q <= '0;
      line_start <= 1'b0;
    end else begin
      row_s1 <= vga_row;
      row_s2 <= row_s1;
      row_s3 <= row_s2;
      line_start <= 1'b0;
      if (row_s2 == row_s3 && row_s3 != row_q) begin
        row_q <= row_s3;
        line_start <= boundary(row_s3);
      end
    end
  end

  assign vblank = (row_q >= 10'(VBLANK_ROW));

  always_ff @(posedge clk) begin
    if (rst) begin
      col_cnt <= '0;
      hs_q <= H_IDLE;
      lead_q <= '0;
      nmi_q <= '0;
      halt <= 1'b0;
      zp_dma_start <= 1'b0; dp_dma_start <= 1'b0; dp_dma_kill <= 1'b0;
      lram_swap <= 1'b0;
      ready <= 1'b1;
      dp_line_q <= 1'b0; did_dp_q <= 1'b0; frame_ok_q <= 1'b0; is_zp_q <= 1'b0; lead_zp_q <= 1'b0;
      last_line <= 1'b0;
    end else begin
      zp_dma_start <= 1'b0; dp_dma_start <= 1'b0; dp_dma_kill <= 1'b0;
      lram_swap <= 1'b0;
      if (nmi_q != 3'd0 && !halt) nmi_q <= nmi_q - 3'd1;

      if (!enable) frame_ok_q <= 1'b0;

      if (wsync) ready <= 1'b0;

      if (line_start) begin
        col_cnt   <= '0;
        ready     <= 1'b1;
        dp_line_q <= dp_row(row_q);
        last_line <= (row_q == 10'd478);
        is_zp_q   <= (row_q == 10'd519);
        lram_swap <= did_dp_q;
        did_dp_q  <= 1'b0;
      end else if (col_cnt != 9'(LINE_CYCLES - 1)) begin
        col_cnt <= col_cnt + 9'd1;
      end

      unique case (hs_q)
        H_IDLE: begin
          // after a kill, halt is held one more cycle so the DMA is idle
          // before the CPU gets the bus back
          if (dp_dma_kill) halt <= 1'b0;
          if (!line_start && enable && zp_written) begin
            if (is_zp_q && col_cnt == 9'(ZP_DMA_COL)) begin
              halt <= 1'b1; lead_q <= '0; hs_q <= H_LEAD; is_zp_q <= 1'b0; lead_zp_q <= 1'b1;
            end else if (dp_line_q && frame_ok_q && col_cnt == 9'(DP_DMA_COL)) begin
              halt <= 1'b1; lead_q <= '0; hs_q <= H_LEAD; dp_line_q <= 1'b0; lead_zp_q <= 1'b0;
            end
          end
        end
        H_LEAD: begin
          lead_q <= lead_q + 4'd1;
          if (lead_q == 4'(HALT_LEAD - 1)) begin
            if (!lead_zp_q) begin
              dp_dma_start <= 1'b1; did_dp_q <= 1'b1; hs_q <= H_DP;
            end else begin
              zp_dma_start <= 1'b1; hs_q <= H_ZP;
            end
          end
        end
        H_ZP: begin
          if (zp_dma_done) begin
            halt <= 1'b0; hs_q <= H_IDLE; frame_ok_q <= 1'b1;
            if (dli) nmi_q <= 3'(NMI_CYCLES);
          end
        end
        H_DP: begin
          if (dp_dma_done) begin
            halt <= 1'b0; hs_q <= H_IDLE;
            if (dli) nmi_q <= 3'(NMI_CYCLES);
          end else if (col_cnt >= 9'(DP_KILL_COL)) begin
            dp_dma_kill <= 1'b1; hs_q <= H_IDLE;
          end
        end
        default: hs_q <= H_IDLE;
      endcase
    end
  end

  assign nmi = (nmi_q != 3'd0) && !halt;

  // Handshake rules: a DMA start is only ever issued with the CPU halted,
  // and the kill is only issued for a display-list DMA.
  a_start_halted: assert property (@(posedge clk) disable iff (rst)
                                   (zp_dma_start || dp_dma_start) |-> halt);
  a_single_start: assert property (@(posedge clk) disable iff (rst)
                                   !(zp_dma_start && dp_dma_start));

endmodule
