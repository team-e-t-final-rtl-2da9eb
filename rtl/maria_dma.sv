// maria_dma: Maria DMA controller. Walks the zone list (display list list)
// and the display lists in memory and feeds graphics bytes to the line RAM.
//
// Memory format (all read over the shared address/data bus):
//   zone entry, 3 bytes at ZP: {DLIen, A12en, A11en, 0, OFFSET[3:0]}, DPH, DPL
//   4-byte object header: PPL, {PALETTE[2:0], WIDTH[4:0]}, PPH, HPOS
//   5-byte object header: PPL, {WM, 1, IND, 5'b0}, PPH, {PALETTE, WIDTH}, HPOS
//   end of display list : PPL, 8'h00
// WIDTH is the two's complement of the number of data bytes (characters in
// indirect mode). In direct mode the data byte address is {PPH+OFFSET, PPL}
// counting up; in indirect mode each byte at PP is a character code C and the
// data comes from {CHARBASE+OFFSET, C} (and {CHARBASE+OFFSET, C+1} when
// `cwidth` is set). A data address with bit 12 set while A12en, or bit 11 set
// while A11en ("holey" DMA), is not read: a zero byte is passed on instead,
// which writes nothing but still advances the line RAM position.
//
// Commands from the timing block:
//   zp_dma_start - once per frame: load ZP from `zp_base`, read the first zone
//                  entry, pulse zp_dma_done (with `dli` = its DLIen).
//   dp_dma_start - once per scanline: restart at the zone's display list and
//                  process objects until the end marker. At the end marker a
//                  non-zero OFFSET is decremented; a zero OFFSET (unless
//                  `last_line`) fetches the next zone entry (ZP += 3). Then
//                  dp_dma_done pulses, with `dli` = the new zone's DLIen.
//   dp_dma_kill  - abandons a display-list DMA at once (no done pulse).
//
// Bus timing: an address is held for one cycle, or for SLOW_CYCLES cycles
// when it lies in cartridge space (0x4000-0xFFFF); the byte is taken from
// `rdata` in the cycle after the last hold cycle (registered memories). So a
// fast byte costs two cycles and a slow one SLOW_CYCLES+1; the character
// code read is always treated as fast. Line RAM strobes come out registered,
// one cycle after the byte is taken, with the byte on `lr_data`.
// The formats, the holey rules, the offset handling and the fast/slow hold
// times follow the Maria description; the two-cycle access, the 0x4000
// cartridge boundary and the exact sequencing are this design's own.
// Lint reports address bits other than A12/A11 unused in the holey test.
module maria_dma
  import a78_pkg::*;
#(
  parameter int unsigned SLOW_CYCLES = 4
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        zp_dma_start,
  input  logic        dp_dma_start,
  input  logic        dp_dma_kill,
  input  logic        last_line,
  input  logic [15:0] zp_base,
  input  logic [7:0]  charbase,
  input  logic        cwidth,
  output logic [15:0] addr,
  input  logic [7:0]  rdata,
  output logic        busy,
  output logic [7:0]  lr_data,
  output logic        input_w,
  output logic        palette_w,
  output logic        wm_w,
  output logic        pixels_w,
  output logic        zp_dma_done,
  output logic        dp_dma_done,
  output logic        dli
);

  typedef enum logic [1:0] {ST_IDLE, ST_READ, ST_DATA} state_e;
  typedef enum logic [3:0] {
    F_ZP0, F_ZP1, F_ZP2, F_H0, F_H1, F_H2, F_H3, F_H4, F_PIX, F_CPTR, F_CPIX
  } fetch_e;

  state_e      state_q;
  fetch_e      fetch_q;
  logic [15:0] raddr_q;
  logic [2:0]  hold_q;
  logic        skip_q;      // holey: no bus read, byte is zero

  logic [15:0] zp_q, dl_q, dp_q, pp_q;
  logic [3:0]  offset_q;
  logic        dlien_q, a12_q, a11_q;
  logic [4:0]  width_q;
  logic        ind_q, five_q, second_q, zone_on_line_q;
  logic [7:0]  char_q, b0_q;

  assign addr = raddr_q;
  assign busy = (state_q != ST_IDLE);

  // Only A12 and A11 of the address matter (lint reports the rest unused).
  function automatic logic holey(input logic [15:0] a, input logic e12, input logic e11);
    return (e12 & a[12]) | (e11 & a[11]);
  endfunction

  // Data address of the current direct-mode byte / indirect character.
  logic [15:0] pix_addr, chr_addr;
  assign pix_addr = pp_q + {4'h0, offset_q, 8'h00};
  assign chr_addr = {charbase + {4'h0, offset_q}, char_q};

  logic [7:0] hold_len;
  assign hold_len = (is_cart_space(raddr_q) && fetch_q != F_CPTR) ? 8'(SLOW_CYCLES) : 8'd1;

  // Next-read helper values computed in ST_DATA.
  logic [4:0]  width_inc;
  assign width_inc = width_q + 5'd1;

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q <= ST_IDLE;
      fetch_q <= F_ZP0;
      raddr_q <= '0;
      hold_q <= '0;
      skip_q <= 1'b0;
      zp_q <= '0; dl_q <= '0; dp_q <= '0; pp_q <= '0;
      offset_q <= '0; dlien_q <= 1'b0; a12_q <= 1'b0; a11_q <= 1'b0;
      width_q <= '0; ind_q <= 1'b0; five_q <= 1'b0; second_q <= 1'b0;
      zone_on_line_q <= 1'b0; char_q <= '0; b0_q <= '0;
      lr_data <= '0; input_w <= 1'b0; palette_w <= 1'b0; wm_w <= 1'b0; pixels_w <= 1'b0;
      zp_dma_done <= 1'b0; dp_dma_done <= 1'b0; dli <= 1'b0;
    end else begin
      input_w <= 1'b0; palette_w <= 1'b0; wm_w <= 1'b0; pixels_w <= 1'b0;
      zp_dma_done <= 1'b0; dp_dma_done <= 1'b0; dli <= 1'b0;
      lr_data <= rdata;

      if (dp_dma_kill && state_q != ST_IDLE && zone_on_line_q) begin
        state_q <= ST_IDLE;
      end else begin
        unique case (state_q)
          ST_IDLE: begin
            if (zp_dma_start) begin
              zp_q <= zp_base;
              raddr_q <= zp_base;
              fetch_q <= F_ZP0;
              zone_on_line_q <= 1'b0;
              hold_q <= '0; skip_q <= 1'b0;
              state_q <= ST_READ;
            end else if (dp_dma_start) begin
              dp_q <= dl_q;
              raddr_q <= dl_q;
              fetch_q <= F_H0;
              zone_on_line_q <= 1'b1;
              hold_q <= '0; skip_q <= 1'b0;
              state_q <= ST_READ;
            end
          end

          ST_READ: begin
            if (skip_q || 8'(hold_q) + 8'd1 >= hold_len) begin
              state_q <= ST_DATA;
            end
            hold_q <= hold_q + 3'd1;
          end

          ST_DATA: begin
            // Default: next read, no skip.
            hold_q <= '0;
            skip_q <= 1'b0;
            state_q <= ST_READ;
            unique case (fetch_q)
              F_ZP0: begin
                {dlien_q, a12_q, a11_q} <= rdata[7:5];
                offset_q <= rdata[3:0];
                raddr_q <= zp_q + 16'd1; fetch_q <= F_ZP1;
              end
              F_ZP1: begin
                dl_q[15:8] <= rdata;
                raddr_q <= zp_q + 16'd2; fetch_q <= F_ZP2;
              end
              F_ZP2: begin
                dl_q[7:0] <= rdata;
                zp_q <= zp_q + 16'd3;
                state_q <= ST_IDLE;
                dli <= dlien_q;
                if (zone_on_line_q) dp_dma_done <= 1'b1;
                else                zp_dma_done <= 1'b1;
              end
              F_H0: begin
                b0_q <= rdata;
                raddr_q <= dp_q + 16'd1; fetch_q <= F_H1;
              end
              F_H1: begin
                if (rdata[4:0] != 5'd0) begin
                  // four-byte header: palette and width here
                  palette_w <= 1'b1;
                  width_q <= rdata[4:0];
                  ind_q <= 1'b0; five_q <= 1'b0;
                  raddr_q <= dp_q + 16'd2; fetch_q <= F_H2;
                end else if (rdata != 8'd0) begin
                  // five-byte header: write mode and indirect flag
                  wm_w <= 1'b1;
                  ind_q <= rdata[5]; five_q <= 1'b1;
                  raddr_q <= dp_q + 16'd2; fetch_q <= F_H2;
                end else begin
                  // end of display list
                  if (offset_q != 4'd0 || last_line) begin
                    if (offset_q != 4'd0) offset_q <= offset_q - 4'd1;
                    dp_dma_done <= 1'b1;
                    state_q <= ST_IDLE;
                  end else begin
                    raddr_q <= zp_q; fetch_q <= F_ZP0;
                  end
                end
              end
              F_H2: begin
                pp_q <= {rdata, b0_q};
                raddr_q <= dp_q + 16'd3;
                fetch_q <= five_q ? F_H3 : F_H4;
              end
              F_H3: begin
                palette_w <= 1'b1;
                width_q <= rdata[4:0];
                raddr_q <= dp_q + 16'd4; fetch_q <= F_H4;
              end
              F_H4: begin
                input_w <= 1'b1;
                dp_q <= dp_q + (five_q ? 16'd5 : 16'd4);
                second_q <= 1'b0;
                if (ind_q) begin
                  raddr_q <= pp_q; fetch_q <= F_CPTR;
                end else begin
                  raddr_q <= pix_addr; fetch_q <= F_PIX;
                  skip_q <= holey(pix_addr, a12_q, a11_q);
                end
              end
              F_PIX: begin
                pixels_w <= 1'b1;
                if (skip_q) lr_data <= 8'h00;
                pp_q <= pp_q + 16'd1;
                width_q <= width_inc;
                if (width_inc == 5'd0) begin
                  raddr_q <= dp_q; fetch_q <= F_H0;
                end else begin
                  raddr_q <= pix_addr + 16'd1;
                  skip_q <= holey(pix_addr + 16'd1, a12_q, a11_q);
                end
              end
              F_CPTR: begin
                char_q <= rdata;
                raddr_q <= {charbase + {4'h0, offset_q}, rdata};
                skip_q <= holey({charbase + {4'h0, offset_q}, rdata}, a12_q, a11_q);
                fetch_q <= F_CPIX;
              end
              F_CPIX: begin
                pixels_w <= 1'b1;
                if (skip_q) lr_data <= 8'h00;
                if (cwidth && !second_q) begin
                  second_q <= 1'b1;
                  raddr_q <= chr_addr + 16'd1;
                  skip_q <= holey(chr_addr + 16'd1, a12_q, a11_q);
                end else begin
                  second_q <= 1'b0;
                  pp_q <= pp_q + 16'd1;
                  width_q <= width_inc;
                  if (width_inc == 5'd0) begin
                    raddr_q <= dp_q; fetch_q <= F_H0;
                  end else begin
                    raddr_q <= pp_q + 16'd1; fetch_q <= F_CPTR;
                  end
                end
              end
              default: state_q <= ST_IDLE;
            endcase
          end
          default: state_q <= ST_IDLE;
        endcase
      end
    end
  end

  // A zone-list fetch and a display-list fetch never finish together.
  property p_no_overlap;
    @(posedge clk) disable iff (rst) !(zp_dma_done && dp_dma_done);
  endproperty
  assert property (p_no_overlap);

endmodule
