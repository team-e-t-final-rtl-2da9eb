// memory_map: Maria address decoder and Maria register file.
//
// Decode (combinational, `dev` and `slow` for the address on the bus):
//   7800 map (maria_en = 1)
//     0x0000-0x001F (+ mirrors 0x100/0x200/0x300) TIA       (slow)
//     0x0020-0x003F (+ mirrors 0x120/0x220/0x320) Maria registers
//     0x0040-0x00FF, 0x0140-0x01FF,
//     0x0240-0x027F, 0x0340-0x037F                 RAM0 (A10..A0)
//     0x0280-0x02FF, 0x0380-0x03FF,
//     0x0480-0x04FF, 0x0580-0x05FF                 RIOT      (slow)
//     0x1800-0x1FFF                                RAM1
//     0x2000-0x27FF                                RAM0
//     0x4000-0xFFFF                                cartridge
//   2600 map (maria_en = 0), A12 = 1 cartridge, else A7 = 1 RIOT, else TIA.
//   In both maps 0x8000-0xFFFF reads the BIOS ROM while `cart_en` is 0.
// Registers (written when the decoded device is Maria, `we` and `ce`):
//   offset 0x00 background colour, 0x04*p+c colour c (1..3) of palette p,
//   0x04 WSYNC (pulse `wsync`), 0x0C ZPH, 0x10 ZPL, 0x14 CHARBASE,
//   0x1C CONTROL. Reading offset 0x08 (STATRD) returns {vblank, 7'b0}; the
//   other registers are write-only and read as zero. `rdata` is registered
//   on `ce`, one bus cycle after the address, like the other bus devices.
// Colour map lookup (combinational): `cm_index` = {palette, color}; colour 0
// gives the background register, otherwise register P<palette>C<color>.
// `zp_written` sets on the first ZPL write after reset.
// The ranges follow the memory-map table; which mirrors are decoded, the
// BIOS range in 2600 mode and the point at which `zp_written` sets are this
// design's own reading of it. Address bit 8 is not decoded (the 0x100
// mirrors), so lint reports it unused.
module memory_map
  import a78_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        ce,
  input  logic [15:0] addr,
  input  logic [7:0]  wdata,
  input  logic        we,
  input  logic        maria_en,
  input  logic        cart_en,
  input  logic        vblank,
  output dev_e        dev,
  output logic        slow,
  output logic [7:0]  rdata,
  output logic        wsync,
  output logic [15:0] zp,
  output logic        zp_written,
  output logic [7:0]  charbase,
  output maria_ctrl_t ctrl,
  input  logic [4:0]  cm_index,
  output logic [7:0]  cm_uv
);

  logic [7:0] color_q [32];

  // ---------------- decode ----------------
  always_comb begin
    dev = DEV_NONE;
    if (addr[15] && !cart_en) begin
      dev = DEV_BIOS;
    end else if (maria_en) begin
      if (addr[15] | addr[14])           dev = DEV_CART;
      else if (addr[15:11] == 5'b00011)  dev = DEV_RAM1;
      else if (addr[15:11] == 5'b00100)  dev = DEV_RAM0;
      else if (addr[15:10] == 6'b000000) begin
        if (addr[9] && addr[7])          dev = DEV_RIOT;
        else if (addr[7] || addr[6])     dev = DEV_RAM0;
        else if (addr[5])                dev = DEV_MARIA;
        else                             dev = DEV_TIA;
      end else if (addr[15:10] == 6'b000001 && !addr[9] && addr[7]) begin
        dev = DEV_RIOT;
      end
    end else begin
      if (addr[12])                      dev = DEV_CART;
      else if (addr[7])                  dev = DEV_RIOT;
      else                               dev = DEV_TIA;
    end
  end

  assign slow = (dev == DEV_TIA) || (dev == DEV_RIOT);

  // ---------------- registers ----------------
  logic       reg_we;
  logic [4:0] off;
  assign reg_we = ce && we && (dev == DEV_MARIA);
  assign off    = addr[4:0];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 32; i++) color_q[i] <= '0;
      zp <= '0;
      zp_written <= 1'b0;
      charbase <= '0;
      ctrl <= '0;
      rdata <= '0;
      wsync <= 1'b0;
    end else begin
      wsync <= 1'b0;
      if (reg_we) begin
        if (off[1:0] != 2'b00 || {1'b1, off} == REG_BACKGRND) begin
          color_q[off] <= wdata;
        end else begin
          unique case ({1'b1, off})
            REG_WSYNC:    wsync <= 1'b1;
            REG_ZPH:      zp[15:8] <= wdata;
            REG_ZPL:      begin zp[7:0] <= wdata; zp_written <= 1'b1; end
            REG_CHARBASE: charbase <= wdata;
            REG_CONTROL:  ctrl <= maria_ctrl_t'(wdata);
            default: ;
          endcase
        end
      end
      if (ce) rdata <= ({1'b1, off} == REG_STATRD) ? {vblank, 7'b0} : 8'h00;
    end
  end

  // ---------------- colour map ----------------
  assign cm_uv = (cm_index[1:0] == 2'b00) ? color_q[0] : color_q[cm_index];

endmodule
