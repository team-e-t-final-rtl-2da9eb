// tb_bus_mux: self-checking test of the buffered chip select: the read bus
// shows the device selected on the previous enabled edge, not the current
// one, holds while ce is low, and reads 0xFF for no device.
module tb_bus_mux;
  import a78_pkg::*;
  logic clk = 0, rst = 1, ce = 1;
  dev_e dev = DEV_NONE, sel_q;
  logic [7:0] tia_rdata = 8'h11, maria_rdata = 8'h22, riot_rdata = 8'h33, ram0_rdata = 8'h44,
              ram1_rdata = 8'h55, cart_rdata = 8'h66, bios_rdata = 8'h77, rdata;
  int checks = 0, failures = 0;
  bus_mux dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] val(input dev_e d);
    unique case (d)
      DEV_TIA: return 8'h11; DEV_MARIA: return 8'h22; DEV_RIOT: return 8'h33; DEV_RAM0: return 8'h44;
      DEV_RAM1: return 8'h55; DEV_CART: return 8'h66; DEV_BIOS: return 8'h77; default: return 8'hFF;
    endcase
  endfunction

  initial begin
    dev_e prev;
    @(negedge clk); rst = 0;
    prev = DEV_NONE;
    for (int n = 0; n < 200; n++) begin
      dev = dev_e'($urandom_range(0, 7));
      ce = ($urandom_range(0, 3) != 0);
      @(negedge clk);
      if (ce) prev = dev;
      checks++;
      if (rdata !== val(prev)) begin failures++; $display("n=%0d rdata %h want %h", n, rdata, val(prev)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
