// tb_sram: self-checking test of the 2 KB work RAM: random writes and reads
// against a reference array, the one-cycle read register, and no change
// while ce is low.
module tb_sram;
  logic clk = 0, ce = 1, we = 0;
  logic [10:0] addr = 0;
  logic [7:0] wdata = 0, rdata;
  int checks = 0, failures = 0;
  sram dut (.*);
  always #5 clk = ~clk;
  logic [7:0] ref_mem [2048];

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2048; i++) begin
      @(negedge clk); addr = 11'(i); wdata = 8'($urandom); we = 1; ref_mem[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 3000; n++) begin
      logic [10:0] a;
      a = 11'($urandom);
      @(negedge clk);
      if ($urandom_range(0, 3) == 0) begin
        addr = a; wdata = 8'($urandom); we = 1; ref_mem[a] = wdata;
      end else begin
        addr = a; we = 0;
        @(negedge clk);
        checks++;
        if (rdata !== ref_mem[a]) begin failures++; $display("addr %h: %h want %h", a, rdata, ref_mem[a]); end
      end
    end
    @(negedge clk); we = 0;
    // ce low: no write, read register holds
    @(negedge clk); addr = 11'd5; @(negedge clk);
    ce = 0; addr = 11'd6; we = 1; wdata = ~ref_mem[6];
    @(negedge clk); @(negedge clk);
    checks++; if (rdata !== ref_mem[5]) begin failures++; $display("read moved without ce"); end
    we = 0; ce = 1; @(negedge clk); @(negedge clk);
    checks++; if (rdata !== ref_mem[6]) begin failures++; $display("write happened without ce"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
