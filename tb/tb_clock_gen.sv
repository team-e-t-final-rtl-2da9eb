// tb_clock_gen: self-checking test of the clock enables. Measures the
// spacing of cpu_ce with fast and slow devices (4 and 6 Maria cycles, i.e.
// 1.79 and 1.19 MHz from 7.16 MHz), the tia_ce rate (every 2nd cycle), and
// that mem_ce is on every cycle while halted and follows cpu_ce otherwise.
module tb_clock_gen;
  logic clk = 0, rst = 1, slow = 0, halt = 0;
  logic tia_ce, cpu_ce, mem_ce;
  int checks = 0, failures = 0;
  clock_gen dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input logic s, input int want);
    int last, n;
    slow = s; last = -1; n = 0;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      if (cpu_ce) begin
        if (last >= 0 && n > 1) begin
          checks++;
          if (t - last != want) begin failures++; $display("slow=%b spacing %0d want %0d", s, t - last, want); end
        end
        last = t; n++;
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst = 0;
    measure(0, 4);
    measure(1, 6);
    measure(0, 4);
    begin
      int nt; nt = 0;
      for (int t = 0; t < 100; t++) begin @(negedge clk); if (tia_ce) nt++; end
      checks++; if (nt != 50) begin failures++; $display("tia_ce %0d of 100", nt); end
    end
    halt = 1;
    for (int t = 0; t < 50; t++) begin @(negedge clk); checks++; if (!mem_ce) failures++; end
    halt = 0;
    for (int t = 0; t < 50; t++) begin @(negedge clk); checks++; if (mem_ce !== cpu_ce) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
