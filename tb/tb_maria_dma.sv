// tb_maria_dma: self-checking test of the Maria DMA controller.
//
// A 64 KB memory with a registered read port stands in for the bus. The
// testbench lays out a zone list with four zones covering direct objects
// (4- and 5-byte headers), slow cartridge-space data, indirect (character)
// objects with one- and two-byte characters, holey DMA and the last-line
// rule. A reference walker written here follows the same memory and
// predicts, for every DMA, the line RAM strobes with their bytes, the DLI
// flag and the cycle count (one hold cycle per fast byte, SLOW_CYCLES per
// cartridge byte, plus one data cycle each). The DUT's strobes are recorded
// and compared one by one. A killed DMA must stop at once with no done.
module tb_maria_dma;
  localparam int SLOW = 4;
  logic clk = 0, rst = 1;
  logic zp_dma_start = 0, dp_dma_start = 0, dp_dma_kill = 0, last_line = 0;
  logic [15:0] zp_base = 16'h1800;
  logic [7:0] charbase = 8'h30;
  logic cwidth = 0;
  logic [15:0] addr;
  logic [7:0] rdata;
  logic busy, input_w, palette_w, wm_w, pixels_w, zp_dma_done, dp_dma_done, dli;
  logic [7:0] lr_data;
  int checks = 0, failures = 0;
  int cyc = 0;

  maria_dma #(.SLOW_CYCLES(SLOW)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  logic [7:0] mem [65536];
  always @(posedge clk) rdata <= mem[addr];

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // recorded strobes: {kind, data}; kind 0 input, 1 palette, 2 wm, 3 pixels
  logic [9:0] got [$];
  always @(posedge clk) begin
    if (input_w)   got.push_back({2'd0, lr_data});
    if (palette_w) got.push_back({2'd1, lr_data});
    if (wm_w)      got.push_back({2'd2, lr_data});
    if (pixels_w)  got.push_back({2'd3, lr_data});
  end

  // ---------------- reference walker ----------------
  logic [9:0] exp_q [$];
  int exp_cycles;
  logic [15:0] m_zp, m_dl;
  logic [3:0] m_off;
  logic m_dli, m_a12, m_a11;

  function automatic int cost(input logic [15:0] a, input bit fast_only);
    return (a >= 16'h4000 && !fast_only) ? SLOW + 1 : 2;
  endfunction

  function automatic bit is_holey(input logic [15:0] a);
    return (m_a12 && a[12]) || (m_a11 && a[11]);
  endfunction

  function automatic void ref_zone();
    {m_dli, m_a12, m_a11} = mem[m_zp][7:5];
    m_off = mem[m_zp][3:0];
    m_dl = {mem[m_zp + 1], mem[m_zp + 2]};
    exp_cycles += cost(m_zp, 0) + cost(m_zp + 1, 0) + cost(m_zp + 2, 0);
    m_zp = m_zp + 3;
  endfunction

  // Returns the DLI flag expected with the done pulse.
  function automatic bit ref_line(input bit is_last);
    logic [15:0] dp, pp, a;
    logic [7:0] b1, w;
    bit ind, five;
    dp = m_dl;
    exp_cycles = 0;
    forever begin
      b1 = mem[dp + 1];
      exp_cycles += cost(dp, 0) + cost(dp + 1, 0);
      if (b1 == 0) begin
        if (m_off != 0 || is_last) begin
          if (m_off != 0) m_off--;
          return 0;
        end
        ref_zone();
        return m_dli;
      end
      five = (b1[4:0] == 0);
      pp = {mem[dp + 2], mem[dp]};
      exp_cycles += cost(dp + 2, 0) + cost(dp + 3, 0);
      if (five) begin
        exp_q.push_back({2'd2, b1});
        ind = b1[5];
        w = mem[dp + 3];
        exp_q.push_back({2'd1, w});
        exp_q.push_back({2'd0, mem[dp + 4]});
        exp_cycles += cost(dp + 4, 0);
        dp = dp + 5;
      end else begin
        ind = 0;
        w = b1;
        exp_q.push_back({2'd1, b1});
        exp_q.push_back({2'd0, mem[dp + 3]});
        dp = dp + 4;
      end
      for (int n = 0; n < 32 - int'(w[4:0]); n++) begin
        if (!ind) begin
          a = pp + {4'h0, m_off, 8'h00};
          if (is_holey(a)) begin exp_q.push_back({2'd3, 8'h00}); exp_cycles += 2; end
          else begin exp_q.push_back({2'd3, mem[a]}); exp_cycles += cost(a, 0); end
        end else begin
          logic [7:0] ch;
          ch = mem[pp];
          exp_cycles += 2;
          for (int k = 0; k < (cwidth ? 2 : 1); k++) begin
            a = {charbase + {4'h0, m_off}, 8'(ch + k)};
            if (is_holey(a)) begin exp_q.push_back({2'd3, 8'h00}); exp_cycles += 2; end
            else begin exp_q.push_back({2'd3, mem[a]}); exp_cycles += cost(a, 0); end
          end
        end
        pp++;
      end
    end
  endfunction

  // ---------------- drivers ----------------
  task automatic run_zp();
    int t0;
    m_zp = zp_base; exp_cycles = 0;
    ref_zone();
    got.delete();
    @(negedge clk); zp_dma_start = 1; t0 = cyc;
    @(negedge clk); zp_dma_start = 0;
    while (!zp_dma_done) @(negedge clk);
    checks++;
    if (dli !== m_dli) begin failures++; $display("zp dli %b want %b", dli, m_dli); end
    checks++;
    if (cyc - t0 != exp_cycles + 1) begin failures++; $display("zp cycles %0d want %0d", cyc - t0, exp_cycles + 1); end
    checks++;
    if (got.size() != 0) begin failures++; $display("zp dma made line RAM strobes"); end
  endtask

  task automatic run_line(input bit is_last);
    int t0; bit edli;
    exp_q.delete(); got.delete();
    last_line = is_last;
    edli = ref_line(is_last);
    @(negedge clk); dp_dma_start = 1; t0 = cyc;
    @(negedge clk); dp_dma_start = 0;
    while (!dp_dma_done) @(negedge clk);
    checks++;
    if (dli !== edli) begin failures++; $display("line dli %b want %b", dli, edli); end
    @(negedge clk);
    checks++;
    if (got.size() != exp_q.size()) begin
      failures++; $display("strobe count %0d want %0d", got.size(), exp_q.size());
    end else begin
      foreach (exp_q[i]) begin
        checks++;
        if (got[i] !== exp_q[i]) begin
          failures++;
          if (failures < 12) $display("strobe %0d: got %h want %h", i, got[i], exp_q[i]);
        end
      end
    end
    checks++;
    if (cyc - t0 - 1 != exp_cycles + 1) begin failures++; $display("line cycles %0d want %0d", cyc - t0 - 1, exp_cycles + 1); end
  endtask

  logic seen_dli;
  always @(posedge clk) if (dp_dma_done && dli) seen_dli <= 1;

  initial begin
    for (int i = 0; i < 65536; i++) mem[i] = 8'(i * 7 + (i >> 8) * 13 + 1);
    // zone list at 0x1800
    mem['h1800] = 8'h81; mem['h1801] = 8'h19; mem['h1802] = 8'h00;  // DLI, offset 1, DL 0x1900
    mem['h1803] = 8'h00; mem['h1804] = 8'h19; mem['h1805] = 8'h40;  // offset 0, DL 0x1940
    mem['h1806] = 8'hC0; mem['h1807] = 8'h19; mem['h1808] = 8'h60;  // DLI, A12en, DL 0x1960
    // DL 0x1900: 4-byte direct, 5-byte two-cell from cartridge, end
    mem['h1900] = 8'h00; mem['h1901] = 8'h7E; mem['h1902] = 8'h20; mem['h1903] = 8'd8;
    mem['h1904] = 8'h10; mem['h1905] = 8'hC0; mem['h1906] = 8'hA0; mem['h1907] = 8'h3F; mem['h1908] = 8'd40;
    mem['h1909] = 8'h00; mem['h190A] = 8'h00;
    // DL 0x1940: 5-byte indirect, 2 characters at 0x1980, end
    mem['h1940] = 8'h80; mem['h1941] = 8'h60; mem['h1942] = 8'h19; mem['h1943] = 8'h5E; mem['h1944] = 8'd60;
    mem['h1945] = 8'h00; mem['h1946] = 8'h00;
    mem['h1980] = 8'h05; mem['h1981] = 8'h07;
    // DL 0x1960: holey object at 0x1000 (bit 12), plain one at 0x2000, end
    mem['h1960] = 8'h00; mem['h1961] = 8'h1E; mem['h1962] = 8'h10; mem['h1963] = 8'd4;
    mem['h1964] = 8'h00; mem['h1965] = 8'h3F; mem['h1966] = 8'h20; mem['h1967] = 8'd90;
    mem['h1968] = 8'h00; mem['h1969] = 8'h00;
    seen_dli = 0;

    repeat (3) @(negedge clk); rst = 0;

    for (int frame = 0; frame < 2; frame++) begin
      cwidth = frame[0];
      run_zp();
      run_line(0);   // zone 0, offset 1
      run_line(0);   // zone 0, offset 0 -> fetch zone 1
      run_line(0);   // zone 1 indirect -> fetch zone 2 (DLI)
      run_line(1);   // zone 2 holey, last line: no fetch
    end
    checks++;
    if (!seen_dli) begin failures++; $display("no DLI seen with done"); end

    // kill: restart frame, start a line and kill it a few cycles in
    run_zp();
    @(negedge clk); dp_dma_start = 1;
    @(negedge clk); dp_dma_start = 0;
    repeat (6) @(negedge clk);
    dp_dma_kill = 1;
    @(negedge clk); dp_dma_kill = 0;
    checks++;
    if (busy) begin failures++; $display("busy after kill"); end
    repeat (40) begin
      @(negedge clk);
      if (dp_dma_done) begin failures++; $display("done after kill"); end
    end
    checks++;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
