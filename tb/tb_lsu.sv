// tb_lsu - checks the partial-reconfiguration transfer from SRAM to ICAP.
//
// A pipelined SRAM model returns word f(a) = a*0x9E3779B1 ^ 0x5A5A0000 for
// address a, SRAM_LAT clocks after the read. An ICAP model records every word
// written (ce_n and write_n low, busy low). Transfers of random length from random
// addresses are checked word by word, one irq per transfer is expected, and
// without ICAP stalls the transfer must take N + SRAM_LAT + 2 clocks with the
// N writes in consecutive clocks (32 bits per clock). Then icap_busy is driven
// randomly and the same checks, except the timing, must hold.
module tb_lsu;
  import avls_pkg::*;
  localparam int LAT = 2;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #0.5 rst_n = 1'b0;      // a real falling edge: resets even a stopped clock domain
  logic start, busy, irq;
  logic [SRAM_AW-1:0] bit_addr, bit_words, sram_addr;
  logic sram_re, sram_rvalid;
  logic [31:0] sram_rdata, icap_i;
  logic icap_ce_n, icap_write_n, icap_busy;
  int checks = 0, failures = 0;
  int stalls = 0;

  lsu #(.SRAM_LAT(LAT), .FIFO_DEPTH(8)) dut (
    .clk, .rst_n, .start, .bit_addr, .bit_words, .busy, .irq,
    .sram_addr, .sram_re, .sram_rdata, .sram_rvalid,
    .icap_ce_n, .icap_write_n, .icap_i, .icap_busy);

  always #5 clk = ~clk;

  function automatic logic [31:0] word_at(logic [SRAM_AW-1:0] a);
    return (32'(a) * 32'h9E37_79B1) ^ 32'h5A5A_0000;
  endfunction

  // SRAM model: LAT-stage read pipeline
  logic [LAT-1:0]  vpipe;
  logic [31:0]     dpipe [LAT];
  always_ff @(posedge clk) begin
    vpipe[0] <= sram_re;
    dpipe[0] <= word_at(sram_addr);
    for (int k = 1; k < LAT; k++) begin
      vpipe[k] <= vpipe[k-1];
      dpipe[k] <= dpipe[k-1];
    end
  end
  assign sram_rvalid = vpipe[LAT-1];
  assign sram_rdata  = dpipe[LAT-1];

  // ICAP model
  logic [31:0] got [$];
  int irqs = 0;
  int write_cycles_first = -1, write_cycles_last = -1, cyc = 0;
  bit random_busy = 1'b0;
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (!icap_ce_n && !icap_write_n && !icap_busy) begin
      got.push_back(icap_i);
      if (write_cycles_first < 0) write_cycles_first <= cyc;
      write_cycles_last <= cyc;
    end
    if (irq) irqs <= irqs + 1;
  end
  always @(negedge clk) begin
    icap_busy = random_busy && ($urandom_range(0, 3) == 0);
    if (icap_busy && busy) stalls++;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic transfer(input int a, input int n, input bit timed);
    int t0, t1, irq0;
    got.delete();
    write_cycles_first = -1;
    irq0 = irqs;
    @(negedge clk);
    bit_addr = SRAM_AW'(a); bit_words = SRAM_AW'(n); start = 1'b1;
    t0 = cyc;
    @(negedge clk); start = 1'b0;
    while (irqs == irq0) @(negedge clk);
    t1 = cyc - 1;                              // cycle in which irq was high
    repeat (3) @(negedge clk);
    check(irqs == irq0 + 1, "one irq per transfer");
    check(got.size() == n, $sformatf("%0d words written, expected %0d", got.size(), n));
    for (int k = 0; k < got.size() && k < n; k++)
      check(got[k] == word_at(SRAM_AW'(a + k)), $sformatf("word %0d", k));
    if (timed) begin
      check(t1 - t0 == n + LAT + 2, $sformatf("transfer took %0d cycles for %0d words", t1 - t0, n));
      check(write_cycles_last - write_cycles_first == n - 1, "writes not back to back");
    end
  endtask

  initial begin
    start = 1'b0; bit_addr = '0; bit_words = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 6; i++) transfer($urandom_range(0, 200000), $urandom_range(1, 300), 1'b1);
    transfer(5, 1, 1'b1);
    random_busy = 1'b1;
    for (int i = 0; i < 6; i++) transfer($urandom_range(0, 200000), $urandom_range(1, 300), 1'b0);
    check(stalls > 0, "ICAP stall never exercised");
    $display("stalls=%0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
