// tb_freq_rom - checks the DCM settings held in the frequency ROM.
//
// Every entry is read through the registered port. The bench checks that M and
// D are legal for the DCM frequency synthesizer (M = 2..32, D = 1..32), that
// the stored frequency equals 100 MHz * M / D, that it rises strictly with the
// index, stays within 12 MHz above its evenly spaced target between 22 MHz and
// 250 MHz, and is the lowest frequency of the whole M/D grid (searched here by
// brute force) that is at least the target and above the previous entry.
module tb_freq_rom;
  import avls_pkg::*;
  localparam int DEPTH = 128;
  logic clk = 1'b0;
  logic [6:0] addr;
  freq_entry_t data;
  int checks = 0, failures = 0;

  freq_rom dut (.clk, .addr, .data);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    int m, dv, f, target, prev_f, err, lo, best;
    prev_f = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      addr = 7'(i);
      @(posedge clk); #1;
      m  = int'(data.m_minus1) + 1;
      dv = int'(data.d_minus1) + 1;
      f  = int'(data.f_khz);
      target = 22000 + i * 228000 / 127;
      err = f - target;
      lo = (target > prev_f) ? target : prev_f + 1;
      best = 1 << 30;
      for (int mm = 2; mm <= 32; mm++)
        for (int dd = 1; dd <= 32; dd++)
          if (100000 * mm / dd >= lo && 100000 * mm / dd < best) best = 100000 * mm / dd;
      check(m >= 2 && m <= 32 && dv >= 1 && dv <= 32, $sformatf("entry %0d M=%0d D=%0d", i, m, dv));
      check(f == 100000 * m / dv, $sformatf("entry %0d f=%0d", i, f));
      check(f >= target && err <= 12000, $sformatf("entry %0d f=%0d target=%0d", i, f, target));
      check(f == best, $sformatf("entry %0d f=%0d, lowest legal %0d", i, f, best));
      check(f > prev_f, $sformatf("entry %0d not rising", i));
      prev_f = f;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
