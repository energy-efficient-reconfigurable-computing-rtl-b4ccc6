// tb_verification - checks the detector combining and clock-domain crossing.
//
// The management clock runs at 100 MHz and the user clock at an unrelated
// period. For each of the N_DET inputs in turn the bench clears the unit, checks
// that fire stays low while all detectors report ok, drops that one detector
// for a single user clock cycle, checks that fire rises within 8 management
// cycles and stays set (sticky) until the next clear, and that fire_count has
// counted every fired window. Finally the user clock is stopped with a
// violation held in the registers and two clears are issued meanwhile: the
// first window after the clock restarts must not report the stale violation.
module tb_verification;
  localparam int N = 8;
  logic clk = 1'b0, clk_user = 1'b0, rst_n = 1'b1;
  initial #0.5 rst_n = 1'b0;      // a real falling edge: resets even a stopped clock domain
  logic [N-1:0] det_ok;
  logic clear, clear_pending, fire;
  logic [15:0] fire_count;
  int checks = 0, failures = 0;

  verification #(.N_DET(N), .CNT_W(16)) dut (
    .clk, .rst_n, .clk_user, .det_ok, .clear, .clear_pending, .fire, .fire_count);

  always #5 clk = ~clk;
  bit run_user = 1'b1;
  always #3.7 if (run_user || clk_user) clk_user = ~clk_user;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic do_clear();
    @(negedge clk) clear = 1'b1;
    @(negedge clk) clear = 1'b0;
    while (clear_pending) @(negedge clk);
  endtask

  initial begin
    int waited, expected_count;
    bit quiet;
    det_ok = '1; clear = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    expected_count = 0;
    for (int round = 0; round < 2 * N; round++) begin
      int i;
      i = round % N;
      do_clear();
      if (round > 0) expected_count++;      // every earlier window fired
      check(fire_count == 16'(expected_count), $sformatf("fire_count %0d exp %0d", fire_count, expected_count));
      // quiet window
      quiet = 1'b1;
      repeat (20) begin @(negedge clk); if (fire) quiet = 1'b0; end
      check(quiet, $sformatf("fire without violation (round %0d)", round));
      // one detector drops for one user cycle
      @(negedge clk_user) det_ok[i] = 1'b0;
      @(negedge clk_user) det_ok[i] = 1'b1;
      waited = 0;
      while (!fire && waited < 8) begin @(negedge clk); waited++; end
      check(fire, $sformatf("detector %0d violation not reported", i));
      repeat (20) @(negedge clk);
      check(fire, "fire is not sticky");
    end
    do_clear();
    check(!fire, "fire not cleared");
    // user clock stopped with a violation frozen in the registers; two clears
    // are issued while it is stopped; the window after them must stay quiet
    @(negedge clk_user) det_ok[0] = 1'b0;
    run_user = 1'b0;
    det_ok[0] = 1'b1;
    @(negedge clk) clear = 1'b1;
    @(negedge clk) clear = 1'b0;
    repeat (5) @(negedge clk);
    @(negedge clk) clear = 1'b1;
    @(negedge clk) clear = 1'b0;
    repeat (5) @(negedge clk);
    check(clear_pending, "clear pending while the user clock is stopped");
    run_user = 1'b1;
    while (clear_pending) @(negedge clk);
    quiet = 1'b1;
    repeat (30) begin @(negedge clk); if (fire) quiet = 1'b0; end
    check(quiet, "stale violation after a clock stop reached the window");
    do_clear();
    check(fire_count == 16'(2 * N), $sformatf("final fire_count %0d", fire_count));
    check(!fire, "fire after the last clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
