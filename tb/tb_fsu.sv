// tb_fsu - checks the frequency search against a DCM model.
//
// The DCM is the behavioural dcm_model. The detectors and verification unit are
// replaced by a simple rule: a window fires if the enabled user clock is above
// a limit set by the bench (the frequency the "silicon" can take at the
// present voltage). Checked, for a sequence of limits:
//  - upward search from the lowest entry ends at the highest entry not above
//    the limit, after visiting the next entry up, with idx+3 DRP writes;
//  - a lower limit (voltage lowered) makes the search walk down, never up;
//  - a limit above the top entry ends at the top entry with no firing;
//  - with track high a later drop of the limit is followed without a request;
//  - a DCM that never locks ends the search at entry 0 with fail and the clock
//    disabled.
module tb_fsu;
  import avls_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #0.5 rst_n = 1'b0;      // a real falling edge: resets even a stopped clock domain
  logic search, track, busy, done, fail;
  logic [6:0] freq_idx;
  logic [FKHZ_W-1:0] freq_khz;
  logic ver_clear, ver_clear_pending, ver_fire;
  logic dcm_rst, dcm_den, dcm_dwe, dcm_drdy, dcm_locked, user_clk_en, user_clk;
  logic [6:0] dcm_daddr;
  logic [15:0] dcm_di;
  logic lock_ok;
  int f_out;
  int checks = 0, failures = 0;

  fsu #(.ROM_DEPTH(128), .WINDOW_CYCLES(64), .LOCK_TIMEOUT(500)) dut (
    .clk, .rst_n, .search, .track, .busy, .done, .fail, .freq_idx, .freq_khz,
    .ver_clear, .ver_clear_pending, .ver_fire,
    .dcm_rst, .dcm_den, .dcm_dwe, .dcm_daddr, .dcm_di, .dcm_drdy, .dcm_locked,
    .user_clk_en);

  dcm_model #(.LOCK_CYCLES(20)) u_dcm (
    .dclk (clk), .rst (dcm_rst), .den (dcm_den), .dwe (dcm_dwe), .daddr (dcm_daddr),
    .di (dcm_di), .drdy (dcm_drdy), .locked (dcm_locked), .lock_ok, .clk_en (user_clk_en),
    .user_clk, .f_khz (f_out));

  always #5 clk = ~clk;

  // stand-in for detectors + verification unit
  int limit_khz = 0;
  int pend = 0;
  logic sticky = 1'b0;
  always @(posedge clk) begin
    if (ver_clear) begin pend <= 3; sticky <= 1'b0; end
    else if (pend > 0) pend <= pend - 1;
    else if (user_clk_en && f_out > limit_khz) sticky <= 1'b1;
  end
  assign ver_clear_pending = (pend > 0);
  assign ver_fire = sticky && (pend == 0);

  // observation of the search
  int drp_writes = 0, max_f = 0, min_f = 1 << 30, fired_f [$];
  always @(posedge clk) begin
    if (dcm_den && dcm_dwe) drp_writes++;
    if (user_clk_en && f_out > max_f) max_f = f_out;
    if (user_clk_en && f_out > 0 && f_out < min_f) min_f = f_out;
    if (ver_clear && ver_fire) fired_f.push_back(int'(freq_khz));
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic run_search();
    drp_writes = 0; max_f = 0; min_f = 1 << 30; fired_f.delete();
    @(negedge clk) search = 1'b1;
    @(negedge clk) search = 1'b0;
    @(posedge done);
    @(negedge clk);
  endtask

  initial begin
    int f_start, idx_start;
    search = 1'b0; track = 1'b0; lock_ok = 1'b1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // 1: upward search from entry 0, limit 150 MHz
    limit_khz = 150_000;
    run_search();
    check(!fail, "fail on upward search");
    check(int'(freq_khz) <= limit_khz, $sformatf("ended at %0d above limit", freq_khz));
    check(fired_f.size() == 1 && fired_f[0] > limit_khz, "exactly one fired window above the limit");
    check(max_f == fired_f[0], "visited entry above the end point");
    check(drp_writes == int'(freq_idx) + 3, $sformatf("%0d DRP writes for idx %0d", drp_writes, freq_idx));
    check(user_clk_en && f_out == int'(freq_khz), "clock running at the reported frequency");
    $display("search 1: %0d kHz idx %0d", freq_khz, freq_idx);

    // 2: voltage lowered, limit 60 MHz: search walks down
    f_start = int'(freq_khz);
    limit_khz = 60_000;
    run_search();
    check(int'(freq_khz) <= limit_khz, "down search ended above limit");
    check(max_f <= f_start, "down search went up");
    check(fired_f.size() > 1 && fired_f[fired_f.size()-1] > limit_khz, "fired on the way down");
    $display("search 2: %0d kHz idx %0d", freq_khz, freq_idx);

    // 3: limit above the top entry
    limit_khz = 400_000;
    run_search();
    check(freq_idx == 7'd127 && fired_f.size() == 0, "top entry reached without firing");

    // 4: tracking
    track = 1'b1;
    idx_start = int'(freq_idx);
    limit_khz = 120_000;
    @(posedge done);
    @(negedge clk);
    check(int'(freq_khz) <= limit_khz && int'(freq_idx) < idx_start, "tracking stepped down");
    $display("tracking: %0d kHz idx %0d", freq_khz, freq_idx);
    repeat (2000) @(negedge clk);
    check(int'(freq_khz) <= limit_khz && !busy, "holds after tracking");
    track = 1'b0;

    // 5: DCM cannot lock
    lock_ok = 1'b0;
    run_search();
    check(fail && freq_idx == 0 && !user_clk_en, "lock failure ends at entry 0 with fail");
    lock_ok = 1'b1;
    run_search();
    check(!fail && int'(freq_khz) <= limit_khz, "recovers once the DCM locks again");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
