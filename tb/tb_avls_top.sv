// tb_avls_top - end-to-end run of the AVLS system at its default parameters.
//
// Around avls_top the bench places behavioural models of everything outside
// the FPGA's AVLS logic: a pipelined SRAM holding the partial bitstreams, the
// ICAP (with random busy cycles), the DCM_ADV with its clock buffer
// (dcm_model), the voltage scaling board (vpcb_model), the system monitor, the
// user logic's critical paths (silicon_model) and a UART receiver for the host.
//
// The run follows the experiments the design was built for:
//   A  load the 1-unit core, 1.0 V: frequency climbs until the detectors fire
//   B  0.62 V, no reload: frequency walks down
//   C  load the 6-unit core at 0.62 V: at least 42 MHz must be found
//   D  load the 3-unit core at 0.70 V: at least 83 MHz must be found
//   E  the chip warms up (limit lowered) while running: tracking steps down
//   F  0.58 V: the DCM cannot lock, the request ends with fail
//   G  back to 1.0 V with the 1-unit core: at least 240 MHz... capped by the
//      limit, checked like A
// After each search the frequency must be at most the model's limit and within
// 12 MHz of it (the largest gap in the frequency table). Every bitstream must
// arrive at the ICAP word for word, the user logic must never capture a wrong
// value, and the host frames must be well formed. Each mechanism (reconfigu-
// ration, ICAP stall, detector firing, upward and downward search, tracking,
// lock failure, SPI voltage change, host frame) is counted and must occur.
module tb_avls_top;
  import avls_pkg::*;
  localparam int N_DET = 100;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #0.5 rst_n = 1'b0;      // a real falling edge: resets even a stopped clock domain
  logic req_valid, req_ready, req_done, req_fail;
  avls_req_t req;
  mgmt_state_e mgmt_state;
  logic [SRAM_AW-1:0] sram_addr;
  logic sram_re, sram_rvalid;
  logic [31:0] sram_rdata, icap_i;
  logic icap_ce_n, icap_write_n, icap_busy;
  logic spi_cs_n, spi_sclk, spi_mosi;
  logic dcm_rst, dcm_den, dcm_dwe, dcm_drdy, dcm_locked, user_clk_en, user_clk;
  logic [6:0] dcm_daddr, sm_daddr;
  logic [15:0] dcm_di, sm_di, sm_do;
  logic [N_DET-1:0] cp_d, cp_d_late, cp_q;
  logic sm_den, sm_dwe, sm_drdy, uart_txd, fire, frame_sent;
  logic [6:0] freq_idx;
  logic [FKHZ_W-1:0] freq_khz;
  logic [7:0] vcode;
  logic [15:0] fire_count;
  int checks = 0, failures = 0;

  avls_top dut (
    .clk, .rst_n, .req_valid, .req_ready, .req, .req_done, .req_fail, .mgmt_state,
    .sram_addr, .sram_re, .sram_rdata, .sram_rvalid,
    .icap_ce_n, .icap_write_n, .icap_i, .icap_busy,
    .spi_cs_n, .spi_sclk, .spi_mosi,
    .dcm_rst, .dcm_den, .dcm_dwe, .dcm_daddr, .dcm_di, .dcm_drdy, .dcm_locked,
    .user_clk_en, .user_clk,
    .cp_d, .cp_d_late, .cp_q,
    .sm_den, .sm_dwe, .sm_daddr, .sm_di, .sm_do, .sm_drdy,
    .uart_txd, .freq_idx, .freq_khz, .vcode, .fire, .fire_count, .frame_sent);

  always #5 clk = ~clk;                        // 100 MHz management clock

  // ---------------- models ----------------
  int vccint_mv, spi_frames, f_out, si_errors, late_cycles;
  int cfg = 1, derate_khz = 0;

  vpcb_model #(.INIT_CODE(250)) u_pcb (.spi_cs_n, .spi_sclk, .spi_mosi,
    .vccint_mv, .frames (spi_frames));

  dcm_model #(.LOCK_CYCLES(2000)) u_dcm (
    .dclk (clk), .rst (dcm_rst), .den (dcm_den), .dwe (dcm_dwe), .daddr (dcm_daddr),
    .di (dcm_di), .drdy (dcm_drdy), .locked (dcm_locked),
    .lock_ok (vccint_mv >= 620), .clk_en (user_clk_en), .user_clk, .f_khz (f_out));

  silicon_model #(.N(N_DET)) u_si (.user_clk, .clk_en (user_clk_en), .f_khz (f_out), .vccint_mv, .cfg,
    .derate_khz, .cp_d, .cp_d_late, .cp_q, .errors (si_errors), .late_cycles);

  // SRAM: word at address a is f(a); two-stage read pipeline
  function automatic logic [31:0] word_at(logic [SRAM_AW-1:0] a);
    return (32'(a) * 32'h9E37_79B1) ^ 32'hA5C3_0000;
  endfunction
  logic [1:0] rv;
  logic [31:0] rd0, rd1;
  always_ff @(posedge clk) begin
    rv  <= {rv[0], sram_re};
    rd0 <= word_at(sram_addr);
    rd1 <= rd0;
  end
  assign sram_rvalid = rv[1];
  assign sram_rdata  = rd1;

  // ICAP: records the words written; busy in about one cycle in eight
  logic [31:0] icap_words [$];
  int icap_stalls = 0;
  always @(posedge clk) if (!icap_ce_n && !icap_write_n && !icap_busy) icap_words.push_back(icap_i);
  always @(negedge clk) begin
    icap_busy = ($urandom_range(0, 7) == 0);
    if (icap_busy && dut.u_lsu.busy) icap_stalls++;
  end

  // system monitor: temperature and VCCINT registers (Virtex-5 transfer
  // functions: T = code*503.975/1024 - 273.15, V = code*3/1024; code in [15:6])
  int temp_c = 45;
  always @(posedge clk) begin
    sm_drdy <= 1'b0;
    if (sm_den) begin
      sm_drdy <= 1'b1;
      if (sm_daddr == 7'h00) sm_do <= 16'(((temp_c + 273) * 1024 / 504) << 6);
      else                   sm_do <= 16'((vccint_mv * 1024 / 3000) << 6);
    end
  end

  // host UART receiver: 868 clocks per bit at 115200 baud
  localparam int BIT = 868;
  int frames_ok = 0, frames_bad = 0;
  initial begin
    logic [7:0] fr [13];
    logic [7:0] sum;
    @(posedge rst_n);
    forever begin
      for (int k = 0; k < 13; k++) begin
        @(negedge uart_txd);
        repeat (BIT / 2) @(posedge clk);
        for (int b = 0; b < 8; b++) begin
          repeat (BIT) @(posedge clk);
          fr[k][b] = uart_txd;
        end
        repeat (BIT) @(posedge clk);
      end
      sum = '0;
      for (int k = 1; k < 12; k++) sum += fr[k];
      if (fr[0] == 8'hA5 && fr[12] == sum && {fr[3], fr[4]} == 16'((vccint_mv * 1024 / 3000) << 6))
        frames_ok++;
      else begin
        frames_bad++;
        $display("bad host frame %p", fr);
      end
    end
  end

  // ---------------- mechanism counters ----------------
  int n_reconfig = 0, n_fire_win = 0, n_up = 0, n_down = 0, n_track = 0, n_lockfail = 0;
  logic [6:0] idx_q;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_lsu.irq) n_reconfig++;
    if (dut.ver_clear && fire) n_fire_win++;
    if (freq_idx > idx_q) n_up++;
    if (freq_idx < idx_q) n_down++;
    if (dut.fsu_track && dut.u_fsu.busy) n_track++;
    idx_q <= freq_idx;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic int limit_now();
    return u_si.limit_khz(cfg, vccint_mv);
  endfunction

  task automatic request(input bit reconfig, input int addr, input int words, input int code,
                         input int new_cfg);
    avls_req_t r;
    r.reconfig = reconfig; r.bit_addr = SRAM_AW'(addr); r.bit_words = SRAM_AW'(words);
    r.vcode = 8'(code);
    icap_words.delete();
    @(negedge clk);
    while (!req_ready) @(negedge clk);
    req = r; req_valid = 1'b1;
    @(negedge clk);
    req_valid = 1'b0;
    if (reconfig) begin
      @(posedge dut.u_lsu.irq);
      cfg = new_cfg;                           // the new core is in place
    end
    @(posedge req_done);
    @(negedge clk);
    if (reconfig) begin
      bit same;
      same = (icap_words.size() == words);
      for (int k = 0; k < icap_words.size() && same; k++)
        same = (icap_words[k] == word_at(SRAM_AW'(addr + k)));
      check(same, $sformatf("bitstream of %0d words at %h arrived intact", words, addr));
    end
    check(vccint_mv == 500 + 2 * code, "supply set through SPI");
  endtask

  task automatic check_point(input string tag);
    int lim;
    lim = limit_now();
    check(!req_fail, {tag, ": no fail"});
    check(int'(freq_khz) <= lim, $sformatf("%s: %0d kHz above limit %0d", tag, freq_khz, lim));
    check(lim - int'(freq_khz) < 12_000, $sformatf("%s: %0d kHz far below limit %0d", tag, freq_khz, lim));
    check(f_out == int'(freq_khz) && user_clk_en, {tag, ": DCM runs at the reported frequency"});
    $display("%s: cfg %0d, %0d mV, %0d kHz (limit %0d)", tag, cfg, vccint_mv, freq_khz, lim);
  endtask

  initial begin
    int f_before;
    req_valid = 1'b0; req = '0; idx_q = '0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;

    request(1'b1, 'h01000, 400, 250, 1);  check_point("A me1 1.00 V");
    request(1'b0, 0, 0, 60, 1);           check_point("B me1 0.62 V");
    request(1'b1, 'h08000, 700, 60, 6);   check_point("C me6 0.62 V");
    check(int'(freq_khz) >= 42_000, "me6 at 0.62 V reaches the 42 MHz the always-on task needs");
    request(1'b1, 'h04000, 550, 100, 3);  check_point("D me3 0.70 V");
    check(int'(freq_khz) >= 83_000, "me3 at 0.70 V reaches the 83 MHz the always-on task needs");

    // E: warmer chip, tracking while running
    f_before = int'(freq_khz);
    derate_khz = 15_000;
    wait (dut.u_fsu.busy);
    wait (!dut.u_fsu.busy);
    repeat (10) @(negedge clk);
    check(int'(freq_khz) < f_before, "tracking lowered the frequency");
    check_point("E me3 0.70 V warm");
    derate_khz = 0;

    // F: supply too low for the DCM
    request(1'b0, 0, 0, 40, 3);
    check(req_fail && !user_clk_en, "F: lock failure reported, clock off");
    n_lockfail += req_fail;

    // G: back to full voltage with the 1-unit core
    request(1'b1, 'h01000, 400, 250, 1);  check_point("G me1 1.00 V");

    // wait for at least one host frame
    wait (frames_ok + frames_bad > 0);

    check(si_errors == 0, $sformatf("user logic captured %0d wrong values", si_errors));
    check(frames_bad == 0, "host frames well formed");
    $display("mechanisms: reconfig %0d, icap stalls %0d, fired windows %0d, steps up %0d, down %0d, tracking cycles %0d, lock failures %0d, spi frames %0d, host frames %0d",
             n_reconfig, icap_stalls, n_fire_win, n_up, n_down, n_track, n_lockfail, spi_frames, frames_ok);
    check(n_reconfig > 0, "reconfiguration happened");
    check(icap_stalls > 0, "ICAP stall happened");
    check(n_fire_win > 0, "detectors fired");
    check(n_up > 0, "frequency stepped up");
    check(n_down > 0, "frequency stepped down");
    check(n_track > 0, "tracking search happened");
    check(n_lockfail > 0, "lock failure happened");
    check(spi_frames > 0, "SPI voltage change happened");
    check(frames_ok > 0, "host frame sent");
    $display("simulated %0t", $time);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (15_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
