// tb_voltage_sweep - the supply-sweep demonstration: one core, six voltages.
//
// The single-unit user logic stays loaded while the supply is moved through
// 0.75, 0.80, 0.85, 1.00, 0.95 and 0.90 V, one request per voltage and no
// reconfiguration. At each voltage the controller must find the working
// frequency on its own: the frequency has to rise over the first four steps
// and fall over the last two, each point must lie at most 12 MHz (the largest
// gap in the frequency table) below the silicon model's limit and never above
// it, the detectors must have fired while the point was located, and the user
// logic must never capture a wrong value.
//
// The models are the ones of the end-to-end bench (dcm_model, vpcb_model,
// silicon_model). SRAM and ICAP are idle and the system monitor answers with
// zeros. To keep the run short the observation window, DCM lock time, settle
// time and monitor period are shortened; the search rule is unchanged.
module tb_voltage_sweep;
  import avls_pkg::*;
  localparam int N_DET = 100;
  localparam int NV    = 6;
  localparam int MV [NV] = '{750, 800, 850, 1000, 950, 900};

  logic clk = 1'b0, rst_n = 1'b1;
  initial #0.5 rst_n = 1'b0;      // a real falling edge: resets even a stopped clock domain
  logic req_valid, req_ready, req_done, req_fail;
  avls_req_t req;
  mgmt_state_e mgmt_state;
  logic [SRAM_AW-1:0] sram_addr;
  logic sram_re;
  logic [31:0] icap_i;
  logic icap_ce_n, icap_write_n;
  logic spi_cs_n, spi_sclk, spi_mosi;
  logic dcm_rst, dcm_den, dcm_dwe, dcm_drdy, dcm_locked, user_clk_en, user_clk;
  logic [6:0] dcm_daddr, sm_daddr;
  logic [15:0] dcm_di, sm_di;
  logic [N_DET-1:0] cp_d, cp_d_late, cp_q;
  logic sm_den, sm_dwe, uart_txd, fire, frame_sent;
  logic sm_drdy = 1'b0;
  logic [6:0] freq_idx;
  logic [FKHZ_W-1:0] freq_khz;
  logic [7:0] vcode;
  logic [15:0] fire_count;
  int checks = 0, failures = 0;

  avls_top #(.WINDOW_CYCLES(256), .LOCK_TIMEOUT(5000), .SETTLE_CYCLES(500),
             .SAMPLE_CYCLES(100_000)) dut (
    .clk, .rst_n, .req_valid, .req_ready, .req, .req_done, .req_fail, .mgmt_state,
    .sram_addr, .sram_re, .sram_rdata (32'h0), .sram_rvalid (1'b0),
    .icap_ce_n, .icap_write_n, .icap_i, .icap_busy (1'b0),
    .spi_cs_n, .spi_sclk, .spi_mosi,
    .dcm_rst, .dcm_den, .dcm_dwe, .dcm_daddr, .dcm_di, .dcm_drdy, .dcm_locked,
    .user_clk_en, .user_clk,
    .cp_d, .cp_d_late, .cp_q,
    .sm_den, .sm_dwe, .sm_daddr, .sm_di, .sm_do (16'h0), .sm_drdy,
    .uart_txd, .freq_idx, .freq_khz, .vcode, .fire, .fire_count, .frame_sent);

  always #5 clk = ~clk;                        // 100 MHz management clock
  always @(posedge clk) sm_drdy <= sm_den;

  int vccint_mv, spi_frames, f_out, si_errors, late_cycles;

  vpcb_model #(.INIT_CODE(250)) u_pcb (.spi_cs_n, .spi_sclk, .spi_mosi,
    .vccint_mv, .frames (spi_frames));

  dcm_model #(.LOCK_CYCLES(200)) u_dcm (
    .dclk (clk), .rst (dcm_rst), .den (dcm_den), .dwe (dcm_dwe), .daddr (dcm_daddr),
    .di (dcm_di), .drdy (dcm_drdy), .locked (dcm_locked),
    .lock_ok (vccint_mv >= 620), .clk_en (user_clk_en), .user_clk, .f_khz (f_out));

  silicon_model #(.N(N_DET)) u_si (.user_clk, .clk_en (user_clk_en), .f_khz (f_out), .vccint_mv,
    .cfg (1), .derate_khz (0), .cp_d, .cp_d_late, .cp_q, .errors (si_errors), .late_cycles);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    int f [NV];
    int lim;
    logic [15:0] fc_before;
    req_valid = 1'b0; req = '0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;

    for (int v = 0; v < NV; v++) begin
      fc_before = fire_count;
      @(negedge clk);
      while (!req_ready) @(negedge clk);
      req = '0;
      req.vcode = 8'((MV[v] - 500) / 2);       // board: 500 mV + 2 mV per code
      req_valid = 1'b1;
      @(negedge clk);
      req_valid = 1'b0;
      @(posedge req_done);
      repeat (2) @(negedge clk);
      f[v] = int'(freq_khz);
      lim = u_si.limit_khz(1, vccint_mv);
      $display("%0d mV: %0d kHz (limit %0d), fired windows %0d", vccint_mv, f[v], lim,
               fire_count - fc_before);
      check(vccint_mv == MV[v], $sformatf("supply at %0d mV", MV[v]));
      check(!req_fail, $sformatf("%0d mV: a frequency was found", MV[v]));
      check(f[v] <= lim, $sformatf("%0d mV: %0d kHz above the limit", MV[v], f[v]));
      check(lim - f[v] < 12_000, $sformatf("%0d mV: %0d kHz far below %0d", MV[v], f[v], lim));
      check(fire_count != fc_before, $sformatf("%0d mV: detectors fired at the limit", MV[v]));
      check(f_out == f[v] && user_clk_en, $sformatf("%0d mV: DCM runs at the reported clock", MV[v]));
      if (v > 0 && v < 4) check(f[v] > f[v-1], $sformatf("%0d mV: frequency rose", MV[v]));
      if (v >= 4)         check(f[v] < f[v-1], $sformatf("%0d mV: frequency fell", MV[v]));
    end
    check(si_errors == 0, $sformatf("user logic captured %0d wrong values", si_errors));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
