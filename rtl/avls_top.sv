// avls_top - FPGA side of an adaptive voltage and logic scaling (AVLS) system.
//
// The design lowers the energy of an FPGA accelerator by adapting three things
// at run time: the amount of logic (partial reconfiguration swaps in a user
// design with more or fewer execution units), the core supply VCCINT (through
// an external regulator board the FPGA controls itself) and the clock
// frequency (a DCM reprogrammed until in-situ timing detectors at the critical
// paths of the user logic start to fire). The detectors replace the fixed worst-
// case margins of open-loop voltage/frequency scaling by a measurement on the
// actual chip, so the loop is closed.
//
// Contents: the management unit (avls_mgmt) sequences each request through
// the logic scaling unit (lsu: SRAM -> ICAP), the voltage scaling unit
// (vsu: SPI to the potentiometer) and the frequency scaling unit (fsu: ROM ->
// DCM DRP, search). The verification unit ANDs the N_DET detector flip-flops
// (ntc_ff), which sit in the user clock domain at the critical-path end
// points of the user logic. The monitoring unit reports temperature, VCCINT,
// frequency and detector status to a host over a UART.
//
// Outside this module, reached through its ports: the external SRAM with the
// bitstreams, the ICAP, the DCM_ADV and its clock buffer (driven by
// user_clk_en, returning user_clk), the system monitor, the regulator board,
// and the user logic itself, which hands the output of each protected path to
// cp_d, its delayed copy to cp_d_late, and takes the registered value from
// cp_q.
//
// Timing: clk is the fixed management clock (100 MHz assumed by the default
// UART and settle-time parameters); user_clk is the scaled clock.
module avls_top
  import avls_pkg::*;
#(
  parameter int unsigned N_DET         = 100,
  parameter int unsigned ROM_DEPTH     = 128,
  parameter int unsigned WINDOW_CYCLES = 1024,
  parameter int unsigned LOCK_TIMEOUT  = 100_000,
  parameter int unsigned SETTLE_CYCLES = 10_000,
  parameter int unsigned SRAM_LAT      = 2,
  parameter int unsigned CLK_HZ        = 100_000_000,
  parameter int unsigned BAUD          = 115_200,
  parameter int unsigned SAMPLE_CYCLES = 10_000_000,
  localparam int unsigned AW           = $clog2(ROM_DEPTH)
) (
  input  logic               clk,
  input  logic               rst_n,
  // requests (from a host or a supervising processor)
  input  logic               req_valid,
  output logic               req_ready,
  input  avls_req_t          req,
  output logic               req_done,
  output logic               req_fail,
  output mgmt_state_e        mgmt_state,
  // external SRAM
  output logic [SRAM_AW-1:0] sram_addr,
  output logic               sram_re,
  input  logic [ICAP_W-1:0]  sram_rdata,
  input  logic               sram_rvalid,
  // ICAP
  output logic               icap_ce_n,
  output logic               icap_write_n,
  output logic [ICAP_W-1:0]  icap_i,
  input  logic               icap_busy,
  // voltage scaling board
  output logic               spi_cs_n,
  output logic               spi_sclk,
  output logic               spi_mosi,
  // DCM_ADV and user clock buffer
  output logic               dcm_rst,
  output logic               dcm_den,
  output logic               dcm_dwe,
  output logic [6:0]         dcm_daddr,
  output logic [15:0]        dcm_di,
  input  logic               dcm_drdy,
  input  logic               dcm_locked,
  output logic               user_clk_en,
  input  logic               user_clk,
  // critical-path end points of the user logic
  input  logic [N_DET-1:0]   cp_d,
  input  logic [N_DET-1:0]   cp_d_late,
  output logic [N_DET-1:0]   cp_q,
  // system monitor DRP
  output logic               sm_den,
  output logic               sm_dwe,
  output logic [6:0]         sm_daddr,
  output logic [15:0]        sm_di,
  input  logic [15:0]        sm_do,
  input  logic               sm_drdy,
  // host link and status
  output logic               uart_txd,
  output logic [AW-1:0]      freq_idx,
  output logic [FKHZ_W-1:0]  freq_khz,
  output logic [VCODE_W-1:0] vcode,
  output logic               fire,
  output logic [15:0]        fire_count,
  output logic               frame_sent
);

  logic lsu_start, lsu_irq;
  logic [SRAM_AW-1:0] lsu_addr, lsu_words;
  logic vsu_set, vsu_done;
  logic [VCODE_W-1:0] vsu_code;
  logic fsu_search, fsu_track, fsu_done, fsu_fail;
  logic ver_clear, ver_clear_pending;
  logic [N_DET-1:0] det_ok;

  avls_mgmt u_mgmt (
    .clk, .rst_n,
    .req_valid, .req_ready, .req,
    .done (req_done), .fail (req_fail), .state (mgmt_state),
    .lsu_start, .lsu_addr, .lsu_words, .lsu_irq,
    .vsu_set, .vsu_code, .vsu_done,
    .fsu_search, .fsu_track, .fsu_done, .fsu_fail
  );

  lsu #(.SRAM_LAT(SRAM_LAT)) u_lsu (
    .clk, .rst_n,
    .start (lsu_start), .bit_addr (lsu_addr), .bit_words (lsu_words),
    .busy (), .irq (lsu_irq),
    .sram_addr, .sram_re, .sram_rdata, .sram_rvalid,
    .icap_ce_n, .icap_write_n, .icap_i, .icap_busy
  );

  vsu #(.SETTLE_CYCLES(SETTLE_CYCLES)) u_vsu (
    .clk, .rst_n,
    .set (vsu_set), .code (vsu_code), .busy (), .done (vsu_done),
    .vcode, .spi_cs_n, .spi_sclk, .spi_mosi
  );

  fsu #(
    .ROM_DEPTH     (ROM_DEPTH),
    .WINDOW_CYCLES (WINDOW_CYCLES),
    .LOCK_TIMEOUT  (LOCK_TIMEOUT)
  ) u_fsu (
    .clk, .rst_n,
    .search (fsu_search), .track (fsu_track),
    .busy (), .done (fsu_done), .fail (fsu_fail),
    .freq_idx, .freq_khz,
    .ver_clear, .ver_clear_pending, .ver_fire (fire),
    .dcm_rst, .dcm_den, .dcm_dwe, .dcm_daddr, .dcm_di, .dcm_drdy, .dcm_locked,
    .user_clk_en
  );

  for (genvar i = 0; i < N_DET; i++) begin : g_det
    ntc_ff #(.W(1)) u_det (
      .clk    (user_clk),
      .rst_n  (rst_n),
      .d      (cp_d[i]),
      .d_late (cp_d_late[i]),
      .q      (cp_q[i]),
      .ok     (det_ok[i])
    );
  end

  verification #(.N_DET(N_DET), .CNT_W(16)) u_ver (
    .clk, .rst_n,
    .clk_user (user_clk),
    .det_ok,
    .clear (ver_clear), .clear_pending (ver_clear_pending),
    .fire, .fire_count
  );

  monitor #(
    .CLK_HZ (CLK_HZ), .BAUD (BAUD), .SAMPLE_CYCLES (SAMPLE_CYCLES)
  ) u_mon (
    .clk, .rst_n,
    .freq_khz, .vcode, .fire_count,
    .mgmt_state (mgmt_state), .fire, .fail (fsu_fail),
    .sm_den, .sm_dwe, .sm_daddr, .sm_di, .sm_do, .sm_drdy,
    .txd (uart_txd), .frame_sent
  );

endmodule
