// avls_pkg - types and constants shared by the AVLS power-management IP.
//
// The AVLS (Adaptive Voltage and Logic Scaling) IP lets an FPGA scale its own
// core supply, its clock frequency and the amount of logic it runs. This package
// holds the widths of the external SRAM and ICAP buses, the register addresses
// used on the Xilinx dynamic reconfiguration ports (DRP) of the DCM_ADV and the
// system monitor, the layout of one frequency-ROM entry and the request that the
// management unit accepts.
//
// What follows the design description: a 32-bit ICAP data path, partial
// bitstreams in external SRAM, DCM_ADV settings held in a ROM, a system monitor
// read for temperature and VCCINT, an SPI digital potentiometer for VCCINT.
// Own choices: the SRAM word address width (a 1 MB SRAM of 32-bit words), the
// DRP register addresses (taken from the Virtex-5 primitive documentation, not
// from the design description) and the 8-bit potentiometer code.
package avls_pkg;

  // External SRAM holding the partial bitstreams: 32-bit words, word addressed.
  localparam int unsigned SRAM_AW   = 18;           // 256 K words = 1 MB
  localparam int unsigned ICAP_W    = 32;           // ICAP data width
  localparam int unsigned VCODE_W   = 8;            // potentiometer wiper code
  localparam int unsigned FKHZ_W    = 18;           // frequency in kHz (< 262 MHz)

  // DRP (dynamic reconfiguration port) constants.
  localparam logic [6:0] DCM_DFS_ADDR    = 7'h50;   // DCM_ADV: {M-1, D-1}
  localparam logic [6:0] SYSMON_TEMP     = 7'h00;   // system monitor: temperature
  localparam logic [6:0] SYSMON_VCCINT   = 7'h01;   // system monitor: VCCINT

  // One frequency-ROM entry: DCM_ADV frequency-synthesis multiplier and divider
  // (stored minus one, as the DRP register expects) and the resulting frequency.
  typedef struct packed {
    logic [7:0]        m_minus1;
    logic [7:0]        d_minus1;
    logic [FKHZ_W-1:0] f_khz;
  } freq_entry_t;

  // A request to the management unit: optionally load a partial bitstream
  // (a new user-logic configuration), then move to a new supply voltage and
  // search the highest frequency that the detectors accept there.
  typedef struct packed {
    logic               reconfig;    // 1: load the bitstream first
    logic [SRAM_AW-1:0] bit_addr;    // first SRAM word of the bitstream
    logic [SRAM_AW-1:0] bit_words;   // bitstream length in 32-bit words
    logic [VCODE_W-1:0] vcode;       // potentiometer code for VCCINT
  } avls_req_t;

  // Management unit states, also reported to the host by the monitor.
  typedef enum logic [3:0] {
    MG_IDLE     = 4'd0,
    MG_RECONFIG = 4'd1,
    MG_WAIT_IRQ = 4'd2,
    MG_VOLTAGE  = 4'd3,
    MG_WAIT_V   = 4'd4,
    MG_FREQ     = 4'd5,
    MG_WAIT_F   = 4'd6,
    MG_RUN      = 4'd7
  } mgmt_state_e;

endpackage
