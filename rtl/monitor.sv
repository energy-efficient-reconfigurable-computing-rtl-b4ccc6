// monitor - monitoring unit: reports the operating point to a host PC.
//
// Every SAMPLE_CYCLES clocks the unit reads two registers of the FPGA's system
// monitor over its DRP (the on-die temperature and the VCCINT measurement),
// takes a snapshot of the AVLS status and sends it as one 13-byte frame through
// its UART. The readings only inform the host; no decision of the AVLS IP
// depends on them.
//
// Frame, byte by byte:
//   0      0xA5 (start of frame)
//   1..2   temperature register, high byte first (10-bit ADC code in [15:6])
//   3..4   VCCINT register, high byte first (10-bit ADC code in [15:6])
//   5..7   user clock frequency in kHz, high byte first
//   8      potentiometer code of the core supply
//   9..10  number of observation windows in which the detectors fired
//   11     {fail, fire, 2'b00, management state}
//   12     sum of bytes 1..11 modulo 256
//
// Interface: status inputs, system monitor DRP (sm_den, sm_dwe, sm_daddr,
// sm_di, sm_do, sm_drdy), txd. Timing: one frame takes 130 bit periods of the
// UART; a new sample starts SAMPLE_CYCLES after the previous one began, or when
// the previous frame has gone out if that is later.
//
// From the design description: a monitoring unit with the system monitor and a
// UART that sends temperature, voltage and detector status to monitoring
// software on a PC, at 115200 baud, 8 data bits, no parity, 1 stop bit.
// Own choices: the frame layout, the checksum and the sample period.
module monitor
  import avls_pkg::*;
#(
  parameter int unsigned CLK_HZ        = 100_000_000,
  parameter int unsigned BAUD          = 115_200,
  parameter int unsigned SAMPLE_CYCLES = 10_000_000   // 10 samples per second
) (
  input  logic               clk,
  input  logic               rst_n,
  // status snapshot
  input  logic [FKHZ_W-1:0]  freq_khz,
  input  logic [VCODE_W-1:0] vcode,
  input  logic [15:0]        fire_count,
  input  logic [3:0]         mgmt_state,
  input  logic               fire,
  input  logic               fail,
  // system monitor DRP
  output logic               sm_den,
  output logic               sm_dwe,
  output logic [6:0]         sm_daddr,
  output logic [15:0]        sm_di,
  input  logic [15:0]        sm_do,
  input  logic               sm_drdy,
  // UART
  output logic               txd,
  output logic               frame_sent       // pulse when a frame has gone out
);

  localparam int unsigned NBYTES = 13;
  localparam int unsigned SW     = $clog2(SAMPLE_CYCLES + 1);

  typedef enum logic [2:0] {M_WAIT, M_RD_T, M_WT_T, M_RD_V, M_WT_V, M_SEND, M_DRAIN} mon_state_e;

  mon_state_e  state;
  logic [SW-1:0] timer;
  logic [15:0] temp_r;
  logic [7:0]  frame [NBYTES];
  logic [3:0]  byte_idx;
  logic        tx_valid, tx_ready;
  logic [7:0]  csum;

  assign sm_dwe = 1'b0;
  assign sm_di  = '0;

  // checksum of the payload as it will be sent
  always_comb begin
    logic [23:0] f;
    f    = 24'(freq_khz);
    csum = temp_r[15:8] + temp_r[7:0] + sm_do[15:8] + sm_do[7:0]
         + f[23:16] + f[15:8] + f[7:0] + vcode
         + fire_count[15:8] + fire_count[7:0] + {fail, fire, 2'b00, mgmt_state};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= M_WAIT;
      timer      <= SW'(SAMPLE_CYCLES);
      temp_r     <= '0;
      byte_idx   <= '0;
      sm_den     <= 1'b0;
      sm_daddr   <= '0;
      frame_sent <= 1'b0;
      for (int i = 0; i < NBYTES; i++) frame[i] <= '0;
    end else begin
      sm_den     <= 1'b0;
      frame_sent <= 1'b0;
      if (timer != '0) timer <= timer - 1'b1;
      unique case (state)
        M_WAIT: if (timer == '0) begin
          timer <= SW'(SAMPLE_CYCLES);
          state <= M_RD_T;
        end
        M_RD_T: begin
          sm_den   <= 1'b1;
          sm_daddr <= SYSMON_TEMP;
          state    <= M_WT_T;
        end
        M_WT_T: if (sm_drdy) begin
          temp_r <= sm_do;
          state  <= M_RD_V;
        end
        M_RD_V: begin
          sm_den   <= 1'b1;
          sm_daddr <= SYSMON_VCCINT;
          state    <= M_WT_V;
        end
        M_WT_V: if (sm_drdy) begin
          frame[0]  <= 8'hA5;
          frame[1]  <= temp_r[15:8];
          frame[2]  <= temp_r[7:0];
          frame[3]  <= sm_do[15:8];
          frame[4]  <= sm_do[7:0];
          frame[5]  <= 8'(24'(freq_khz) >> 16);
          frame[6]  <= 8'(24'(freq_khz) >> 8);
          frame[7]  <= 8'(freq_khz);
          frame[8]  <= vcode;
          frame[9]  <= fire_count[15:8];
          frame[10] <= fire_count[7:0];
          frame[11] <= {fail, fire, 2'b00, mgmt_state};
          frame[12] <= csum;
          byte_idx  <= '0;
          state     <= M_SEND;
        end
        M_SEND: if (tx_ready && tx_valid) begin
          if (byte_idx == 4'(NBYTES - 1)) state <= M_DRAIN;
          else                             byte_idx <= byte_idx + 1'b1;
        end
        M_DRAIN: if (tx_ready && !tx_valid) begin   // stop bit of the last byte done
          frame_sent <= 1'b1;
          state      <= M_WAIT;
        end
        default: state <= M_WAIT;
      endcase
    end
  end

  assign tx_valid = (state == M_SEND);

  uart_tx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_uart (
    .clk   (clk),
    .rst_n (rst_n),
    .data  (frame[byte_idx]),
    .valid (tx_valid),
    .ready (tx_ready),
    .txd   (txd)
  );

endmodule
