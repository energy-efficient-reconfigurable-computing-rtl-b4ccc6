// vsu - voltage scaling unit: sets the FPGA core supply through SPI.
//
// The core supply (VCCINT) comes from an external regulator board whose output
// is trimmed by a digital potentiometer with an SPI interface, wired to FPGA
// pins. On a request the unit sends one 16-bit SPI frame, the command byte CMD
// followed by the 8-bit wiper code, most significant bit first, in SPI mode 0
// (sclk idles low, data changes on the falling edge and is sampled by the
// potentiometer on the rising edge; cs_n low for the whole frame). It then
// waits SETTLE_CYCLES for the regulator output to settle before pulsing done,
// so that the frequency search that follows sees the new voltage.
//
// Interface: set (one-cycle request, taken when busy is low) with code;
// busy while sending or settling; done one-cycle pulse at the end; vcode = the
// code last written. SPI: spi_cs_n, spi_sclk, spi_mosi.
// Timing: sclk period 2*SCK_DIV clocks; a request takes about
// 32*SCK_DIV + SETTLE_CYCLES clocks.
//
// From the design description: an SPI link from the FPGA to the digital
// potentiometer on the voltage scaling board, so the FPGA sets its own supply.
// Own choices: the command byte (a write-wiper command of a common single-
// channel 8-bit potentiometer), the SPI mode, the clock rate and the settling
// time, as the description names no part.
module vsu
  import avls_pkg::*;
#(
  parameter int unsigned SCK_DIV       = 5,        // sclk = clk / (2*SCK_DIV)
  parameter logic [7:0]  CMD           = 8'h11,    // write wiper 0
  parameter int unsigned SETTLE_CYCLES = 10_000    // 100 us at 100 MHz
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               set,
  input  logic [VCODE_W-1:0] code,
  output logic               busy,
  output logic               done,
  output logic [VCODE_W-1:0] vcode,
  output logic               spi_cs_n,
  output logic               spi_sclk,
  output logic               spi_mosi
);

  typedef enum logic [1:0] {V_IDLE, V_SHIFT, V_SETTLE} vsu_state_e;

  localparam int unsigned DW = $clog2(SCK_DIV + 1);
  localparam int unsigned SW = $clog2(SETTLE_CYCLES + 2);

  vsu_state_e  state;
  logic [15:0] shreg;
  logic [4:0]  bit_cnt;
  logic [DW-1:0] div_cnt;
  logic [SW-1:0] settle_cnt;

  assign busy = (state != V_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= V_IDLE;
      shreg      <= '0;
      bit_cnt    <= '0;
      div_cnt    <= '0;
      settle_cnt <= '0;
      vcode      <= '0;
      done       <= 1'b0;
      spi_cs_n   <= 1'b1;
      spi_sclk   <= 1'b0;
      spi_mosi   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        V_IDLE: if (set) begin
          shreg    <= {CMD, code};
          vcode    <= code;
          bit_cnt  <= 5'd16;
          div_cnt  <= DW'(SCK_DIV - 1);
          spi_cs_n <= 1'b0;
          spi_sclk <= 1'b0;
          spi_mosi <= CMD[7];
          state    <= V_SHIFT;
        end
        V_SHIFT: begin
          if (div_cnt != '0) begin
            div_cnt <= div_cnt - 1'b1;
          end else begin
            div_cnt <= DW'(SCK_DIV - 1);
            if (!spi_sclk) begin
              spi_sclk <= 1'b1;                 // potentiometer samples here
            end else begin
              spi_sclk <= 1'b0;
              bit_cnt  <= bit_cnt - 1'b1;
              if (bit_cnt == 5'd1) begin
                spi_cs_n   <= 1'b1;
                spi_mosi   <= 1'b0;
                settle_cnt <= SW'(SETTLE_CYCLES);
                state      <= V_SETTLE;
              end else begin
                shreg    <= {shreg[14:0], 1'b0};
                spi_mosi <= shreg[14];
              end
            end
          end
        end
        V_SETTLE: begin
          if (settle_cnt != '0) begin
            settle_cnt <= settle_cnt - 1'b1;
          end else begin
            done  <= 1'b1;
            state <= V_IDLE;
          end
        end
        default: state <= V_IDLE;
      endcase
    end
  end

endmodule
