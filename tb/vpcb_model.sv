// vpcb_model - behavioural model of the voltage scaling board.
//
// Not synthesizable; for simulation only. An SPI slave (mode 0, MSB first)
// takes 16-bit frames; a frame whose first byte is the write-wiper command
// 0x11 sets the 8-bit wiper code. The regulator output follows the code
// linearly, vccint_mv = 500 + 2 * code (code 60 -> 620 mV, code 250 ->
// 1000 mV), a transfer function chosen for the bench. The output starts at
// INIT_CODE.
module vpcb_model #(
  parameter int INIT_CODE = 250
) (
  input  logic spi_cs_n,
  input  logic spi_sclk,
  input  logic spi_mosi,
  output int   vccint_mv,
  output int   frames
);
  logic [15:0] sh;
  int nbits;
  int code = INIT_CODE;

  initial frames = 0;

  always @(negedge spi_cs_n) begin
    nbits = 0;
    sh = '0;
  end
  always @(posedge spi_sclk) if (!spi_cs_n) begin
    sh = {sh[14:0], spi_mosi};
    nbits++;
  end
  always @(posedge spi_cs_n) begin
    if (nbits == 16 && sh[15:8] == 8'h11) begin
      code = int'(sh[7:0]);
      frames++;
    end
  end

  assign vccint_mv = 500 + 2 * code;
endmodule
