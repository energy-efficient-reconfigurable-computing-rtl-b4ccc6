// uart_tx - serial transmitter of the monitoring unit.
//
// Sends one byte per valid/ready handshake as a standard asynchronous frame:
// a start bit (0), eight data bits least significant first, no parity, and one
// stop bit (1). A counter divides the system clock to the bit period
// CLK_HZ/BAUD (rounded to the nearest cycle). The line idles high.
//
// Interface: data/valid/ready (a byte is taken in the cycle valid && ready),
// txd = serial output. Timing: one frame lasts 10 bit periods; ready returns
// high in the cycle after the stop bit ends.
//
// From the design description: 115200 baud, 8 data bits, no parity, 1 stop bit
// (the settings shown on the host monitoring program). Own choice: the 100 MHz
// system clock default.
module uart_tx #(
  parameter int unsigned CLK_HZ = 100_000_000,
  parameter int unsigned BAUD   = 115_200
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] data,
  input  logic       valid,
  output logic       ready,
  output logic       txd
);

  localparam int unsigned DIV = (CLK_HZ + BAUD / 2) / BAUD;
  localparam int unsigned CW  = $clog2(DIV + 1);

  logic [CW-1:0] baud_cnt;
  logic [3:0]    bit_cnt;     // bits left in the frame
  logic [9:0]    shreg;       // {stop, data, start}, shifted out LSB first

  assign ready = (bit_cnt == 4'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      baud_cnt <= '0;
      bit_cnt  <= '0;
      shreg    <= '1;
      txd      <= 1'b1;
    end else if (ready) begin
      txd <= 1'b1;
      if (valid) begin
        shreg    <= {1'b1, data, 1'b0};
        bit_cnt  <= 4'd10;
        baud_cnt <= CW'(DIV - 1);
        txd      <= 1'b0;               // start bit goes out at once
      end
    end else if (baud_cnt != '0) begin
      baud_cnt <= baud_cnt - 1'b1;
    end else begin
      bit_cnt  <= bit_cnt - 1'b1;
      baud_cnt <= CW'(DIV - 1);
      shreg    <= {1'b1, shreg[9:1]};
      txd      <= (bit_cnt == 4'd1) ? 1'b1 : shreg[1];
    end
  end

endmodule
