// tb_vsu - checks the SPI frame sent to the supply potentiometer.
//
// An SPI receiver model samples spi_mosi on each rising spi_sclk edge while
// spi_cs_n is low and checks mode 0 (sclk low when cs_n falls and rises),
// sixteen bits per frame, the command byte followed by the code, and the sclk
// period. It also checks that done comes SETTLE_CYCLES after cs_n rises and
// that vcode holds the last code.
module tb_vsu;
  localparam int SCK_DIV = 3;
  localparam int SETTLE  = 50;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #0.5 rst_n = 1'b0;      // a real falling edge: resets even a stopped clock domain
  logic set;
  logic [7:0] code, vcode;
  logic busy, done, spi_cs_n, spi_sclk, spi_mosi;
  int checks = 0, failures = 0;

  vsu #(.SCK_DIV(SCK_DIV), .CMD(8'h11), .SETTLE_CYCLES(SETTLE)) dut (
    .clk, .rst_n, .set, .code, .busy, .done, .vcode, .spi_cs_n, .spi_sclk, .spi_mosi);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    logic [15:0] rx;
    int nbits, t_rise, t_prev, t_cs, t_done;
    set = 1'b0; code = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 10; n++) begin
      logic [7:0] c;
      c = 8'($urandom);
      @(negedge clk); set = 1'b1; code = c;
      @(negedge clk); set = 1'b0; code = 8'($urandom);
      rx = '0; nbits = 0; t_prev = -1;
      check(!spi_cs_n && !spi_sclk, "cs_n low with sclk low");
      while (!spi_cs_n) begin
        @(posedge spi_sclk or posedge spi_cs_n);
        if (!spi_cs_n && spi_sclk) begin
          rx = {rx[14:0], spi_mosi};
          nbits++;
          t_rise = int'($time);
          if (t_prev >= 0) check(t_rise - t_prev == 2 * SCK_DIV * 10, "sclk period");
          t_prev = t_rise;
        end
      end
      check(!spi_sclk, "sclk low when cs_n rises");
      t_cs = int'($time);
      check(nbits == 16, $sformatf("%0d bits in frame", nbits));
      check(rx == {8'h11, c}, $sformatf("frame %h exp %h", rx, {8'h11, c}));
      check(vcode == c, "vcode");
      @(posedge done);
      t_done = int'($time);
      check((t_done - t_cs) / 10 >= SETTLE && (t_done - t_cs) / 10 <= SETTLE + 3,
            $sformatf("settle %0d cycles", (t_done - t_cs) / 10));
      @(negedge clk);
      check(!busy, "busy after done");
    end
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
