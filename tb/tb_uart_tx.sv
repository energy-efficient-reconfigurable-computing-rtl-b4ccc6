// tb_uart_tx - checks the UART transmitter frame and bit timing.
//
// A receiver model in the bench waits for the falling start edge, samples the
// line in the middle of each bit period and rebuilds the byte; it checks the
// start bit, the eight data bits (LSB first) and the stop bit, and that a frame
// lasts ten bit periods of CLK_HZ/BAUD clocks.
module tb_uart_tx;
  localparam int CLK_HZ = 1_000_000;
  localparam int BAUD   = 100_000;        // 10 clocks per bit
  localparam int DIV    = CLK_HZ / BAUD;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #0.5 rst_n = 1'b0;      // a real falling edge: resets even a stopped clock domain
  logic [7:0] data;
  logic valid, ready, txd;
  int checks = 0, failures = 0;
  logic [7:0] sent [$];

  uart_tx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) dut (.clk, .rst_n, .data, .valid, .ready, .txd);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // transmitter side
  initial begin
    valid = 1'b0; data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 20; i++) begin
      @(negedge clk);
      data  = (i == 0) ? 8'hA5 : 8'($urandom);
      valid = 1'b1;
      do @(posedge clk); while (!ready);
      sent.push_back(data);
      @(negedge clk);
      valid = 1'b0;
      repeat ($urandom_range(0, 15)) @(posedge clk);
    end
  end

  // receiver model
  initial begin
    logic [7:0] b;
    longint t0, t1;
    @(posedge rst_n);
    for (int n = 0; n < 20; n++) begin
      @(negedge txd);
      t0 = $time;
      repeat (DIV / 2) @(posedge clk);
      check(txd == 1'b0, "start bit");
      for (int k = 0; k < 8; k++) begin
        repeat (DIV) @(posedge clk);
        b[k] = txd;
      end
      repeat (DIV) @(posedge clk);
      check(txd == 1'b1, "stop bit");
      check(sent.size() > 0 && b == sent[0], $sformatf("byte %0d data %h", n, b));
      if (sent.size() > 0) void'(sent.pop_front());
      @(posedge ready);
      t1 = $time;
      check((t1 - t0) / 10 >= 10 * DIV && (t1 - t0) / 10 <= 10 * DIV + 2,
            $sformatf("frame length %0d clocks", (t1 - t0) / 10));
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
