// tb_monitor - checks the status frames sent to the host.
//
// A system-monitor model answers DRP reads of the temperature (0x00) and
// VCCINT (0x01) registers with values that change after every read. A UART
// receiver model (10 clocks per bit) collects the bytes. For each frame the
// bench checks the start byte, the register values, the frequency, supply
// code, firing count and state byte applied at the inputs, the checksum, and
// the time between frames (SAMPLE_CYCLES).
module tb_monitor;
  import avls_pkg::*;
  localparam int DIV = 10;
  localparam int SAMPLE = 3000;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #0.5 rst_n = 1'b0;      // a real falling edge: resets even a stopped clock domain
  logic [FKHZ_W-1:0] freq_khz;
  logic [7:0] vcode;
  logic [15:0] fire_count, sm_di, sm_do;
  logic [3:0] mgmt_state;
  logic fire, fail, sm_den, sm_dwe, sm_drdy, txd, frame_sent;
  logic [6:0] sm_daddr;
  int checks = 0, failures = 0;

  monitor #(.CLK_HZ(1_000_000), .BAUD(100_000), .SAMPLE_CYCLES(SAMPLE)) dut (
    .clk, .rst_n, .freq_khz, .vcode, .fire_count, .mgmt_state, .fire, .fail,
    .sm_den, .sm_dwe, .sm_daddr, .sm_di, .sm_do, .sm_drdy, .txd, .frame_sent);

  always #5 clk = ~clk;

  // system monitor model: answers two clocks after den
  logic [15:0] temp_reg = 16'h9C40, vint_reg = 16'h4440;
  logic [15:0] last_temp, last_vint;
  int sm_wait = 0;
  logic [6:0] sm_addr_q;
  always @(posedge clk) begin
    sm_drdy <= 1'b0;
    if (sm_den) begin sm_wait <= 2; sm_addr_q <= sm_daddr; end
    else if (sm_wait > 0) begin
      sm_wait <= sm_wait - 1;
      if (sm_wait == 1) begin
        sm_drdy <= 1'b1;
        if (sm_addr_q == 7'h00) begin sm_do <= temp_reg; last_temp <= temp_reg; temp_reg <= temp_reg + 16'h0040; end
        else                    begin sm_do <= vint_reg; last_vint <= vint_reg; vint_reg <= vint_reg - 16'h0040; end
      end
    end
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic rx_byte(output logic [7:0] b);
    @(negedge txd);
    repeat (DIV / 2) @(posedge clk);
    for (int k = 0; k < 8; k++) begin
      repeat (DIV) @(posedge clk);
      b[k] = txd;
    end
    repeat (DIV) @(posedge clk);
    check(txd, "stop bit");
  endtask

  initial begin
    logic [7:0] fr [13];
    logic [7:0] sum;
    longint t_prev, t_now;
    freq_khz = 18'd150000; vcode = 8'd200; fire_count = 16'h0102; mgmt_state = 4'd7;
    fire = 1'b0; fail = 1'b0; sm_do = '0;
    t_prev = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 4; n++) begin
      for (int k = 0; k < 13; k++) rx_byte(fr[k]);
      $display("frame %0d: %p last_vint %h", n, fr, last_vint);
      check(fr[0] == 8'hA5, "start byte");
      check({fr[1], fr[2]} == last_temp, $sformatf("temperature %h%h exp %h", fr[1], fr[2], last_temp));
      check({fr[3], fr[4]} == last_vint, "vccint");
      check({fr[5], fr[6], fr[7]} == 24'(freq_khz), "frequency");
      check(fr[8] == vcode, "supply code");
      check({fr[9], fr[10]} == fire_count, "fire count");
      check(fr[11] == {fail, fire, 2'b00, mgmt_state}, "state byte");
      sum = '0;
      for (int k = 1; k < 12; k++) sum += fr[k];
      check(fr[12] == sum, "checksum");
      @(posedge frame_sent);
      t_now = $time;
      if (n > 0) check((t_now - t_prev) / 10 == SAMPLE + 1, $sformatf("frame period %0d", (t_now - t_prev) / 10));
      t_prev = t_now;
      // new status for the next frame
      freq_khz = 18'($urandom_range(22000, 250000)); vcode = 8'($urandom);
      fire_count = 16'($urandom); mgmt_state = 4'($urandom); fire = 1'($urandom); fail = 1'($urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
