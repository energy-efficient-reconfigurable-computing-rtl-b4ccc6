// tb_ntc_ff - checks the in-situ detector flip-flop.
//
// Random path values are applied each clock. In most cycles the delayed copy
// equals the path value (the path meets timing with margin); in some cycles the
// delayed copy still shows the previous value, as a late transition would. The
// bench checks that q follows d one clock later and that ok is low exactly in
// the cycles after a late delayed copy differed from d.
module tb_ntc_ff;
  localparam int W = 4;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #0.5 rst_n = 1'b0;      // a real falling edge: resets even a stopped clock domain
  logic [W-1:0] d, d_late, q;
  logic ok;
  int checks = 0, failures = 0;
  logic [W-1:0] exp_q;
  logic exp_ok;
  int late_seen = 0;

  ntc_ff #(.W(W)) dut (.clk, .rst_n, .d, .d_late, .q, .ok);

  always #5 clk = ~clk;

  initial begin
    d = '0; d_late = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      logic [W-1:0] prev;
      @(negedge clk);
      prev   = d;
      d      = W'($urandom);
      d_late = ($urandom_range(0, 3) == 0) ? prev : d;
      exp_q  = d;
      exp_ok = (d == d_late);
      if (!exp_ok) late_seen++;
      @(posedge clk); #1;
      checks++;
      if (q !== exp_q || ok !== exp_ok) begin
        failures++;
        $display("mismatch at %0d: q=%h exp %h ok=%b exp %b", i, q, exp_q, ok, exp_ok);
      end
    end
    checks++;
    if (late_seen == 0) begin failures++; $display("no late transition generated"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
