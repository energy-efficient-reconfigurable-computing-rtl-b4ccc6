// tb_avls_mgmt - checks the order in which the management unit runs the units.
//
// The three scaling units are replaced by responders that answer each start
// pulse after a random delay and log the event. For random requests, with and
// without reconfiguration, the bench checks the event order (LSU start, LSU
// interrupt, VSU set, VSU done, FSU search, FSU done, request done), the
// bitstream address, length and supply code handed to the units, that
// req_ready is low while a request is served, that tracking is enabled only
// in the run state, and that the FSU's fail flag is passed on.
module tb_avls_mgmt;
  import avls_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #0.5 rst_n = 1'b0;      // a real falling edge: resets even a stopped clock domain
  logic req_valid, req_ready, done, fail;
  avls_req_t req;
  mgmt_state_e state;
  logic lsu_start, lsu_irq, vsu_set, vsu_done, fsu_search, fsu_track, fsu_done, fsu_fail;
  logic [SRAM_AW-1:0] lsu_addr, lsu_words;
  logic [VCODE_W-1:0] vsu_code;
  int checks = 0, failures = 0;

  avls_mgmt dut (.clk, .rst_n, .req_valid, .req_ready, .req, .done, .fail, .state,
    .lsu_start, .lsu_addr, .lsu_words, .lsu_irq, .vsu_set, .vsu_code, .vsu_done,
    .fsu_search, .fsu_track, .fsu_done, .fsu_fail);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  string log [$];
  bit next_fail;

  // responders
  task automatic respond(ref logic pulse, input string name);
    @(posedge rst_n);
    forever begin
      @(posedge clk);
      if (pulse) begin
        log.push_back(name);
        repeat ($urandom_range(1, 20)) @(posedge clk);
        @(negedge clk);
        if (name == "lsu") begin lsu_irq = 1'b1; log.push_back("irq"); @(negedge clk); lsu_irq = 1'b0; end
        if (name == "vsu") begin vsu_done = 1'b1; log.push_back("vdone"); @(negedge clk); vsu_done = 1'b0; end
        if (name == "fsu") begin fsu_fail = next_fail; fsu_done = 1'b1; log.push_back("fdone"); @(negedge clk); fsu_done = 1'b0; end
      end
    end
  endtask
  initial begin lsu_irq = 1'b0; vsu_done = 1'b0; fsu_done = 1'b0; fsu_fail = 1'b0; end
  initial respond(lsu_start, "lsu");
  initial respond(vsu_set, "vsu");
  initial respond(fsu_search, "fsu");

  // rules checked every cycle
  int busy_ready = 0, bad_track = 0;
  always @(negedge clk) if (rst_n) begin
    if (fsu_track != (state == MG_RUN)) bad_track++;
    if (req_ready && !(state inside {MG_IDLE, MG_RUN})) busy_ready++;
  end

  initial begin
    string exp [$];
    req_valid = 1'b0; req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 20; n++) begin
      avls_req_t r;
      r.reconfig  = (n % 3 != 1);
      r.bit_addr  = SRAM_AW'($urandom);
      r.bit_words = SRAM_AW'($urandom);
      r.vcode     = 8'($urandom);
      next_fail   = (n % 5 == 4);
      log.delete();
      @(negedge clk);
      check(req_ready, "ready between requests");
      req = r; req_valid = 1'b1;
      @(negedge clk);
      req_valid = 1'b0; req = '0;
      check(!req_ready, "not ready while serving");
      @(posedge done);
      log.push_back("done");
      @(negedge clk);
      exp.delete();
      if (r.reconfig) begin exp.push_back("lsu"); exp.push_back("irq"); end
      exp.push_back("vsu"); exp.push_back("vdone"); exp.push_back("fsu"); exp.push_back("fdone"); exp.push_back("done");
      check(log == exp, $sformatf("request %0d order %p", n, log));
      check(lsu_addr == r.bit_addr && lsu_words == r.bit_words, "bitstream location");
      check(vsu_code == r.vcode, "supply code");
      check(fail == next_fail, "fail passed on");
      check(state == MG_RUN, "run state after a request");
    end
    check(busy_ready == 0, "req_ready high while busy");
    check(bad_track == 0, "tracking outside the run state");
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
