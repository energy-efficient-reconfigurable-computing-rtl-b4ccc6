// silicon_model - behavioural model of the user logic's protected critical paths.
//
// Not synthesizable; for simulation only. It stands for a motion-estimation
// core with 1, 3 or 6 execution units (cfg). Every user clock each of the N
// path outputs takes a new random value (cp_d). The detection copy cp_d_late
// arrives later than cp_d; when the clock frequency exceeds the limit for the
// present configuration and core voltage, every seventh path misses the edge
// in about half of the cycles and its detection copy still shows the previous
// value. The limit (kHz) is linear between voltage points; the points are
// rough figures used only to exercise the controller:
//   1 unit : 620 mV 56 MHz,  1000 mV 240 MHz
//   3 units: 620 mV 50 MHz,  700 mV 86 MHz, 1000 mV 210 MHz
//   6 units: 620 mV 45 MHz,  1000 mV 168 MHz
// When the clock is stopped (clk_en low) all paths settle, so no late value
// survives into the next run of the clock. derate_khz lowers the limit (a warmer chip). The model also checks that the
// main flip-flops (cp_q) always hold the value of the previous cycle, i.e. the
// user logic itself never fails; errors counts violations.
module silicon_model #(
  parameter int N = 100
) (
  input  logic         user_clk,
  input  logic         clk_en,
  input  int           f_khz,
  input  int           vccint_mv,
  input  int           cfg,
  input  int           derate_khz,
  output logic [N-1:0] cp_d,
  output logic [N-1:0] cp_d_late,
  input  logic [N-1:0] cp_q,
  output int           errors,
  output int           late_cycles
);
  function automatic int lin(int v, int v0, int f0, int v1, int f1);
    return f0 + (v - v0) * (f1 - f0) / (v1 - v0);
  endfunction

  function automatic int limit_khz(int c, int mv);
    int f;
    if (mv < 620) mv = 620;
    if (mv > 1000) mv = 1000;
    case (c)
      1:       f = lin(mv, 620, 56_000, 1000, 240_000);
      3:       f = (mv <= 700) ? lin(mv, 620, 50_000, 700, 86_000)
                               : lin(mv, 700, 86_000, 1000, 210_000);
      default: f = lin(mv, 620, 45_000, 1000, 168_000);
    endcase
    return f - derate_khz;
  endfunction

  logic [N-1:0] prev;
  bit started = 1'b0;

  initial begin
    errors = 0; late_cycles = 0;
    cp_d = '0; cp_d_late = '0; prev = '0;
  end

  always @(negedge clk_en) cp_d_late = cp_d;

  always @(posedge user_clk) begin
    bit late;
    late = clk_en && (f_khz > limit_khz(cfg, vccint_mv));
    #0.05;                                       // after the flip-flops updated
    if (started && cp_q !== cp_d) errors++;      // main flip-flops took d?
    started = 1'b1;
    prev = cp_d;
    for (int i = 0; i < N; i++) cp_d[i] = 1'($urandom);
    cp_d_late = cp_d;
    if (late) begin
      for (int i = 0; i < N; i += 7)
        if ($urandom_range(0, 1) == 1) cp_d_late[i] = prev[i];
      late_cycles++;
    end
  end
endmodule
