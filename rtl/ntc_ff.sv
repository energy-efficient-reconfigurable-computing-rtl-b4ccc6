// ntc_ff - in-situ timing detector at the end point of one critical path.
//
// The user logic keeps its normal flip-flop (q). Beside it sits a detection
// flip-flop that captures the same path output through extra delay (d_late,
// obtained on the FPGA by controlled placement of the detection cell). Both are
// clocked by the user clock. When the clock period shrinks, or the supply is
// lowered, the delayed copy is the first to miss the edge: the two flip-flops
// then disagree and ok drops for one cycle, before the main flip-flop itself
// captures a wrong value. ok is therefore an early, active-high "no timing
// problem" flag; the verification unit ANDs all of them.
//
// Interface: clk/rst_n (user clock domain, asynchronous active-low reset),
// d = path output, d_late = the same output after the detection delay,
// q = main registered output (back to the user logic), ok = q and the
// detection copy agree. Timing: q and ok are valid one clock after d is sampled.
//
// From the design description: detectors at critical-path end points that fire
// when the operating point is close to a timing failure, and whose outputs are
// ANDed. Own choice: the two-flip-flop compare structure and the active-high ok.
module ntc_ff #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  input  logic [W-1:0] d_late,
  output logic [W-1:0] q,
  output logic         ok
);

  logic [W-1:0] q_det;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q     <= '0;
      q_det <= '0;
    end else begin
      q     <= d;
      q_det <= d_late;
    end
  end

  assign ok = (q == q_det);

endmodule
