// Adaptive hold logic (AHL): decides, per input pattern, whether the
// bypassing multiplier gets one clock cycle or two.
//
// Two judging blocks look at the operand that controls bypassing: the first
// reports one cycle when it has more than N zeros, the second when it has
// more than N+1. While the aging indicator reads 0 the multiplexer takes the
// first; once it reads 1 (too many Razor errors in a window) the stricter
// second one. The multiplexer output is ORed with the inverted output of a
// D flip-flop clocked on the falling edge of clk, whose output is gating_n
// (the inverse of the clock-gating signal). A pattern judged to need two
// cycles therefore drives gating_n low for exactly one cycle, from one
// falling edge to the next, which covers one rising edge at which the
// operand registers hold and the result is not taken; the OR with the
// inverted output guarantees the hold never lasts longer than that.
//
// Interface: operand is the registered operand being multiplied, active is
// high while an operation waits for its result (no hold is requested when
// idle: this gate is this design's addition), op_done and error come from
// the multiplier's output side and feed the aging indicator. Judging blocks,
// multiplexer, OR and falling-edge flip-flop follow the design description;
// the default N = M/2 is this design's choice.
module ahl #(
  parameter int unsigned M         = 16,
  parameter int unsigned N         = M / 2,
  parameter int unsigned WINDOW    = 32,
  parameter int unsigned THRESHOLD = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [M-1:0] operand,
  input  logic         active,
  input  logic         op_done,
  input  logic         error,
  output logic         gating_n,
  output logic         aged
);
  logic judge_fresh, judge_aged;
  logic one_cycle;     // multiplexer output

  judging_block #(.M(M), .N(N)) u_judge0 (
    .operand  (operand),
    .one_cycle(judge_fresh)
  );

  judging_block #(.M(M), .N(N + 1)) u_judge1 (
    .operand  (operand),
    .one_cycle(judge_aged)
  );

  aging_indicator #(.WINDOW(WINDOW), .THRESHOLD(THRESHOLD)) u_aging (
    .clk    (clk),
    .rst_n  (rst_n),
    .op_done(op_done),
    .error  (error),
    .aged   (aged)
  );

  assign one_cycle = aged ? judge_aged : judge_fresh;

  always_ff @(negedge clk) begin
    if (!rst_n) gating_n <= 1'b1;
    else        gating_n <= one_cycle | ~gating_n | ~active;
  end

endmodule
