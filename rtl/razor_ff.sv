// Razor register: detects and corrects a late-arriving result.
//
// The main flip-flop captures d on the rising edge of clk when en is high.
// A shadow register captures the same d on every rising edge of clk_del, a
// copy of clk delayed by less than half a period, so it sees the value the
// path settles to a little later. If the path was too slow for clk, the two
// differ. A comparator (bitwise XOR, ORed over the word) raises error in the
// cycle after such a capture; at the next clk edge the multiplexer in front
// of the main flip-flop reloads it from the shadow, so q holds the correct
// value one cycle late and error drops again.
//
// Timing: error is valid from just after the clk_del edge that follows a
// capture until the next clk edge. It is only raised for words the main
// flip-flop actually captured (a registered copy of en qualifies the
// comparison), so holding the register never flags an error.
//
// Main flip-flop, shadow, comparator and restoring multiplexer follow the
// design description. Two choices are this design's: the shadow is an
// edge-triggered register on clk_del rather than a latch, so a simulation
// without gate delays (where clk_del may simply be clk) never sees data of
// the next operation in the shadow, and reset is synchronous in each clock
// domain. In a zero-delay simulation with clk_del tied to clk, a late
// arrival appears as a main flip-flop value that differs from the shadow.
module razor_ff #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         clk_del,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q,
  output logic         error
);
  logic [W-1:0] main_q;
  logic [W-1:0] shadow_q;
  logic         chk_q;    // main_q holds a fresh capture to be checked

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      main_q <= '0;
      chk_q  <= 1'b0;
    end else begin
      chk_q <= en & ~error;
      if (error)   main_q <= shadow_q;   // restore
      else if (en) main_q <= d;
    end
  end

  always_ff @(posedge clk_del) begin
    if (!rst_n) shadow_q <= '0;
    else        shadow_q <= d;
  end

  assign error = chk_q & (|(main_q ^ shadow_q));
  assign q     = main_q;

endmodule
