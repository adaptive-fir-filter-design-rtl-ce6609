// Self-checking testbench of razor_ff with a real delayed clock.
// clk has a 10 ns period; clk_del follows it by 3 ns. Data that is on time
// changes mid-cycle, well before the capturing edge. A late arrival is
// modelled by changing d 2 ns after the capturing clk edge, between the main
// and the shadow sampling instants: the main flip-flop keeps the stale word,
// the shadow gets the new one, error must rise, and one edge later q must
// hold the new word with error low again. Holds (en low) with d moving must
// never raise error nor change q.
module tb_razor_ff;
  localparam int unsigned W = 32;

  logic clk = 1'b0, clk_del = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [W-1:0] d = '0, q;
  logic error;
  int checks = 0, failures = 0;
  int n_late = 0;

  razor_ff #(.W(W)) dut (.clk, .clk_del, .rst_n, .en, .d, .q, .error);

  always #5 clk = ~clk;
  always @(clk) clk_del <= #3 clk;

  task automatic expect_eq(input string what, input logic [W-1:0] got, input logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h at %0t", what, got, exp, $time);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] held, stale;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    held = '0;
    for (int i = 0; i < 400; i++) begin
      logic [W-1:0] v;
      bit late, hold;
      v    = W'($urandom);
      late = ($urandom % 4) == 0;
      hold = ($urandom % 6) == 0;
      @(negedge clk);
      if (hold) begin
        // register holds, input moves: no capture, no error
        en = 1'b0;
        d  = v;
        @(posedge clk);
        #6;
        expect_eq("q during hold", q, held);
        expect_eq("error during hold", W'(error), '0);
        continue;
      end
      en = 1'b1;
      if (!late) d = v;
      stale = d;   // what the main flip-flop sees at the edge
      @(posedge clk);
      if (late) begin
        #2 d = v;
        #4;
        expect_eq("error on late arrival", W'(error), W'(1));
        expect_eq("stale main value", q, stale);
        en = 1'b0;
        n_late++;
        @(posedge clk);
        #1;
        expect_eq("restored value", q, v);
        expect_eq("error cleared", W'(error), '0);
      end else begin
        #6;
        expect_eq("on-time value", q, v);
        expect_eq("no error on time", W'(error), '0);
      end
      held = v;
    end
    checks++;
    if (n_late == 0) begin
      failures++;
      $display("FAIL no late arrival exercised");
    end
    $display("late arrivals: %0d", n_late);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
