// Self-checking testbench of aging_indicator (window 8, threshold 2).
// Drives operations with and without errors and compares aged with a
// reference count kept in the testbench: windows with up to 2 errors keep
// aged low, the counters restart at every window end, and the third error
// inside one window sets aged, which then stays set.
module tb_aging_indicator;
  localparam int unsigned WINDOW = 8, THRESHOLD = 2;
  logic clk = 1'b0, rst_n = 1'b0, op_done = 1'b0, error = 1'b0;
  logic aged;
  int checks = 0, failures = 0;
  int ops = 0, errs = 0;
  bit ref_aged = 0;

  aging_indicator #(.WINDOW(WINDOW), .THRESHOLD(THRESHOLD)) dut (.clk, .rst_n, .op_done, .error, .aged);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one operation: an error cycle (if any) precedes its completion
  task automatic op(input bit err);
    if (err) begin
      @(negedge clk) error = 1'b1;
      errs++;
      if (errs > THRESHOLD) ref_aged = 1;
      @(negedge clk) error = 1'b0;
    end
    @(negedge clk) op_done = 1'b1;
    ops++;
    @(negedge clk) op_done = 1'b0;
    if (ops == WINDOW) begin
      ops = 0;
      errs = 0;
    end
    checks++;
    if (aged !== ref_aged) begin
      failures++;
      $display("FAIL aged=%0b expected %0b at %0t", aged, ref_aged, $time);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // windows with two errors each, spread over window boundaries
    for (int w = 0; w < 4; w++)
      for (int i = 0; i < WINDOW; i++) op(i == 1 || i == WINDOW - 1);
    checks++;
    if (aged !== 1'b0) begin failures++; $display("FAIL aged too early"); end
    // two errors at the end of a window and one at the start of the next
    for (int i = 0; i < WINDOW; i++) op(i >= WINDOW - 2);
    op(1);
    checks++;
    if (aged !== 1'b0) begin failures++; $display("FAIL errors of two windows were added"); end
    for (int i = 1; i < WINDOW; i++) op(0);
    // three errors in one window
    op(1); op(0); op(1); op(1);
    checks++;
    if (aged !== 1'b1) begin failures++; $display("FAIL aged not set"); end
    for (int i = 0; i < 3 * WINDOW; i++) op(0);
    checks++;
    if (aged !== 1'b1) begin failures++; $display("FAIL aged did not stay set"); end
    // reset clears it
    @(negedge clk) rst_n = 1'b0;
    @(negedge clk) rst_n = 1'b1;
    checks++;
    if (aged !== 1'b0) begin failures++; $display("FAIL reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
