// Self-checking testbench of ahl (M = 16, n = 8, window 8, threshold 2).
// The operand changes just after each rising edge, as a register output
// would. After every falling edge gating_n is compared with a reference:
//   next = judge | ~gating_n | ~active,
//   judge = (zeros > n) while not aged, (zeros > n + 1) once aged.
// The reference keeps its own error count for the aging decision. The test
// also checks directly that a pattern with exactly 9 zeros is a one-cycle
// pattern before aging and a two-cycle pattern after it, and that a
// two-cycle pattern holds for exactly one rising edge.
module tb_ahl;
  localparam int unsigned M = 16, N = 8, WINDOW = 8, THRESHOLD = 2;
  logic clk = 1'b0, rst_n = 1'b0, active = 1'b0, op_done = 1'b0, error = 1'b0;
  logic [M-1:0] operand = '0;
  logic gating_n, aged;
  int checks = 0, failures = 0;
  bit ref_g = 1, ref_aged = 0;
  int ops = 0, errs = 0;
  int n_hold = 0, n_aged_judge = 0;

  ahl #(.M(M), .N(N), .WINDOW(WINDOW), .THRESHOLD(THRESHOLD)) dut (
    .clk, .rst_n, .operand, .active, .op_done, .error, .gating_n, .aged);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [M-1:0] with_zeros(input int z);
    logic [M-1:0] v;
    v = '1;
    while (M - $countones(v) < z) v[$urandom % M] = 1'b0;
    return v;
  endfunction

  // reference of the falling-edge flip-flop and the aging count
  always @(negedge clk) begin
    if (!rst_n) ref_g <= 1'b1;
    else begin
      int z;
      bit judge;
      z = M - $countones(operand);
      judge = ref_aged ? (z > N + 1) : (z > N);
      ref_g <= judge | ~ref_g | ~active;
    end
  end
  always @(posedge clk) if (rst_n) begin
    int e;
    e = errs + (error ? 1 : 0);
    if (e > THRESHOLD) ref_aged <= 1;
    if (op_done && ops == WINDOW - 1) begin ops <= 0; errs <= 0; end
    else begin
      if (op_done) ops <= ops + 1;
      errs <= e;
    end
  end

  always @(negedge clk) if (rst_n) begin
    #1;
    checks++;
    if (gating_n !== ref_g) begin
      failures++;
      if (failures < 10) $display("FAIL gating_n=%0b expected %0b at %0t", gating_n, ref_g, $time);
    end
    if (!gating_n) n_hold++;
  end

  task automatic present(input logic [M-1:0] v, input bit err);
    @(posedge clk) #1;
    operand = v;
    active  = 1'b1;
    error   = err;
    op_done = ~err;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // fresh: random patterns, no errors
    for (int i = 0; i < 300; i++) present(with_zeros($urandom % (M + 1)), 0);
    // exactly n+1 zeros: one cycle while fresh
    present(with_zeros(N + 1), 0);
    @(negedge clk) #1;
    checks++;
    if (gating_n !== 1'b1) begin failures++; $display("FAIL 9 zeros held while fresh"); end
    // idle: never a hold
    @(posedge clk) #1 active = 1'b0; operand = '1; op_done = 1'b0;
    repeat (4) begin
      @(negedge clk) #1;
      checks++;
      if (gating_n !== 1'b1) begin failures++; $display("FAIL hold while idle"); end
    end
    // errors make it age
    for (int i = 0; i < 6; i++) present(with_zeros(M), i % 2 == 0);
    checks++;
    if (aged !== 1'b1) begin failures++; $display("FAIL not aged after errors"); end
    // exactly n+1 zeros: two cycles once aged; the hold lasts one edge
    present(with_zeros(N + 1), 0);
    @(negedge clk) #1;
    checks++;
    if (gating_n !== 1'b0) begin failures++; $display("FAIL 9 zeros not held once aged"); end
    else n_aged_judge++;
    @(negedge clk) #1;
    checks++;
    if (gating_n !== 1'b1) begin failures++; $display("FAIL hold longer than one cycle"); end
    for (int i = 0; i < 300; i++) present(with_zeros($urandom % (M + 1)), 0);
    checks++;
    if (n_hold == 0 || n_aged_judge == 0) begin failures++; $display("FAIL hold never exercised"); end
    $display("holds: %0d", n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
