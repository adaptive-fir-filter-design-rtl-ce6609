// Checking harness for one aging_aware_mult instance, used by
// tb_aging_aware_mult to run several sizes and both bypassing variants.
//
// A scoreboard checks every product against the arithmetic product, in
// order. While no errors are injected, the latency of every operation is
// checked against the judging rule: one cycle from acceptance to out_valid
// when the operand that controls bypassing (multiplicand for column,
// multiplier for row) has more than n zeros (n + 1 once aged), two cycles
// otherwise. A timing violation is injected by overwriting the Razor main
// flip-flop just after it captured, as a late-arriving product would leave
// it: the unit must flag error, withhold out_valid for one cycle and then
// present the correct product. THRESHOLD + 1 errors within a window must set
// aged, after which a pattern with exactly n + 1 zeros takes two cycles.
// done rises when the sequence is over; checks and failures are running
// counts. clk_del is tied to clk, as in any zero-delay simulation.
module aam_unit_check
  import aafir_pkg::*;
#(
  parameter int unsigned M         = 16,
  parameter bypass_e     BYPASS    = BYPASS_COLUMN,
  parameter int unsigned WINDOW    = 32,
  parameter int unsigned THRESHOLD = 3
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int unsigned N = M / 2;
  localparam bit COL = (BYPASS == BYPASS_COLUMN);

  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic           in_valid = 1'b0, in_ready;
  logic [M-1:0]   md = '0, mr = '0;
  logic           out_valid;
  logic [2*M-1:0] product;
  logic           error, aged, gating_n;

  aging_aware_mult #(.M(M), .BYPASS(BYPASS), .N(N), .WINDOW(WINDOW), .THRESHOLD(THRESHOLD)) dut (
    .clk, .clk_del(clk), .rst_n, .in_valid, .in_ready, .md, .mr,
    .out_valid, .product, .error, .aged, .gating_n);

  typedef struct {
    logic [2*M-1:0] p;
    int             t_acc;
    int             lat;      // expected latency, 0 = do not check
  } op_t;
  op_t sb [$];
  bit  check_lat = 1;
  int  n_ops = 0, n_slow = 0, n_err = 0;

  initial begin
    checks = 0;
    failures = 0;
    done = 1'b0;
  end

  function automatic int zeros(input logic [M-1:0] v);
    return M - $countones(v);
  endfunction

  function automatic logic [M-1:0] rnd();
    logic [M-1:0] v;
    for (int i = 0; i < M; i += 16) v = (v << 16) | M'($urandom % 65536);
    return v;
  endfunction

  function automatic logic [M-1:0] with_zeros(input int z);
    logic [M-1:0] v;
    v = '1;
    while (zeros(v) < z) v[$urandom % M] = 1'b0;
    return v;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) begin
      op_t o;
      int z;
      z = zeros(COL ? md : mr);
      o.p     = {{M{1'b0}}, md} * {{M{1'b0}}, mr};
      o.t_acc = cycle;
      o.lat   = !check_lat ? 0 : ((z > (aged ? N + 1 : N)) ? 1 : 2);
      if (o.lat == 2) n_slow++;
      sb.push_back(o);
    end
    if (out_valid) begin
      op_t o;
      checks++;
      if (sb.size() == 0) begin
        failures++;
        $display("FAIL M=%0d col=%0b: result without operation", M, COL);
      end else begin
        o = sb.pop_front();
        n_ops++;
        if (product !== o.p) begin
          failures++;
          $display("FAIL M=%0d col=%0b: product %h expected %h", M, COL, product, o.p);
        end
        // out_valid is seen at the edge that ends its cycle
        if (o.lat != 0) begin
          checks++;
          if (cycle - o.t_acc != o.lat + 1) begin
            failures++;
            $display("FAIL M=%0d col=%0b: latency %0d expected %0d", M, COL, cycle - o.t_acc - 1, o.lat);
          end
        end
      end
    end
    if (error) n_err++;
  end

  task automatic issue(input logic [M-1:0] a, input logic [M-1:0] b);
    @(negedge clk);
    in_valid = 1'b1;
    md = a;
    mr = b;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    #1 in_valid = 1'b0;
  endtask

  task automatic drain();
    while (sb.size() != 0) @(posedge clk);
    repeat (2) @(posedge clk);
  endtask

  task automatic expect1(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL M=%0d col=%0b: %s", M, COL, what);
    end
  endtask

  // one isolated operation whose capture is made to fail
  task automatic inject(input logic [M-1:0] a, input logic [M-1:0] b);
    logic [2*M-1:0] late_word;
    check_lat = 0;
    issue(a, b);
    // cap is only settled once the falling-edge hold decision is made
    do begin @(negedge clk); #1; end while (!dut.cap);
    @(posedge clk);
    #1;
    late_word = dut.u_razor.main_q ^ {{(2*M-1){1'b0}}, 1'b1} ^ ({{(2*M-1){1'b0}}, 1'b1} << M);
    force dut.u_razor.main_q = late_word;
    release dut.u_razor.main_q;
    #1;
    expect1("no error flagged", error === 1'b1);
    expect1("wrong product presented", out_valid === 1'b0);
    @(posedge clk);
    #1;
    expect1("error not cleared", error === 1'b0);
    expect1("corrected product late", out_valid === 1'b1);
    drain();
    check_lat = 1;
  endtask

  initial begin
    @(posedge rst_n);
    // fresh: random patterns, back to back and with gaps
    for (int i = 0; i < 400; i++) begin
      logic [M-1:0] a, b;
      a = rnd();
      b = rnd();
      if (i % 2 == 0) begin
        if (COL) a = with_zeros($urandom % (M + 1));
        else     b = with_zeros($urandom % (M + 1));
      end
      issue(a, b);
      if ($urandom % 4 == 0) repeat ($urandom % 3) @(posedge clk);
    end
    drain();
    // exactly n + 1 zeros: one cycle while fresh (checked by the scoreboard)
    issue(COL ? with_zeros(N + 1) : rnd(), COL ? rnd() : with_zeros(N + 1));
    drain();
    expect1("aged too early", aged === 1'b0);
    // errors: THRESHOLD + 1 within a window
    for (int i = 0; i <= THRESHOLD; i++) inject(rnd(), rnd());
    expect1("not aged", aged === 1'b1);
    // aged: n + 1 zeros now take two cycles; more random traffic
    for (int i = 0; i < 200; i++) begin
      logic [M-1:0] a, b;
      a = rnd();
      b = rnd();
      if (COL) a = with_zeros(i < 20 ? N + 1 : $urandom % (M + 1));
      else     b = with_zeros(i < 20 ? N + 1 : $urandom % (M + 1));
      issue(a, b);
    end
    drain();
    $display("M=%0d %s bypassing: %0d results, %0d two-cycle patterns, %0d Razor errors",
             M, COL ? "column" : "row", n_ops, n_slow, n_err);
    expect1("a mechanism was not exercised", n_slow != 0 && n_err != 0 && n_ops >= 600);
    done = 1'b1;
  end
endmodule
