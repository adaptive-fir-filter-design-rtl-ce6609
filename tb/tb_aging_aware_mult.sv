// Self-checking testbench of aging_aware_mult.
// Runs the checking harness aam_unit_check on four instances side by side:
// column and row bypassing at the default 16-bit size, and both again at
// 32 bits (n = M/2, window 32, threshold 3). Each harness checks products,
// the one- and two-cycle latencies predicted by the judging rule, Razor
// error detection and correction (injected late arrivals) and the switch
// to the stricter judging block after aging.
module tb_aging_aware_mult;
  import aafir_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0] done;
  int c [4], f [4];
  int checks, failures;

  always #5 clk = ~clk;

  aam_unit_check #(.M(16), .BYPASS(BYPASS_COLUMN)) u_c16 (.clk, .rst_n, .done(done[0]), .checks(c[0]), .failures(f[0]));
  aam_unit_check #(.M(16), .BYPASS(BYPASS_ROW))    u_r16 (.clk, .rst_n, .done(done[1]), .checks(c[1]), .failures(f[1]));
  aam_unit_check #(.M(32), .BYPASS(BYPASS_COLUMN)) u_c32 (.clk, .rst_n, .done(done[2]), .checks(c[2]), .failures(f[2]));
  aam_unit_check #(.M(32), .BYPASS(BYPASS_ROW))    u_r32 (.clk, .rst_n, .done(done[3]), .checks(c[3]), .failures(f[3]));

  function automatic void total();
    checks = c[0] + c[1] + c[2] + c[3];
    failures = f[0] + f[1] + f[2] + f[3];
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    total();
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    wait (&done);
    repeat (2) @(posedge clk);
    total();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
