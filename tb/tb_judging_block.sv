// Self-checking testbench of judging_block: exhaustive over 16-bit operands
// for thresholds n = 8 and n + 1 = 9, comparing one_cycle with a zero count
// taken independently by $countones.
module tb_judging_block;
  localparam int unsigned M = 16;
  logic [M-1:0] op;
  logic j8, j9;
  int checks = 0, failures = 0;

  judging_block #(.M(M), .N(8)) dut8 (.operand(op), .one_cycle(j8));
  judging_block #(.M(M), .N(9)) dut9 (.operand(op), .one_cycle(j9));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << M); v++) begin
      int zeros;
      op = M'(v);
      #1;
      zeros = M - $countones(op);
      checks += 2;
      if (j8 !== (zeros > 8)) begin
        failures++;
        if (failures < 10) $display("FAIL n=8 operand %h", op);
      end
      if (j9 !== (zeros > 9)) begin
        failures++;
        if (failures < 10) $display("FAIL n=9 operand %h", op);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
