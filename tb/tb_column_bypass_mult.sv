// Self-checking testbench of column_bypass_mult.
// Checks the 16 x 16 array against the arithmetic product for corner
// operands (zero, all ones, single bits, alternating bits) and 3000 random
// pairs, with random operands biased so that many multiplicand columns are
// bypassed; and a 4 x 4 instance exhaustively, including 1111 x 1001.
module tb_column_bypass_mult;
  localparam int unsigned M = 16;

  logic [M-1:0]   a, b;
  logic [2*M-1:0] p;
  logic [3:0]     a4, b4;
  logic [7:0]     p4;
  int checks = 0, failures = 0;

  column_bypass_mult #(.M(M)) dut   (.a(a),  .b(b),  .p(p));
  column_bypass_mult #(.M(4)) dut4  (.a(a4), .b(b4), .p(p4));

  task automatic check16(input logic [M-1:0] x, input logic [M-1:0] y);
    logic [2*M-1:0] ref_p;
    a = x; b = y;
    #1;
    ref_p = {{M{1'b0}}, x} * {{M{1'b0}}, y};
    checks++;
    if (p !== ref_p) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h = %h, expected %h", x, y, p, ref_p);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check16('0, '0);
    check16('1, '1);
    check16('1, '0);
    check16('0, '1);
    check16(16'hAAAA, 16'h5555);
    check16(16'h5555, 16'hAAAA);
    for (int i = 0; i < M; i++) begin
      check16(M'(1) << i, '1);
      check16('1, M'(1) << i);
    end
    for (int i = 0; i < 3000; i++) begin
      logic [M-1:0] x, y;
      x = M'($urandom);
      y = M'($urandom);
      if (i % 3 == 1) x = x & M'($urandom);   // more zeros: more bypassing
      if (i % 3 == 2) x = x | M'($urandom);   // fewer zeros
      check16(x, y);
    end
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        a4 = 4'(i); b4 = 4'(j);
        #1;
        checks++;
        if (p4 !== 8'(i * j)) begin
          failures++;
          $display("FAIL 4x4 %0d * %0d = %0d", i, j, p4);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
