// Judging block of the adaptive hold logic.
//
// Counts the zero bits of the M-bit operand that controls bypassing (the
// multiplicand for a column-bypassing multiplier, the multiplier for a
// row-bypassing one) and outputs one_cycle = 1 when that count is greater
// than N. Many zeros mean many bypassed adders and a short path, so such a
// pattern is expected to finish in one clock cycle; otherwise it is given
// two. The adaptive hold logic holds two of these, with thresholds n and
// n+1. Purely combinational.
module judging_block #(
  parameter int unsigned M = 16,
  parameter int unsigned N = 8
) (
  input  logic [M-1:0] operand,
  output logic         one_cycle
);
  logic [$clog2(M+1)-1:0] zeros;

  always_comb begin
    zeros = '0;
    for (int unsigned i = 0; i < M; i++) begin
      zeros = zeros + {{($clog2(M+1)-1){1'b0}}, ~operand[i]};
    end
  end

  assign one_cycle = (32'(zeros) > N);

endmodule
