// Column-bypassing array multiplier, unsigned M x M -> 2M bits, combinational.
//
// The array is the classic carry-save multiplier: row 0 holds the partial
// products a_i*b_0, and each row j = 1..M-1 adds a_i*b_j to the shifted sums
// of the row above, keeping its carries in the same column for the next row.
// Product bit j leaves the array at the right end of row j; a ripple-carry
// adder in the last row resolves the remaining sums and carries into the
// upper M bits.
//
// Column bypassing: every full adder in column i is controlled by the
// multiplicand bit a_i. When a_i is 0 its partial products are all zero, so
// the adder's inputs are isolated (forced to 0, standing in for the tri-state
// gates of the original circuit) and a multiplexer passes the sum from the
// adder above straight down with a carry of 0. Because the carry entering a
// bypassed column comes from the bypassed adder above it, which is 0, the
// bypass is exact. The more zeros the multiplicand has, the fewer adders
// switch and the shorter the critical path; the adaptive hold logic uses
// that to judge whether a pattern fits in one cycle.
//
// Ports: a is the multiplicand (md), b the multiplier (mr), p the product.
// The bypass rule follows the design description; the vertical carry
// arrangement and the operand isolation by AND gates are this design's.
module column_bypass_mult #(
  parameter int unsigned M = 16
) (
  input  logic [M-1:0]   a,
  input  logic [M-1:0]   b,
  output logic [2*M-1:0] p
);
  // sum[j][i] / car[j][i]: outputs of the cell in row j, column i.
  logic [M-1:0] sum [M];
  logic [M-1:0] car [M];

  assign sum[0] = a & {M{b[0]}};
  assign car[0] = '0;

  for (genvar j = 1; j < M; j++) begin : g_row
    for (genvar i = 0; i < M; i++) begin : g_col
      logic pp, y_up, fa_s, fa_c;
      assign pp   = a[i] & b[j];
      assign y_up = (i == M - 1) ? 1'b0 : sum[j-1][(i+1) % M];
      // operand isolation: a bypassed adder sees constant zeros
      full_adder u_fa (
        .x (pp),
        .y (y_up & a[i]),
        .ci(car[j-1][i] & a[i]),
        .s (fa_s),
        .co(fa_c)
      );
      assign sum[j][i] = a[i] ? fa_s : y_up;
      assign car[j][i] = a[i] ? fa_c : 1'b0;
    end
  end

  // low half: one product bit per row
  for (genvar j = 0; j < M; j++) begin : g_low
    assign p[j] = sum[j][0];
  end

  // last row: ripple-carry adder of the final sums and carries
  // (the carry out of its top bit is always 0: the product fits 2M bits,
  // so the top position is a sum only)
  logic [M-1:0] rc;
  assign rc[0] = 1'b0;
  for (genvar k = 0; k < M - 1; k++) begin : g_rca
    logic xs;
    assign xs = sum[M-1][k+1];
    full_adder u_fa (
      .x (xs),
      .y (car[M-1][k]),
      .ci(rc[k]),
      .s (p[M+k]),
      .co(rc[k+1])
    );
  end
  assign p[2*M-1] = car[M-1][M-1] ^ rc[M-1];

endmodule
