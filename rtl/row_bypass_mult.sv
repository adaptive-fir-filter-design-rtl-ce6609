// Row-bypassing array multiplier, unsigned M x M -> 2M bits, combinational.
//
// Same carry-save array as the column-bypassing multiplier: row 0 holds the
// partial products a_i*b_0, each row j = 1..M-1 adds a_i*b_j to the shifted
// sums of the row above, carries stay in their column for the next row, and
// a ripple-carry adder in the last row forms the upper M product bits.
//
// Row bypassing: the adders of row j are controlled by the multiplier bit
// b_j. When b_j is 0 the row adds nothing, so its adders' inputs are
// isolated (forced to 0, standing in for the tri-state gates) and
// multiplexers pass the sums and carries of the row above down, both moved
// one column to the right as an active row would move them. The carry that
// falls off the right edge of a bypassed row (row j-1's carry of weight j,
// ANDed with the inverse of b_j) is collected into a correction word and
// added to the array result by a correction adder at the right-hand side.
// With the multiplier 1001 (binary) rows 1 and 2 do not switch and only row
// 3 adds. The more zeros the multiplier has, the shorter the critical path,
// which is what the adaptive hold logic judges when this multiplier is used.
//
// Ports: a is the multiplicand (md), b the multiplier (mr), p the product.
// The bypass rule, the mux pairs per cell and the right-edge correction
// (AND with the inverted multiplier bit feeding extra adders) follow the
// design description; the exact carry routing and the correction adder
// written as one addition are this design's.
module row_bypass_mult #(
  parameter int unsigned M = 16
) (
  input  logic [M-1:0]   a,
  input  logic [M-1:0]   b,
  output logic [2*M-1:0] p
);
  logic [M-1:0] sum [M];
  logic [M-1:0] car [M];

  assign sum[0] = a & {M{b[0]}};
  assign car[0] = '0;

  for (genvar j = 1; j < M; j++) begin : g_row
    for (genvar i = 0; i < M; i++) begin : g_col
      logic pp, y_up, fa_s, fa_c;
      assign pp   = a[i] & b[j];
      assign y_up = (i == M - 1) ? 1'b0 : sum[j-1][(i+1) % M];
      full_adder u_fa (
        .x (pp),
        .y (y_up & b[j]),
        .ci(car[j-1][i] & b[j]),
        .s (fa_s),
        .co(fa_c)
      );
      assign sum[j][i] = b[j] ? fa_s : y_up;
      assign car[j][i] = b[j] ? fa_c : ((i == M - 1) ? 1'b0 : car[j-1][(i+1) % M]);
    end
  end

  // carries dropped at the right edge by bypassed rows, weight j
  logic [M-1:0] drop;
  assign drop[0] = 1'b0;
  for (genvar j = 1; j < M; j++) begin : g_drop
    assign drop[j] = car[j-1][0] & ~b[j];
  end

  logic [2*M-1:0] raw;
  for (genvar j = 0; j < M; j++) begin : g_low
    assign raw[j] = sum[j][0];
  end

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
      .s (raw[M+k]),
      .co(rc[k+1])
    );
  end
  assign raw[2*M-1] = car[M-1][M-1] ^ rc[M-1];

  // right-edge correction adder
  assign p = raw + {{M{1'b0}}, drop};

endmodule
