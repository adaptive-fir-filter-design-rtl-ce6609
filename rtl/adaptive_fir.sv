// LMS adaptive FIR filter built on aging-aware multipliers.
//
// For every input sample x(n) with its desired value d(n) the filter
//   1. shifts x(n) into a TAPS-long delay line x(n), x(n-1), ...,
//   2. forms y(n) = sum_k w_k * x(n-k) with TAPS tap multipliers and an
//      adder chain,
//   3. forms the error e(n) = d(n) - y(n),
//   4. forms x(n-k) * e(n) with TAPS update multipliers and adds
//      mu * x(n-k) * e(n) to each coefficient register w_k.
// All 2*TAPS multipliers are aging-aware multipliers, so each multiply takes
// one or two cycles (three after a Razor correction); the filter waits for
// all multipliers of a step before moving on.
//
// Number format: samples, desired values, y, e and the coefficients are
// DW-bit two's complement with FRAC fractional bits (Q1.15 by default).
// Products are rounded down by FRAC bits, y and e and the coefficients
// saturate at the DW-bit range, and the step size is mu = 2**-MU_SHIFT.
// The unsigned bypassing arrays multiply magnitudes; the sign of each
// product is the XOR of the operand signs. The sample magnitude is the
// multiplicand (md), so with column bypassing the AHL judges the sample and
// with row bypassing the coefficient or the error.
//
// Handshake: a sample is accepted when in_valid and in_ready are high at a
// rising clock edge; in_ready is high only while the filter is idle. When
// the coefficients have been updated, y_out and e_out are valid with
// out_valid high for one cycle, and coef shows the updated w_k. Counting
// rising edges from the one that accepts a sample to the one that sees
// out_valid high, a sample takes 7 + L_fir + L_upd edges, where L_fir and
// L_upd are the slowest multiplier latencies (1 or 2) of the tap step and
// of the update step: 9 at best, 11 when both steps hold. Each Razor
// correction during a step adds one edge.
//
// The four-tap structure, the delay line, the tap and update multipliers,
// the coefficient accumulators, e(n) = d(n) - y(n) and the use of
// aging-aware multipliers follow the design description. The number format,
// the power-of-two step size, the saturation, the sign-magnitude use of the
// unsigned multipliers, zero initial coefficients and the sequencing are
// this design's choices.
module adaptive_fir
  import aafir_pkg::*;
#(
  parameter int unsigned TAPS      = 4,
  parameter int unsigned DW        = 16,
  parameter int unsigned FRAC      = 15,
  parameter int unsigned MU_SHIFT  = 4,
  parameter bypass_e     BYPASS    = BYPASS_COLUMN,
  parameter int unsigned WINDOW    = 32,
  parameter int unsigned THRESHOLD = 3
) (
  input  logic                 clk,
  input  logic                 clk_del,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [DW-1:0] x_in,
  input  logic signed [DW-1:0] d_in,
  output logic                 out_valid,
  output logic signed [DW-1:0] y_out,
  output logic signed [DW-1:0] e_out,
  output logic signed [DW-1:0] coef [TAPS],
  output logic [2*TAPS-1:0]    mult_error,   // Razor error of each multiplier
  output logic [2*TAPS-1:0]    mult_aged,    // aging indicator of each multiplier
  output logic [2*TAPS-1:0]    mult_hold     // AHL hold (gating) of each multiplier
);
  localparam int unsigned PW = 2 * DW;                 // unsigned product width
  localparam int unsigned SW = PW + 2 + $clog2(TAPS);  // signed sum width

  typedef enum logic [2:0] {
    S_IDLE,   // wait for a sample
    S_FIR,    // tap multiplies w_k * x(n-k)
    S_SUM,    // y(n) and e(n)
    S_UPD,    // update multiplies x(n-k) * e(n)
    S_WUP     // coefficient update, result out
  } state_e;

  state_e                 state;
  logic signed [DW-1:0]   xs    [TAPS];   // delay line, xs[0] = x(n)
  logic signed [DW-1:0]   w     [TAPS];
  logic signed [DW-1:0]   d_q, e_q;
  logic signed [SW-1:0]   prod  [TAPS];   // signed products of the current step
  logic [TAPS-1:0]        issued, got;

  // multiplier array: index k = tap multiplier, TAPS + k = update multiplier
  logic [2*TAPS-1:0]      m_valid, m_ready, m_out_valid;
  logic [DW-1:0]          m_md [2*TAPS];
  logic [DW-1:0]          m_mr [2*TAPS];
  logic [PW-1:0]          m_p  [2*TAPS];
  logic                   m_neg [2*TAPS];
  logic [2*TAPS-1:0]      m_gating_n;

  for (genvar k = 0; k < TAPS; k++) begin : g_ops
    assign m_md[k]         = DW'(magnitude(32'(xs[k])));
    assign m_mr[k]         = DW'(magnitude(32'(w[k])));
    assign m_neg[k]        = xs[k][DW-1] ^ w[k][DW-1];
    assign m_valid[k]      = (state == S_FIR) && !issued[k];
    assign m_md[TAPS+k]    = DW'(magnitude(32'(xs[k])));
    assign m_mr[TAPS+k]    = DW'(magnitude(32'(e_q)));
    assign m_neg[TAPS+k]   = xs[k][DW-1] ^ e_q[DW-1];
    assign m_valid[TAPS+k] = (state == S_UPD) && !issued[k];
  end

  for (genvar k = 0; k < 2 * TAPS; k++) begin : g_mult
    aging_aware_mult #(
      .M(DW), .BYPASS(BYPASS), .WINDOW(WINDOW), .THRESHOLD(THRESHOLD)
    ) u_mult (
      .clk      (clk),
      .clk_del  (clk_del),
      .rst_n    (rst_n),
      .in_valid (m_valid[k]),
      .in_ready (m_ready[k]),
      .md       (m_md[k]),
      .mr       (m_mr[k]),
      .out_valid(m_out_valid[k]),
      .product  (m_p[k]),
      .error    (mult_error[k]),
      .aged     (mult_aged[k]),
      .gating_n (m_gating_n[k])
    );
  end
  assign mult_hold = ~m_gating_n;

  // The sign of each result is taken from the operands still held in the
  // delay line, coefficient and error registers, which do not change until
  // the step is over.
  logic [TAPS-1:0]      step_valid;
  logic signed [SW-1:0] step_prod [TAPS];
  for (genvar k = 0; k < TAPS; k++) begin : g_sel
    logic [PW-1:0] mag;
    logic          neg;
    assign mag           = (state == S_UPD) ? m_p[TAPS+k]   : m_p[k];
    assign neg           = (state == S_UPD) ? m_neg[TAPS+k] : m_neg[k];
    assign step_valid[k] = (state == S_UPD) ? m_out_valid[TAPS+k] : m_out_valid[k];
    assign step_prod[k]  = neg ? -SW'(mag) : SW'(mag);
  end

  // y(n) = sum of the tap products, scaled back to DW bits
  logic signed [SW-1:0] acc;
  always_comb begin
    acc = '0;
    for (int k = 0; k < TAPS; k++) acc = acc + prod[k];
  end

  logic signed [DW-1:0] y_sat, e_sat;
  assign y_sat = DW'(saturate(64'(acc >>> FRAC), DW));
  assign e_sat = DW'(saturate(64'(d_q) - 64'(y_sat), DW));

  assign in_ready = (state == S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      issued    <= '0;
      got       <= '0;
      d_q       <= '0;
      e_q       <= '0;
      y_out     <= '0;
      e_out     <= '0;
      out_valid <= 1'b0;
      for (int k = 0; k < TAPS; k++) begin
        xs[k]   <= '0;
        w[k]    <= '0;
        prod[k] <= '0;
      end
    end else begin
      out_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (in_valid) begin
          xs[0] <= x_in;
          for (int k = 1; k < TAPS; k++) xs[k] <= xs[k-1];
          d_q    <= d_in;
          issued <= '0;
          got    <= '0;
          state  <= S_FIR;
        end
        S_FIR, S_UPD: begin
          for (int k = 0; k < TAPS; k++) begin
            if ((state == S_UPD) ? (m_valid[TAPS+k] && m_ready[TAPS+k])
                                 : (m_valid[k] && m_ready[k])) issued[k] <= 1'b1;
            if (step_valid[k] && issued[k] && !got[k]) begin
              prod[k] <= step_prod[k];
              got[k]  <= 1'b1;
            end
          end
          if (&(got | (step_valid & issued))) begin
            issued <= '0;
            got    <= '0;
            state  <= (state == S_FIR) ? S_SUM : S_WUP;
          end
        end
        S_SUM: begin
          y_out <= y_sat;
          e_q   <= e_sat;
          state <= S_UPD;
        end
        S_WUP: begin
          for (int k = 0; k < TAPS; k++) begin
            w[k] <= DW'(saturate(64'(w[k]) + 64'(prod[k] >>> (FRAC + MU_SHIFT)), DW));
          end
          e_out     <= e_q;
          out_valid <= 1'b1;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  for (genvar k = 0; k < TAPS; k++) begin : g_coef
    assign coef[k] = w[k];
  end

  // Samples are only taken while the filter is idle.
  a_accept_idle : assert property (@(posedge clk) disable iff (!rst_n)
    (in_valid && in_ready) |-> state == S_IDLE);

endmodule
