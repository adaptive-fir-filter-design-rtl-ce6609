// Top level: the adaptive FIR filter on aging-aware multipliers, and beside
// it a stand-alone row-bypassing aging-aware multiplier unit.
//
// The filter (4 taps, 16-bit samples) uses aging-aware multipliers with
// column bypassing for all eight of its multipliers: four tap multipliers
// and four coefficient-update multipliers. Both bypassing variants are
// presented as equally usable inside the aging-aware multiplier; the row
// variant is brought out here as its own 16 x 16 unit, with its own ports,
// so that both can be used and observed. The two parts share only clock,
// delayed clock and reset.
//
// clk_del is the delayed copy of clk used by the Razor shadow registers. It
// comes from outside because a delay element is a physical part; in a
// simulation without gate delays it can be tied to clk.
//
// Filter ports (f_*) and multiplier ports (rb_*) are those of adaptive_fir
// and aging_aware_mult; see those modules for their timing.
module aafir_top
  import aafir_pkg::*;
#(
  parameter int unsigned TAPS      = 4,
  parameter int unsigned DW        = 16,
  parameter int unsigned M         = 16,
  parameter int unsigned WINDOW    = 32,
  parameter int unsigned THRESHOLD = 3
) (
  input  logic                 clk,
  input  logic                 clk_del,
  input  logic                 rst_n,
  // adaptive FIR filter
  input  logic                 f_in_valid,
  output logic                 f_in_ready,
  input  logic signed [DW-1:0] f_x,
  input  logic signed [DW-1:0] f_d,
  output logic                 f_out_valid,
  output logic signed [DW-1:0] f_y,
  output logic signed [DW-1:0] f_e,
  output logic signed [DW-1:0] f_coef [TAPS],
  output logic [2*TAPS-1:0]    f_mult_error,
  output logic [2*TAPS-1:0]    f_mult_aged,
  output logic [2*TAPS-1:0]    f_mult_hold,
  // stand-alone row-bypassing aging-aware multiplier
  input  logic                 rb_in_valid,
  output logic                 rb_in_ready,
  input  logic [M-1:0]         rb_md,
  input  logic [M-1:0]         rb_mr,
  output logic                 rb_out_valid,
  output logic [2*M-1:0]       rb_product,
  output logic                 rb_error,
  output logic                 rb_aged,
  output logic                 rb_hold
);
  logic rb_gating_n;

  adaptive_fir #(
    .TAPS(TAPS), .DW(DW), .BYPASS(BYPASS_COLUMN),
    .WINDOW(WINDOW), .THRESHOLD(THRESHOLD)
  ) u_fir (
    .clk       (clk),
    .clk_del   (clk_del),
    .rst_n     (rst_n),
    .in_valid  (f_in_valid),
    .in_ready  (f_in_ready),
    .x_in      (f_x),
    .d_in      (f_d),
    .out_valid (f_out_valid),
    .y_out     (f_y),
    .e_out     (f_e),
    .coef      (f_coef),
    .mult_error(f_mult_error),
    .mult_aged (f_mult_aged),
    .mult_hold (f_mult_hold)
  );

  aging_aware_mult #(
    .M(M), .BYPASS(BYPASS_ROW), .WINDOW(WINDOW), .THRESHOLD(THRESHOLD)
  ) u_row_mult (
    .clk      (clk),
    .clk_del  (clk_del),
    .rst_n    (rst_n),
    .in_valid (rb_in_valid),
    .in_ready (rb_in_ready),
    .md       (rb_md),
    .mr       (rb_mr),
    .out_valid(rb_out_valid),
    .product  (rb_product),
    .error    (rb_error),
    .aged     (rb_aged),
    .gating_n (rb_gating_n)
  );
  assign rb_hold = ~rb_gating_n;

endmodule
