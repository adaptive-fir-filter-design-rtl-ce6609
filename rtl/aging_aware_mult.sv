// Aging-aware reliable multiplier: a variable-latency unsigned M x M
// multiplier that gives each input pattern one or two clock cycles and keeps
// working correctly as its circuit slows down with age.
//
// Structure: two M-bit operand registers feed a bypassing array multiplier
// (column bypassing or row bypassing, chosen by BYPASS). Its 2M-bit product
// goes into a Razor register. The adaptive hold logic (AHL) judges the
// operand that controls bypassing: a pattern with few zeros has a long path
// and is given two cycles by holding the operand registers and not taking
// the result for one clock edge. The hold stands in for the clock gate of
// the original circuit (clk AND gating_n on the operand registers): here the
// registers are enabled rather than their clock gated, which behaves the
// same at the clock edges and keeps the design free of derived clocks.
// If a pattern judged fast still misses the clock (the Razor shadow differs
// from the main flip-flop), the Razor register restores the correct product
// from its shadow at the next edge and the operation in flight waits a
// cycle, so the erroneous operation is completed in two cycles. Razor errors
// also feed the AHL's aging indicator, which switches the AHL to its
// stricter judging block once errors become frequent.
//
// Handshake: an operation is accepted at a rising edge where in_valid and
// in_ready are both high. Its product is presented on product with
// out_valid high for one cycle:
//   - one cycle after acceptance for a pattern judged fast,
//   - two cycles after acceptance for a pattern judged slow,
//   - one cycle later than that if the Razor register flagged an error.
// A new operation can be accepted at the edge where the previous one is
// captured, so fast patterns stream at one per cycle. error and aged are
// status outputs; gating_n low marks a cycle whose ending edge is a hold.
//
// The block set (registers, bypassing multiplier, Razor register, AHL, one
// gate) and the one/two-cycle rule follow the design description; the
// valid/ready handshake is this design's.
module aging_aware_mult
  import aafir_pkg::*;
#(
  parameter int unsigned M         = 16,
  parameter bypass_e     BYPASS    = BYPASS_COLUMN,
  parameter int unsigned N         = M / 2,
  parameter int unsigned WINDOW    = 32,
  parameter int unsigned THRESHOLD = 3
) (
  input  logic           clk,
  input  logic           clk_del,
  input  logic           rst_n,
  input  logic           in_valid,
  output logic           in_ready,
  input  logic [M-1:0]   md,
  input  logic [M-1:0]   mr,
  output logic           out_valid,
  output logic [2*M-1:0] product,
  output logic           error,
  output logic           aged,
  output logic           gating_n
);
  logic [M-1:0]   md_q, mr_q;
  logic [2*M-1:0] p_comb;
  logic           busy;        // operand registers hold an uncaptured operation
  logic           cap;         // the Razor register takes the product at this edge
  logic           load;
  logic           vld_q;       // Razor main flip-flop was written at the last edge

  assign cap      = busy & gating_n & ~error;
  assign in_ready = ~error & (~busy | gating_n);
  assign load     = in_valid & in_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      md_q  <= '0;
      mr_q  <= '0;
      busy  <= 1'b0;
      vld_q <= 1'b0;
    end else begin
      if (load) begin
        md_q <= md;
        mr_q <= mr;
      end
      busy  <= load | (busy & ~cap);
      vld_q <= cap | error;
    end
  end

  if (BYPASS == BYPASS_COLUMN) begin : g_col
    column_bypass_mult #(.M(M)) u_mult (.a(md_q), .b(mr_q), .p(p_comb));
  end else begin : g_row
    row_bypass_mult #(.M(M)) u_mult (.a(md_q), .b(mr_q), .p(p_comb));
  end

  razor_ff #(.W(2 * M)) u_razor (
    .clk    (clk),
    .clk_del(clk_del),
    .rst_n  (rst_n),
    .en     (cap),
    .d      (p_comb),
    .q      (product),
    .error  (error)
  );

  assign out_valid = vld_q & ~error;

  ahl #(.M(M), .N(N), .WINDOW(WINDOW), .THRESHOLD(THRESHOLD)) u_ahl (
    .clk      (clk),
    .rst_n    (rst_n),
    .operand  ((BYPASS == BYPASS_COLUMN) ? md_q : mr_q),
    .active   (busy),
    .op_done  (out_valid),
    .error    (error),
    .gating_n (gating_n),
    .aged     (aged)
  );

  // A result is only ever presented for an operation that was captured.
  a_valid_after_cap : assert property (@(posedge clk) disable iff (!rst_n)
    out_valid |-> $past(cap) || $past(error));

endmodule
