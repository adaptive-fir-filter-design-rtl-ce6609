// Aging indicator of the adaptive hold logic.
//
// A counter of Razor errors over a window of WINDOW completed operations.
// op_done pulses once per completed operation and error once per operation
// that had to be corrected. When the number of errors inside the current
// window exceeds THRESHOLD the circuit is taken to have aged significantly
// and aged goes to 1, switching the hold logic to its stricter judging
// block. Both counters return to zero at the end of every window.
//
// Error counting over a window, reset at the window's end and the threshold
// test follow the design description. Window length, threshold, and that
// aged stays 1 once set (aging does not reverse) are this design's choices.
// Synchronous active-low reset; aged is registered.
module aging_indicator #(
  parameter int unsigned WINDOW    = 32,
  parameter int unsigned THRESHOLD = 3
) (
  input  logic clk,
  input  logic rst_n,
  input  logic op_done,
  input  logic error,
  output logic aged
);
  localparam int unsigned CW = $clog2(WINDOW + 1);

  logic [CW-1:0] op_cnt;
  logic [CW-1:0] err_cnt;
  logic [CW-1:0] err_next;
  logic          window_end;

  assign err_next   = (error && err_cnt != CW'(WINDOW)) ? err_cnt + 1'b1 : err_cnt;
  assign window_end = op_done && (op_cnt == CW'(WINDOW - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      op_cnt  <= '0;
      err_cnt <= '0;
      aged    <= 1'b0;
    end else begin
      if (32'(err_next) > THRESHOLD) aged <= 1'b1;
      if (window_end) begin
        op_cnt  <= '0;
        err_cnt <= '0;
      end else begin
        if (op_done) op_cnt <= op_cnt + 1'b1;
        err_cnt <= err_next;
      end
    end
  end

endmodule
