// Self-checking testbench of adaptive_fir at its default size (4 taps,
// 16-bit Q1.15 samples, mu = 1/16, column-bypassing multipliers).
//
// The filter identifies an unknown 4-tap system: x(n) is random, d(n) is
// x(n) passed through fixed taps h. A bit-exact reference of the LMS
// recursion (same rounding and saturation) runs in the testbench and every
// y(n), e(n) and every coefficient is compared after each sample. The
// number of cycles from acceptance of a sample to out_valid is checked
// against the judging rule of the eight multipliers (7 + L_fir + L_upd edges,
// where each L is 1 if every multiplicand of the step has more than n
// zeros, else 2). In the second half Razor errors are injected into the
// tap-0 multiplier, which must not change any result and must eventually
// age it. The error must shrink as the coefficients converge.
// A second filter built with row-bypassing multipliers is fed the same
// samples in parallel; its outputs and coefficients are checked against the
// same reference, and its multipliers must hold at least once.
module tb_adaptive_fir;
  import aafir_pkg::*;
  localparam int TAPS = 4, DW = 16, FRAC = 15, MU_SHIFT = 4, NJ = 8;
  localparam int NSAMP = 400;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready;
  logic signed [DW-1:0] x_in = '0, d_in = '0;
  logic out_valid;
  logic signed [DW-1:0] y_out, e_out;
  logic signed [DW-1:0] coef [TAPS];
  logic [2*TAPS-1:0] mult_error, mult_aged, mult_hold;
  int checks = 0, failures = 0;
  int cycle = 0;

  adaptive_fir dut (
    .clk, .clk_del(clk), .rst_n, .in_valid, .in_ready, .x_in, .d_in,
    .out_valid, .y_out, .e_out, .coef, .mult_error, .mult_aged, .mult_hold);

  // row-bypassing filter
  logic r_in_valid = 1'b0, r_in_ready, r_out_valid;
  logic signed [DW-1:0] r_x = '0, r_d = '0, r_y, r_e;
  logic signed [DW-1:0] r_coef [TAPS];
  logic [2*TAPS-1:0] r_error, r_aged, r_hold;
  adaptive_fir #(.BYPASS(BYPASS_ROW)) dut_row (
    .clk, .clk_del(clk), .rst_n, .in_valid(r_in_valid), .in_ready(r_in_ready), .x_in(r_x), .d_in(r_d),
    .out_valid(r_out_valid), .y_out(r_y), .e_out(r_e), .coef(r_coef),
    .mult_error(r_error), .mult_aged(r_aged), .mult_hold(r_hold));

  typedef struct { longint x, d, y, e; longint w [TAPS]; } expect_t;
  expect_t rq [$];
  bit      stim_done = 0;
  int      r_holds = 0, r_samples = 0;
  always @(posedge clk) if (rst_n) r_holds += $countones(r_hold);

  task automatic run_row_filter();
    while (!stim_done || rq.size() != 0) begin
      expect_t t;
      if (rq.size() == 0) begin @(posedge clk); continue; end
      t = rq.pop_front();
      @(negedge clk);
      r_in_valid = 1'b1;
      r_x = DW'(t.x);
      r_d = DW'(t.d);
      @(posedge clk);
      while (!r_in_ready) @(posedge clk);
      #1 r_in_valid = 1'b0;
      @(posedge clk);
      while (!r_out_valid) @(posedge clk);
      r_samples++;
      checks += 2 + TAPS;
      if (r_y !== DW'(t.y) || r_e !== DW'(t.e)) begin
        failures++;
        if (failures < 10) $display("FAIL row filter y=%0d e=%0d expected %0d %0d", r_y, r_e, t.y, t.e);
      end
      for (int k = 0; k < TAPS; k++) if (r_coef[k] !== DW'(t.w[k])) begin
        failures++;
        if (failures < 10) $display("FAIL row filter w%0d=%0d expected %0d", k, r_coef[k], t.w[k]);
      end
    end
  endtask

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (NSAMP * 40 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- reference -------------------------------------------------------
  longint rx [TAPS];
  longint rw [TAPS];
  longint hx [TAPS];
  const longint h [TAPS] = '{16384, -8192, 4096, 9830};   // 0.5 -0.25 0.125 0.3

  function automatic longint sat(input longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  function automatic longint floor_shift(input longint v, input int s);
    return v >>> s;
  endfunction

  function automatic int zeros_of_mag(input longint v);
    longint m;
    m = (v < 0) ? -v : v;
    return DW - $countones(16'(m));
  endfunction

  int n_hold = 0, n_err = 0, n_slow_steps = 0;
  always @(posedge clk) begin
    n_hold += $countones(mult_hold);
    n_err  += $countones(mult_error);
  end

  initial begin
    @(posedge rst_n);
    run_row_filter();
  end

  initial begin
    longint sum_e_first = 0, sum_e_last = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int k = 0; k < TAPS; k++) begin rx[k] = 0; rw[k] = 0; hx[k] = 0; end
    for (int n = 0; n < NSAMP; n++) begin
      longint xv, dv, acc, yv, ev;
      int t0, lf, lu, exp_lat;
      bit inject;
      xv = longint'($urandom % 32768) - 16384;
      for (int k = TAPS - 1; k > 0; k--) hx[k] = hx[k-1];
      hx[0] = xv;
      acc = 0;
      for (int k = 0; k < TAPS; k++) acc += h[k] * hx[k];
      dv = sat(floor_shift(acc, FRAC));
      // reference LMS step
      for (int k = TAPS - 1; k > 0; k--) rx[k] = rx[k-1];
      rx[0] = xv;
      acc = 0;
      for (int k = 0; k < TAPS; k++) acc += rw[k] * rx[k];
      yv = sat(floor_shift(acc, FRAC));
      ev = sat(dv - yv);
      // expected latency from the multiplicands (the samples in the delay line)
      lf = 1; lu = 1;
      for (int k = 0; k < TAPS; k++) begin
        if (zeros_of_mag(rx[k]) <= (mult_aged[k] ? NJ + 1 : NJ)) lf = 2;
        if (zeros_of_mag(rx[k]) <= (mult_aged[TAPS+k] ? NJ + 1 : NJ)) lu = 2;
      end
      if (lf == 2) n_slow_steps++;
      exp_lat = 7 + lf + lu;
      for (int k = 0; k < TAPS; k++) rw[k] = sat(rw[k] + floor_shift(rx[k] * ev, FRAC + MU_SHIFT));
      begin
        expect_t t;
        t.x = xv; t.d = dv; t.y = yv; t.e = ev;
        for (int k = 0; k < TAPS; k++) t.w[k] = rw[k];
        rq.push_back(t);
      end
      // drive the sample
      @(negedge clk);
      in_valid = 1'b1;
      x_in = DW'(xv);
      d_in = DW'(dv);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      t0 = cycle;
      #1 in_valid = 1'b0;
      inject = (n >= NSAMP / 2) && (n % 5 == 0);
      if (inject) begin
        // corrupt the first capture of the tap-0 multiplier
        logic [2*DW-1:0] late_word;
        do begin @(negedge clk); #1; end while (!dut.g_mult[0].u_mult.cap);
        @(posedge clk);
        #1;
        late_word = dut.g_mult[0].u_mult.u_razor.main_q ^ 32'h0000_0100;
        force dut.g_mult[0].u_mult.u_razor.main_q = late_word;
        release dut.g_mult[0].u_mult.u_razor.main_q;
      end
      @(posedge clk);
      while (!out_valid) @(posedge clk);
      checks += 2 + TAPS;
      if (y_out !== DW'(yv) || e_out !== DW'(ev)) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d y=%0d e=%0d expected y=%0d e=%0d", n, y_out, e_out, yv, ev);
      end
      for (int k = 0; k < TAPS; k++) if (coef[k] !== DW'(rw[k])) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d w%0d=%0d expected %0d", n, k, coef[k], rw[k]);
      end
      if (!inject) begin
        checks++;
        if (cycle - t0 != exp_lat) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d latency %0d expected %0d", n, cycle - t0, exp_lat);
        end
      end
      if (n < 50) sum_e_first += (ev < 0) ? -ev : ev;
      if (n >= NSAMP - 50) sum_e_last += (ev < 0) ? -ev : ev;
    end
    stim_done = 1;
    while (rq.size() != 0 || r_samples < NSAMP) @(posedge clk);
    $display("row-bypass filter: %0d samples, holds %0d", r_samples, r_holds);
    checks += 2;
    if (r_samples != NSAMP) begin failures++; $display("FAIL row filter sample count"); end
    if (r_holds == 0) begin failures++; $display("FAIL row filter never held"); end
    $display("mean |e|: first 50 samples %0d, last 50 samples %0d", sum_e_first / 50, sum_e_last / 50);
    $display("holds %0d, Razor errors %0d, two-cycle tap steps %0d, aged multipliers %b", n_hold, n_err, n_slow_steps, mult_aged);
    checks += 4;
    if (sum_e_last * 4 > sum_e_first) begin failures++; $display("FAIL filter did not converge"); end
    if (n_hold == 0) begin failures++; $display("FAIL no hold happened"); end
    if (n_err == 0)  begin failures++; $display("FAIL no Razor error happened"); end
    if (!mult_aged[0]) begin failures++; $display("FAIL tap-0 multiplier never aged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
