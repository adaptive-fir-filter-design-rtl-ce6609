// End-to-end testbench of aafir_top at its default parameters.
//
// The adaptive filter identifies an unknown 4-tap system while, in
// parallel, the stand-alone row-bypassing multiplier streams random
// products. Everything is checked against models kept in the testbench:
// every filter output and coefficient against a bit-exact LMS reference,
// every product against arithmetic multiplication. clk_del is tied to clk.
//
// Mechanisms that must each happen at least once, and are counted:
//   - filter: a multiplier hold (two-cycle pattern), a Razor error and its
//     correction, an aging indicator switching to the stricter judge, and
//     convergence of the error;
//   - row-bypass unit: a hold, a Razor error and correction, aging.
// Razor errors are injected as a late arrival would leave the main
// flip-flop: its word is overwritten right after it captured.
module tb_aafir_top;
  localparam int TAPS = 4, DW = 16, M = 16, FRAC = 15, MU_SHIFT = 4;
  localparam int NSAMP = 300;

  logic clk = 1'b0, rst_n = 1'b0;
  logic f_in_valid = 1'b0, f_in_ready;
  logic signed [DW-1:0] f_x = '0, f_d = '0;
  logic f_out_valid;
  logic signed [DW-1:0] f_y, f_e;
  logic signed [DW-1:0] f_coef [TAPS];
  logic [2*TAPS-1:0] f_mult_error, f_mult_aged, f_mult_hold;
  logic rb_in_valid = 1'b0, rb_in_ready;
  logic [M-1:0] rb_md = '0, rb_mr = '0;
  logic rb_out_valid;
  logic [2*M-1:0] rb_product;
  logic rb_error, rb_aged, rb_hold;
  int checks = 0, failures = 0;

  aafir_top dut (
    .clk, .clk_del(clk), .rst_n,
    .f_in_valid, .f_in_ready, .f_x, .f_d, .f_out_valid, .f_y, .f_e, .f_coef,
    .f_mult_error, .f_mult_aged, .f_mult_hold,
    .rb_in_valid, .rb_in_ready, .rb_md, .rb_mr, .rb_out_valid, .rb_product,
    .rb_error, .rb_aged, .rb_hold);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NSAMP * 40 + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- mechanism counters ----------------------------------------------
  int f_holds = 0, f_errors = 0, rb_holds = 0, rb_errors = 0, rb_results = 0;
  always @(posedge clk) if (rst_n) begin
    f_holds   += $countones(f_mult_hold);
    f_errors  += $countones(f_mult_error);
    rb_holds  += int'(rb_hold);
    rb_errors += int'(rb_error);
  end

  function automatic longint sat(input longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  // ---- filter ------------------------------------------------------------
  task automatic run_filter();
    longint rx [TAPS], rw [TAPS], hx [TAPS];
    longint h [TAPS];
    longint e_first = 0, e_last = 0;
    h = '{-6554, 13107, 8192, -3277};   // -0.2 0.4 0.25 -0.1
    for (int k = 0; k < TAPS; k++) begin rx[k] = 0; rw[k] = 0; hx[k] = 0; end
    for (int n = 0; n < NSAMP; n++) begin
      longint xv, dv, acc, yv, ev;
      xv = longint'($urandom % 40000) - 20000;
      for (int k = TAPS - 1; k > 0; k--) begin hx[k] = hx[k-1]; rx[k] = rx[k-1]; end
      hx[0] = xv;
      rx[0] = xv;
      acc = 0;
      for (int k = 0; k < TAPS; k++) acc += h[k] * hx[k];
      dv = sat(acc >>> FRAC);
      acc = 0;
      for (int k = 0; k < TAPS; k++) acc += rw[k] * rx[k];
      yv = sat(acc >>> FRAC);
      ev = sat(dv - yv);
      for (int k = 0; k < TAPS; k++) rw[k] = sat(rw[k] + ((rx[k] * ev) >>> (FRAC + MU_SHIFT)));
      @(negedge clk);
      f_in_valid = 1'b1;
      f_x = DW'(xv);
      f_d = DW'(dv);
      @(posedge clk);
      while (!f_in_ready) @(posedge clk);
      #1 f_in_valid = 1'b0;
      if (n >= 100 && n % 4 == 0) begin
        // late arrival in update multiplier 1 (index TAPS + 1)
        logic [2*DW-1:0] w;
        do begin @(negedge clk); #1; end while (!dut.u_fir.g_mult[TAPS+1].u_mult.cap);
        @(posedge clk);
        #1;
        w = dut.u_fir.g_mult[TAPS+1].u_mult.u_razor.main_q ^ 32'h0040_0000;
        force dut.u_fir.g_mult[TAPS+1].u_mult.u_razor.main_q = w;
        release dut.u_fir.g_mult[TAPS+1].u_mult.u_razor.main_q;
      end
      @(posedge clk);
      while (!f_out_valid) @(posedge clk);
      checks += 2 + TAPS;
      if (f_y !== DW'(yv) || f_e !== DW'(ev)) begin
        failures++;
        if (failures < 10) $display("FAIL filter n=%0d y=%0d e=%0d expected %0d %0d", n, f_y, f_e, yv, ev);
      end
      for (int k = 0; k < TAPS; k++) if (f_coef[k] !== DW'(rw[k])) begin
        failures++;
        if (failures < 10) $display("FAIL filter n=%0d w%0d=%0d expected %0d", n, k, f_coef[k], rw[k]);
      end
      if (n < 50) e_first += (ev < 0) ? -ev : ev;
      if (n >= NSAMP - 50) e_last += (ev < 0) ? -ev : ev;
    end
    $display("filter: mean |e| first 50 = %0d, last 50 = %0d; coefficients %0d %0d %0d %0d",
             e_first / 50, e_last / 50, f_coef[0], f_coef[1], f_coef[2], f_coef[3]);
    checks++;
    if (e_last * 4 > e_first) begin failures++; $display("FAIL filter did not converge"); end
  endtask

  // ---- row-bypass multiplier --------------------------------------------
  logic [2*M-1:0] rb_q [$];
  always @(posedge clk) if (rst_n) begin
    if (rb_in_valid && rb_in_ready) rb_q.push_back({{M{1'b0}}, rb_md} * {{M{1'b0}}, rb_mr});
    if (rb_out_valid) begin
      logic [2*M-1:0] e;
      checks++;
      rb_results++;
      e = (rb_q.size() != 0) ? rb_q.pop_front() : ~rb_product;
      if (rb_product !== e) begin
        failures++;
        if (failures < 10) $display("FAIL row unit product %h expected %h", rb_product, e);
      end
    end
  end

  task automatic run_row_unit();
    for (int i = 0; i < 1500; i++) begin
      @(negedge clk);
      rb_in_valid = 1'b1;
      rb_md = M'($urandom);
      rb_mr = M'($urandom) & M'($urandom | $urandom);
      @(posedge clk);
      while (!rb_in_ready) @(posedge clk);
      #1 rb_in_valid = 1'b0;
      if (i % 40 == 7 || (i >= 600 && i < 616 && i % 2 == 0)) begin
        logic [2*M-1:0] w;
        do begin @(negedge clk); #1; end while (!dut.u_row_mult.cap);
        @(posedge clk);
        #1;
        w = dut.u_row_mult.u_razor.main_q ^ 32'h8000_0001;
        force dut.u_row_mult.u_razor.main_q = w;
        release dut.u_row_mult.u_razor.main_q;
      end
    end
    while (rb_q.size() != 0) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    fork
      run_filter();
      run_row_unit();
    join
    repeat (3) @(posedge clk);
    $display("filter: holds %0d, Razor errors %0d, aged %b", f_holds, f_errors, f_mult_aged);
    $display("row unit: results %0d, holds %0d, Razor errors %0d, aged %0b", rb_results, rb_holds, rb_errors, rb_aged);
    checks += 7;
    if (f_holds == 0)         begin failures++; $display("FAIL filter: no hold"); end
    if (f_errors == 0)        begin failures++; $display("FAIL filter: no Razor error"); end
    if (!f_mult_aged[TAPS+1]) begin failures++; $display("FAIL filter: no aging switch"); end
    if (rb_holds == 0)        begin failures++; $display("FAIL row unit: no hold"); end
    if (rb_errors == 0)       begin failures++; $display("FAIL row unit: no Razor error"); end
    if (!rb_aged)             begin failures++; $display("FAIL row unit: no aging switch"); end
    if (rb_results != 1500)   begin failures++; $display("FAIL row unit: %0d results", rb_results); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
