// tb_nls_top: end-to-end calibration of a modelled non-linear CSF.
//
// The analog front end around the design is modelled by csf_frontend_model
// at the 245.76 MS/s converter rate:
//   x(n)   two in-band tones (2.91 and 7.5 MHz) plus two strong out-of-band
//          blockers (20.01 and 38.01 MHz), whose third-order product falls
//          in band at 2.01 MHz, plus a little noise;
//   CSF    y = L4(x) + a * L2(x^3): a fourth-order low-pass (four real poles
//          at 6 MHz) for the linear part and a second-order one (10 MHz) for
//          the third-order term, a = KNL * (bias - OPT) / 128, so that the
//          filter is linear at bias code OPT;
//   ADCs   a 12-bit main ADC on y and a 6-bit auxiliary ADC on x, both
//          rounding and saturating; full scale is 1.0.
// The design runs with all parameters at their defaults. The test starts a
// calibration, lets the loop converge, then moves OPT (a drift of the
// analog optimum) and calibrates again.
//
// Checks: y equals the sum of each eight main ADC samples (computed here);
// correlation results come exactly once per 2048 * 8 clock cycles; the bias
// only changes at a symbol boundary; each calibration ends with done, the
// auxiliary path powered down and silent, and the bias within TOL codes of
// OPT; and the correlation magnitude at the end is well below the one at
// the start. Mechanisms counted (each must occur): decimated main samples,
// cubed and decimated auxiliary samples, NLMS updates, correlation symbols,
// bias steps in both directions, direction reversals, step halvings,
// power-downs, and a second calibration started from the powered-down state.
module tb_nls_top;
  localparam int  TOL  = 12;
  localparam real KNL  = 1.5;

  logic clk = 0, rst_n = 0, adc_valid, calib_start = 0;
  logic signed [11:0] main_adc;
  logic signed [5:0]  aux_adc;
  logic y_valid, aux_pd, calib_done, corr_valid;
  logic signed [14:0] y;
  logic [7:0] bias;
  logic signed [42:0] corr;
  int checks = 0, failures = 0;

  nls_top dut (.*);

  always #2 clk = ~clk;

  initial begin
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s t=%0t", what, $time); end
  endtask

  // ---------------- front-end model ----------------
  int opt = 90;
  csf_frontend_model #(.LIN_FC(6.0e6), .KNL(KNL)) u_fe (
    .clk, .run(rst_n), .opt(opt), .bias(bias), .adc_valid, .main_adc, .aux_adc
  );

  // ---------------- independent check of the main decimator ----------------
  int msum = 0, mcnt = 0, ycount = 0;
  bit ok_y = 1;
  int pend = 0;
  bit pend_v = 0;
  always @(posedge clk) if (rst_n) begin
    if (y_valid) begin
      ycount++;
      checks++;
      if (!pend_v || y != 15'(pend)) begin
        failures++;
        if (failures < 20) $display("FAIL y=%0d expected %0d", y, pend);
      end
      pend_v = 0;
    end
    // the DUT registers the ADC sample once, then accumulates
    if (dut.smp_v) begin
      msum += int'(dut.main_q);
      mcnt++;
      if (mcnt == 8) begin pend = msum; pend_v = 1; msum = 0; mcnt = 0; end
    end
  end

  // ---------------- mechanism counters ----------------
  int n_cube = 0, n_xdec = 0, n_kdec = 0, n_lms = 0, n_sym = 0;
  int n_up = 0, n_down = 0, n_rev = 0, n_half = 0, n_pd = 0, n_aux_while_pd = 0;
  logic [7:0] bias_q;
  logic done_q;
  logic pd_q = 1;
  longint last_cv = -1, cyc = 0;
  bit bias_moved_off_boundary = 0, bad_rate = 0;
  always @(posedge clk) begin
    cyc++;
    if (dut.cube_v) n_cube++;
    if (dut.x_v) n_xdec++;
    if (dut.k_v) n_kdec++;
    if (dut.e_v) n_lms++;
    if (dut.u_tuner.reversal) n_rev++;
    if (dut.u_tuner.state == nls_pkg::TUNE_SEARCH && dut.u_tuner.step != $past(dut.u_tuner.step)
        && dut.u_tuner.step < $past(dut.u_tuner.step)) n_half++;
    // one cycle of pipeline drain is allowed after the power-down edge
    if (rst_n && aux_pd && pd_q && (dut.x_v || dut.cube_v || dut.e_v)) n_aux_while_pd++;
    pd_q = aux_pd;
    if (rst_n && corr_valid) begin
      n_sym++;
      if (last_cv >= 0 && cyc - last_cv != 2048 * 8) bad_rate = 1;
      last_cv = cyc;
    end
    if (rst_n && bias != bias_q) begin
      if (bias > bias_q) n_up++; else n_down++;
      if (!$past(corr_valid)) bias_moved_off_boundary = 1;
    end
    if (rst_n && calib_done && !done_q) n_pd++;
    bias_q = bias;
    done_q = calib_done;
  end

  // ---------------- stimulus ----------------
  task automatic calibrate(output longint first_mag, output longint last_mag, output int syms);
    longint m;
    @(negedge clk); calib_start = 1; @(negedge clk); calib_start = 0;
    last_cv = -1;
    syms = 0;
    first_mag = -1;
    while (!calib_done) begin
      @(posedge clk);
      if (rst_n && corr_valid) begin
        m = corr < 0 ? -longint'(corr) : longint'(corr);
        if (first_mag < 0) first_mag = m;
        last_mag = m;
        syms++;
        $display("  symbol %0d: bias=%0d corr=%0d", syms, bias, corr);
      end
    end
    repeat (10) @(posedge clk);
  endtask

  initial begin
    longint m0, m1;
    int syms;
    bias_q = 8'd128; done_q = 0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (50) @(posedge clk);
    check(aux_pd == 1 && bias == 128, "powered down with mid-scale bias after reset");

    $display("calibration 1, optimum %0d", opt);
    calibrate(m0, m1, syms);
    $display("  final bias %0d after %0d symbols", bias, syms);
    check(calib_done && aux_pd, "calibration 1 ends powered down");
    check(int'(bias) >= opt - TOL && int'(bias) <= opt + TOL, "calibration 1 reaches the optimum");
    check(m1 * 4 < m0, "calibration 1 lowers the correlation");

    // powered-down path stays silent for a while
    repeat (20000) @(posedge clk);

    opt = 170;
    $display("calibration 2, optimum %0d", opt);
    calibrate(m0, m1, syms);
    $display("  final bias %0d after %0d symbols", bias, syms);
    check(calib_done && aux_pd, "calibration 2 ends powered down");
    check(int'(bias) >= opt - TOL && int'(bias) <= opt + TOL, "calibration 2 reaches the optimum");
    check(m1 * 4 < m0, "calibration 2 lowers the correlation");

    check(!bad_rate, "one correlation per 2048 baseband samples");
    check(!bias_moved_off_boundary, "bias changes only at symbol boundaries");
    check(n_aux_while_pd == 0, "auxiliary path silent while powered down");
    check(ycount > 1000, "main path keeps producing baseband samples");
    $display("mechanisms: y=%0d cube=%0d xdec=%0d kdec=%0d lms=%0d sym=%0d up=%0d down=%0d rev=%0d half=%0d pd=%0d",
             ycount, n_cube, n_xdec, n_kdec, n_lms, n_sym, n_up, n_down, n_rev, n_half, n_pd);
    check(n_cube > 0, "cubing happened");
    check(n_xdec > 0 && n_kdec > 0, "auxiliary decimation happened");
    check(n_lms > 0, "NLMS updates happened");
    check(n_sym > 0, "correlation symbols happened");
    check(n_up > 0 && n_down > 0, "bias moved both ways");
    check(n_rev > 0, "direction reversal happened");
    check(n_half > 0, "step halving happened");
    check(n_pd == 2, "two power-downs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
