// tb_nls_ofdm: calibration with an LTE-like OFDM signal and two CW blockers.
//
// The wanted signal is a real OFDM signal of 600 subcarriers at 15 kHz
// spacing (15 kHz to 9 MHz, one channel of a full 10 MHz LTE baseband) with
// random QPSK data that changes every 2048 baseband samples (66.7 us), plus
// strong continuous-wave blockers at 20 MHz and 38 MHz, whose third-order
// product lands in band at 2 MHz. The CSF model is the same as in tb_nls_top
// with a 10 MHz linear corner: y = L4(x) + a * L2(x^3),
// a = KNL * (bias - OPT) / 128. Subcarriers are generated by rotating
// phasors, reset to their data phase at each symbol start.
// The design runs with all parameters at their defaults. Checks: the
// calibration ends powered down with the bias within TOL codes of OPT, and
// the correlation magnitude falls by at least 4x; correlation results come
// once per 2048 * 8 clock cycles. Counted mechanisms: symbols, reversals,
// bias steps both ways.
module tb_nls_ofdm;
  localparam real FS   = 245.76e6;
  localparam real PI   = 3.14159265358979;
  localparam int  TOL  = 12;
  localparam real KNL  = 1.5;

  logic clk = 0, rst_n = 0, adc_valid = 0, calib_start = 0;
  logic signed [11:0] main_adc = '0;
  logic signed [5:0]  aux_adc = '0;
  logic y_valid, aux_pd, calib_done, corr_valid;
  logic signed [14:0] y;
  logic [7:0] bias;
  logic signed [42:0] corr;
  int checks = 0, failures = 0;

  nls_top dut (.*);

  always #2 clk = ~clk;

  initial begin
    repeat (2_000_000) @(posedge clk);
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
  localparam int NSC = 600;
  int  opt = 70;
  real pc [NSC], ps [NSC], rc [NSC], rs [NSC];
  real amp = 0.15 * $sqrt(2.0 / 600.0);

  task automatic new_symbol();
    for (int k = 0; k < NSC; k++) begin
      real ph;
      ph = PI / 4.0 + PI / 2.0 * $itor($urandom_range(0, 3));
      pc[k] = $cos(ph);
      ps[k] = $sin(ph);
      rc[k] = $cos(2.0 * PI * 15.0e3 * (k + 1) / FS);
      rs[k] = $sin(2.0 * PI * 15.0e3 * (k + 1) / FS);
    end
  endtask
  longint n = 0;
  real l4 [4];
  real l2 [2];

  function automatic int quant(real v, int bits);
    int full = (1 << (bits - 1)) - 1;
    int q = $rtoi(v * full + ((v >= 0) ? 0.5 : -0.5));
    if (q > full) q = full;
    if (q < -full - 1) q = -full - 1;
    return q;
  endfunction

  always @(negedge clk) begin
    real t, x, xc, a, yv, p4, p2;
    if (rst_n) begin
      t  = real'(n) / FS;
      if (n % (2048 * 8) == 0) new_symbol();
      x = 0.0;
      for (int k = 0; k < NSC; k++) begin
        real c2;
        x   += amp * pc[k];
        c2   = pc[k] * rc[k] - ps[k] * rs[k];
        ps[k] = ps[k] * rc[k] + pc[k] * rs[k];
        pc[k] = c2;
      end
      x += 0.40 * $cos(2.0 * PI * 20.0e6 * t + 0.3) + 0.40 * $cos(2.0 * PI * 38.0e6 * t + 2.0)
         + 0.01 * ($itor($urandom_range(0, 2000)) / 1000.0 - 1.0);
      xc = x * x * x;
      p4 = $exp(-2.0 * PI * 10.0e6 / FS);
      p2 = $exp(-2.0 * PI * 10.0e6 / FS);
      l4[0] = p4 * l4[0] + (1.0 - p4) * x;
      for (int i = 1; i < 4; i++) l4[i] = p4 * l4[i] + (1.0 - p4) * l4[i-1];
      l2[0] = p2 * l2[0] + (1.0 - p2) * xc;
      l2[1] = p2 * l2[1] + (1.0 - p2) * l2[0];
      a  = KNL * real'(int'(bias) - opt) / 128.0;
      yv = l4[3] + a * l2[1];
      main_adc  <= 12'(quant(yv, 12));
      aux_adc   <= 6'(quant(x, 6));
      adc_valid <= 1'b1;
      n++;
    end
  end

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
    for (int i = 0; i < 4; i++) l4[i] = 0.0;
    for (int i = 0; i < 2; i++) l2[i] = 0.0;
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
    check(n_pd == 1, "one power-down");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
