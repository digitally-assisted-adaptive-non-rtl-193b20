// tb_nlms_filter: checks the normalized LMS filter two ways.
//
// 1. Bit-exact: a reference model written here in 64-bit integers (FIR sum,
//    rounding and saturation of z, e = y - z, one divide by EPS + |X|^2,
//    per-tap rounded increments, coefficient saturation) runs on the same
//    stimulus, and z, e and all nine coefficients are compared after every
//    sample, with random gaps between samples.
// 2. Behaviour: the filter identifies an unknown 9-tap FIR system
//    y = h * x. After training the mean |e| must be small and each
//    coefficient must be within 3 LSB of h; adaptation frozen by adapt_en=0
//    must leave the coefficients alone, and clr must zero them.
module tb_nlms_filter;
  localparam int TAPS = 9, X_W = 9, Y_W = 10, COEF_W = 10;
  localparam int G_FRAC = 7, MU_SHIFT = 1, NORM_Q = 16, EPS = 16;

  logic clk = 0, rst_n = 0, clr = 0, adapt_en = 1, x_valid = 0;
  logic signed [X_W-1:0] x = '0;
  logic signed [Y_W-1:0] y = '0;
  logic out_valid;
  logic signed [Y_W-1:0] z;
  logic signed [Y_W:0]   e;
  logic signed [COEF_W-1:0] coef [TAPS];
  int checks = 0, failures = 0;

  nlms_filter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference state
  longint rg [TAPS];
  longint rx [TAPS];
  // unknown system (in units of 2^-G_FRAC)
  int h [TAPS] = '{10, 40, 90, 60, 20, -15, -8, 4, 2};
  int hx [TAPS];

  function automatic longint sat(longint v, int w);
    longint mx = (64'sd1 <<< (w - 1)) - 1;
    longint mn = -(64'sd1 <<< (w - 1));
    return v > mx ? mx : (v < mn ? mn : v);
  endfunction

  // one reference step; returns z and e
  task automatic ref_step(input longint xn, input longint yn, input bit adapt,
                          output longint zr, output longint er);
    longint acc, pwr, num, den, step, d;
    for (int i = TAPS - 1; i > 0; i--) rx[i] = rx[i-1];
    rx[0] = xn;
    acc = 0; pwr = 0;
    for (int i = 0; i < TAPS; i++) begin
      acc += rg[i] * rx[i];
      pwr += rx[i] * rx[i];
    end
    zr = sat((acc + (1 <<< (G_FRAC - 1))) >>> G_FRAC, Y_W);
    er = yn - zr;
    num = er * (64'sd1 <<< (G_FRAC + NORM_Q - MU_SHIFT));
    den = pwr + EPS;
    step = num / den;
    if (adapt)
      for (int i = 0; i < TAPS; i++) begin
        d = (step * rx[i] + (64'sd1 <<< (NORM_Q - 1))) >>> NORM_Q;
        rg[i] = sat(rg[i] + d, COEF_W);
      end
  endtask

  task automatic apply(input int xn, input int yn, input bit adapt);
    longint zr, er;
    @(negedge clk);
    x_valid = 1; x = X_W'(xn); y = Y_W'(yn); adapt_en = adapt;
    @(negedge clk);
    x_valid = 0;
    ref_step(xn, yn, adapt, zr, er);
    checks++;
    if (!out_valid || z != Y_W'(zr) || e != (Y_W+1)'(er)) begin
      failures++;
      if (failures < 10) $display("FAIL z=%0d/%0d e=%0d/%0d v=%0b", z, zr, e, er, out_valid);
    end
    for (int i = 0; i < TAPS; i++) begin
      checks++;
      if (coef[i] != COEF_W'(rg[i])) begin
        failures++;
        if (failures < 10) $display("FAIL coef[%0d]=%0d/%0d", i, coef[i], rg[i]);
      end
    end
    repeat ($urandom_range(0, 2)) @(negedge clk);
  endtask

  int abs_e_sum;
  initial begin
    int xn, yn;
    longint s;
    for (int i = 0; i < TAPS; i++) begin rg[i] = 0; rx[i] = 0; hx[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // phase 1: system identification with random input
    abs_e_sum = 0;
    for (int n = 0; n < 3000; n++) begin
      xn = $urandom_range(0, 400) - 200;
      for (int i = TAPS - 1; i > 0; i--) hx[i] = hx[i-1];
      hx[0] = xn;
      s = 0;
      for (int i = 0; i < TAPS; i++) s += longint'(h[i]) * hx[i];
      yn = int'(sat((s + 64) >>> G_FRAC, Y_W));
      apply(xn, yn, 1);
      if (n >= 2800) abs_e_sum += (e < 0) ? -int'(e) : int'(e);
    end
    checks++;
    if (abs_e_sum > 200 * 3) begin
      failures++;
      $display("FAIL mean |e| too large: %0d/200", abs_e_sum);
    end
    for (int i = 0; i < TAPS; i++) begin
      checks++;
      if (coef[i] > h[i] + 3 || coef[i] < h[i] - 3) begin
        failures++;
        $display("FAIL coef[%0d]=%0d, system tap %0d", i, coef[i], h[i]);
      end
    end
    // phase 2: frozen adaptation with a wrong target
    for (int n = 0; n < 50; n++) apply($urandom_range(0, 400) - 200, $urandom_range(0, 1000) - 500, 0);
    // phase 3: extreme values (saturation of z and of the coefficients)
    for (int n = 0; n < 300; n++) apply((n % 2) ? 255 : -256, (n % 3) ? 511 : -512, 1);
    for (int n = 0; n < 50; n++) apply(0, $urandom_range(0, 1000) - 500, 1);
    // phase 4: clear
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
    for (int i = 0; i < TAPS; i++) begin rg[i] = 0; rx[i] = 0; end
    for (int i = 0; i < TAPS; i++) begin
      checks++;
      if (coef[i] != 0) begin failures++; $display("FAIL clr coef[%0d]=%0d", i, coef[i]); end
    end
    for (int n = 0; n < 100; n++) apply($urandom_range(0, 400) - 200, $urandom_range(0, 400) - 200, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
