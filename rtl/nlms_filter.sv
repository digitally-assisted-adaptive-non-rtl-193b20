// nlms_filter: FIR adaptive filter trained by the normalized LMS algorithm.
//
// The filter predicts the decimated CSF output y(n) from the decimated
// auxiliary ADC samples x(n). Being linear, it reproduces the linear part of
// y(n) well and its intermodulation part poorly, so the prediction error
// e(n) = y(n) - z(n) carries mostly the in-band intermodulation that the
// correlator looks for.
//
// Per input sample, with X(n) = [x(n), x(n-1), ..., x(n-TAPS+1)]:
//   z(n)   = g(n) . X(n)                      (rounded, saturated to Y_W bits)
//   e(n)   = y(n) - z(n)
//   g(n+1) = g(n) + mu * e(n) * X(n) / (EPS + X(n) . X(n))
// with mu = 2^-MU_SHIFT. Coefficients are COEF_W-bit two's complement with
// G_FRAC fraction bits and saturate. The normalization is one exact divide
// per sample, mu*e*2^(G_FRAC+NORM_Q)/(EPS+X.X); each tap's increment is that
// quotient times its x sample, rounded after dropping the NORM_Q guard bits.
// The whole update is done in one clock cycle: at 30.72 MS/s and a 245.76 MHz
// clock it has eight cycles available, so a physical implementation would
// register it as a multicycle path or share one multiplier.
//
// Interface: x_valid marks a baseband sample pair (x, y). One cycle later
// out_valid pulses with z and e of that sample; coefficients are updated at
// the same edge when adapt_en is high. clr zeroes the coefficients and the
// delay line. Synchronous active-low reset does the same.
//
// From the published scheme: FIR normalized LMS, 9 taps, 10-bit coefficients,
// 10-bit output. Own choices: e = y - z (so that the update adds c(n)), the
// fraction bits, the step size, the EPS regularization that keeps the divide
// defined for an all-zero input, and rounding.
module nlms_filter #(
  parameter int unsigned TAPS     = nls_pkg::LMS_TAPS,
  parameter int unsigned X_W      = nls_pkg::AUX_ADC_W + $clog2(nls_pkg::OSR),
  parameter int unsigned Y_W      = nls_pkg::LMS_OUT_W,
  parameter int unsigned COEF_W   = nls_pkg::LMS_COEF_W,
  parameter int unsigned G_FRAC   = 7,
  parameter int unsigned MU_SHIFT = 1,
  parameter int unsigned NORM_Q   = 16,
  parameter int unsigned EPS      = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clr,
  input  logic                     adapt_en,
  input  logic                     x_valid,
  input  logic signed [X_W-1:0]    x,
  input  logic signed [Y_W-1:0]    y,
  output logic                     out_valid,
  output logic signed [Y_W-1:0]    z,
  output logic signed [Y_W:0]      e,
  output logic signed [COEF_W-1:0] coef [TAPS]
);

  localparam int unsigned E_W    = Y_W + 1;
  localparam int unsigned ACC_W  = COEF_W + X_W + $clog2(TAPS) + 1;
  localparam int unsigned P_W    = 2 * X_W + $clog2(TAPS) + 1;       // signed, >= 0
  localparam int unsigned NUM_W  = E_W + G_FRAC + NORM_Q;
  localparam int unsigned DIV_W  = (NUM_W > P_W + 1) ? NUM_W : P_W + 1;
  localparam int unsigned PROD_W = DIV_W + X_W;
  localparam int unsigned UPD_W  = PROD_W + 1;

  localparam logic signed [ACC_W-1:0] Z_MAX = ACC_W'((1 << (Y_W - 1)) - 1);
  localparam logic signed [ACC_W-1:0] Z_MIN = -ACC_W'(1 << (Y_W - 1));
  localparam logic signed [UPD_W-1:0] G_MAX = UPD_W'((1 << (COEF_W - 1)) - 1);
  localparam logic signed [UPD_W-1:0] G_MIN = -UPD_W'(1 << (COEF_W - 1));

  logic signed [X_W-1:0]    dly   [TAPS];   // dly[0] is x(n-1)
  logic signed [X_W-1:0]    xv    [TAPS];   // X(n)
  logic signed [COEF_W-1:0] g     [TAPS];
  logic signed [COEF_W-1:0] g_nxt [TAPS];

  logic signed [ACC_W-1:0]  acc, z_rnd;
  logic signed [Y_W-1:0]    z_c;
  logic signed [E_W-1:0]    e_c;
  logic signed [P_W-1:0]    pwr;
  logic signed [DIV_W-1:0]  num, den, step;
  logic signed [PROD_W-1:0] prod;
  logic signed [UPD_W-1:0]  upd;

  always_comb begin
    xv[0] = x;
    for (int i = 1; i < TAPS; i++) xv[i] = dly[i-1];

    acc = '0;
    pwr = '0;
    for (int i = 0; i < TAPS; i++) begin
      acc = acc + ACC_W'(g[i]) * ACC_W'(xv[i]);
      pwr = pwr + P_W'(xv[i]) * P_W'(xv[i]);
    end
    z_rnd = (G_FRAC > 0) ? (acc + ACC_W'(1 << (G_FRAC - 1))) >>> G_FRAC : acc;
    if (z_rnd > Z_MAX)      z_c = Z_MAX[Y_W-1:0];
    else if (z_rnd < Z_MIN) z_c = Z_MIN[Y_W-1:0];
    else                    z_c = z_rnd[Y_W-1:0];
    e_c = E_W'(y) - E_W'(z_c);

    num  = DIV_W'(e_c) <<< (G_FRAC + NORM_Q - MU_SHIFT);
    den  = DIV_W'(pwr) + DIV_W'(EPS);
    step = num / den;

    for (int i = 0; i < TAPS; i++) begin
      prod = PROD_W'(step) * PROD_W'(xv[i]);
      upd  = UPD_W'(g[i]) + ((UPD_W'(prod) + UPD_W'(1 << (NORM_Q - 1))) >>> NORM_Q);
      if (upd > G_MAX)      g_nxt[i] = G_MAX[COEF_W-1:0];
      else if (upd < G_MIN) g_nxt[i] = G_MIN[COEF_W-1:0];
      else                  g_nxt[i] = upd[COEF_W-1:0];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      for (int i = 0; i < TAPS; i++) begin
        dly[i] <= '0;
        g[i]   <= '0;
      end
      out_valid <= 1'b0;
      z         <= '0;
      e         <= '0;
    end else begin
      out_valid <= x_valid;
      if (x_valid) begin
        dly[0] <= x;
        for (int i = 1; i < TAPS; i++) dly[i] <= dly[i-1];
        z <= z_c;
        e <= e_c;
        if (adapt_en)
          for (int i = 0; i < TAPS; i++) g[i] <= g_nxt[i];
      end
    end
  end

  assign coef = g;

endmodule
