// nls_top: digitally assisted non-linearity suppression for a receiver's
// channel-select filter (CSF).
//
// The analog CSF has a bias input that sets how much third-order
// intermodulation (IM3) it produces; at one bias point its non-linearities
// cancel. This block finds that point while the receiver runs. A 6-bit
// auxiliary ADC samples the CSF input; the auxiliary path cubes those samples
// to regenerate IM3 (k), decimates both the linear and the cubed samples to
// baseband, and trains a 9-tap NLMS filter to predict the CSF output y from
// the linear samples. What the linear filter cannot predict, e, is mostly the
// CSF's IM3, so the correlation of e with k over one OFDM symbol measures it.
// The bias tuner moves the bias once per symbol toward minimum correlation
// and powers the auxiliary path down when it has found the optimum.
//
//   main_adc --[reg]--> decimator /N ---------------------------> y (baseband)
//                                      | y >>> Y_SHIFT
//   aux_adc --[reg]--> decimator /M --x--> nlms_filter --e--> correlator --> bias_tuner --> bias
//           --cube_unit--> decimator /M --k-------[reg]-----^
//
// Clocking: one clock at the converter rate (245.76 MHz); adc_valid marks a
// sample pair from the two ADCs (high every cycle in normal use). Everything
// downstream of the decimators runs at one sample per OSR strobes, i.e. the
// 30.72 MS/s baseband rate. Synchronous active-low reset.
//
// Alignment: the auxiliary decimators are held cleared while the path is
// powered down and released on a main-decimator output, so the auxiliary
// baseband samples always cover the same converter samples as y. The main
// path never stops. The correlator's symbol count starts at the same moment.
//
// Interface: calib_start (one-cycle pulse) starts a calibration. aux_pd is
// high while the auxiliary ADC and path may be powered down. bias is the CSF
// bias DAC code. calib_done is high once a calibration has ended. corr_valid
// and corr report each symbol's correlation.
//
// z, the NLMS coefficients and the tuner's reversal pulse are left unconnected
// inside the top on purpose: they are internal observation points for
// simulation (lint reports them as unused).
//
// From the published scheme: the structure of the auxiliary path (cube, two
// decimators, FIR NLMS, error, correlator, bias feedback, power-down), the
// widths of its configuration and the LTE timing. Own choices: main ADC
// width, bias code width, which bits of y feed the NLMS filter (the top
// LMS_OUT_W bits) and the alignment scheme.
module nls_top #(
  parameter int unsigned MAIN_W   = nls_pkg::MAIN_ADC_W,
  parameter int unsigned AUX_W    = nls_pkg::AUX_ADC_W,
  parameter int unsigned OSR      = nls_pkg::OSR,
  parameter int unsigned TAPS     = nls_pkg::LMS_TAPS,
  parameter int unsigned SYM_LEN  = nls_pkg::SYM_LEN,
  parameter int unsigned CORR_LEN = nls_pkg::CORR_LEN,
  parameter int unsigned MARGIN   = nls_pkg::LMS_MARGIN,
  parameter int unsigned BIAS_W   = nls_pkg::BIAS_W,
  // derived widths
  parameter int unsigned Y_W      = MAIN_W + $clog2(OSR),
  parameter int unsigned C_W      = 2 * nls_pkg::CORR_MUL_W + $clog2(CORR_LEN)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    adc_valid,
  input  logic signed [MAIN_W-1:0] main_adc,
  input  logic signed [AUX_W-1:0]  aux_adc,
  input  logic                    calib_start,
  output logic                    y_valid,
  output logic signed [Y_W-1:0]   y,
  output logic [BIAS_W-1:0]       bias,
  output logic                    aux_pd,
  output logic                    calib_done,
  output logic                    corr_valid,
  output logic signed [C_W-1:0]   corr
);

  localparam int unsigned LO_W    = nls_pkg::LMS_OUT_W;
  localparam int unsigned X_W     = AUX_W + $clog2(OSR);
  localparam int unsigned K_W     = nls_pkg::CUBE_W + $clog2(OSR);
  localparam int unsigned Y_SHIFT = Y_W - LO_W;

  // ---- input registers ------------------------------------------------------
  logic                     smp_v, aux_v;
  logic signed [MAIN_W-1:0] main_q;
  logic signed [AUX_W-1:0]  aux_q;
  logic                     aux_en, aux_run, aux_clr, tune_restart;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      smp_v  <= 1'b0;
      aux_v  <= 1'b0;
      main_q <= '0;
      aux_q  <= '0;
    end else begin
      smp_v <= adc_valid;
      aux_v <= adc_valid && aux_en;
      if (adc_valid) main_q <= main_adc;
      if (adc_valid && aux_en) aux_q <= aux_adc;
    end
  end

  // ---- main path decimator ----------------------------------------------------
  decimator #(.IN_W(MAIN_W), .RATIO(OSR)) u_dec_main (
    .clk, .rst_n, .sync_clr(1'b0),
    .in_valid(smp_v), .in_data(main_q),
    .out_valid(y_valid), .out_data(y)
  );

  // ---- auxiliary path alignment and power control ---------------------------
  always_ff @(posedge clk) begin
    if (!rst_n || tune_restart || !aux_en) aux_run <= 1'b0;
    else if (y_valid)                      aux_run <= 1'b1;
  end
  assign aux_clr = tune_restart || !aux_en || !(aux_run || y_valid);
  assign aux_pd  = !aux_en;

  // ---- cubing and auxiliary decimators ----------------------------------------
  logic                       cube_v;
  logic signed [nls_pkg::CUBE_W-1:0] cube_d;
  logic                       x_v, k_v;
  logic signed [X_W-1:0]      x_d;
  logic signed [K_W-1:0]      k_d, k_q;

  cube_unit #(.IN_W(AUX_W), .OUT_W(nls_pkg::CUBE_W)) u_cube (
    .clk, .rst_n,
    .in_valid(adc_valid && aux_en), .in_data(aux_adc),
    .out_valid(cube_v), .out_data(cube_d)
  );

  decimator #(.IN_W(AUX_W), .RATIO(OSR)) u_dec_lin (
    .clk, .rst_n, .sync_clr(aux_clr),
    .in_valid(aux_v), .in_data(aux_q),
    .out_valid(x_v), .out_data(x_d)
  );

  decimator #(.IN_W(nls_pkg::CUBE_W), .RATIO(OSR)) u_dec_cube (
    .clk, .rst_n, .sync_clr(aux_clr),
    .in_valid(cube_v), .in_data(cube_d),
    .out_valid(k_v), .out_data(k_d)
  );

  // k is delayed one baseband sample stage to meet e from the NLMS filter.
  always_ff @(posedge clk) begin
    if (!rst_n || aux_clr) k_q <= '0;
    else if (k_v)          k_q <= k_d;
  end

  // ---- NLMS filter --------------------------------------------------------------
  logic                     e_v;
  logic signed [LO_W-1:0]   y_lms, z_lms;
  logic signed [LO_W:0]     e_lms;
  logic signed [nls_pkg::LMS_COEF_W-1:0] coef [TAPS];

  assign y_lms = LO_W'(y >>> Y_SHIFT);

  nlms_filter #(.TAPS(TAPS), .X_W(X_W), .Y_W(LO_W)) u_nlms (
    .clk, .rst_n, .clr(aux_clr), .adapt_en(1'b1),
    .x_valid(x_v), .x(x_d), .y(y_lms),
    .out_valid(e_v), .z(z_lms), .e(e_lms), .coef(coef)
  );

  // ---- correlator and bias tuner ----------------------------------------------
  correlator #(.E_W(LO_W + 1), .K_W(K_W), .SYM_LEN(SYM_LEN), .LEN(CORR_LEN),
               .MARGIN(MARGIN), .ACC_W(C_W)) u_corr (
    .clk, .rst_n, .restart(aux_clr),
    .in_valid(e_v), .e(e_lms), .k(k_q),
    .corr_valid(corr_valid), .corr(corr)
  );

  logic reversal;

  bias_tuner #(.C_W(C_W), .BIAS_W(BIAS_W)) u_tuner (
    .clk, .rst_n, .start(calib_start),
    .corr_valid(corr_valid), .corr(corr),
    .bias(bias), .aux_en(aux_en), .restart(tune_restart),
    .done(calib_done), .reversal(reversal)
  );

endmodule
