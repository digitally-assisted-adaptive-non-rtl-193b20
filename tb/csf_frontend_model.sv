// csf_frontend_model: behavioural model of the analog front end around the
// calibration loop (not synthesizable; testbench use only).
//
// At every clock (the 245.76 MS/s converter rate) it produces the CSF input
//   x = 0.05 cos(2.91 MHz) + 0.05 cos(7.5 MHz)            two in-band tones
//     + 0.40 cos(20.01 MHz) + 0.40 cos(38.01 MHz)         two CW blockers
//     + uniform noise of +-0.01,
// whose third-order product 2*20.01 - 38.01 = 2.01 MHz falls in band, and
// the CSF output y = L4(x) + a * L2(x^3), where L4 is four real poles at
// LIN_FC (the linear filter), L2 two real poles at 10 MHz (the path of the
// third-order term) and a = KNL * (bias - opt) / 128, so the filter is
// linear at bias code `opt`. The main ADC (MAIN_W bits) samples y and the
// auxiliary ADC (AUX_W bits) samples x, both with full scale 1.0, rounding
// and saturation. Outputs change on the falling clock edge.
module csf_frontend_model #(
  parameter int  MAIN_W = 12,
  parameter int  AUX_W  = 6,
  parameter real LIN_FC = 6.0e6,
  parameter real KNL    = 1.5
) (
  input  logic                     clk,
  input  logic                     run,
  input  int                       opt,
  input  logic [7:0]               bias,
  output logic                     adc_valid,
  output logic signed [MAIN_W-1:0] main_adc,
  output logic signed [AUX_W-1:0]  aux_adc
);
  localparam real FS = 245.76e6;
  localparam real PI = 3.14159265358979;

  longint n = 0;
  real l4 [4] = '{0.0, 0.0, 0.0, 0.0};
  real l2 [2] = '{0.0, 0.0};

  function automatic int quant(real v, int bits);
    int full = (1 << (bits - 1)) - 1;
    int q = $rtoi(v * full + ((v >= 0) ? 0.5 : -0.5));
    if (q > full) q = full;
    if (q < -full - 1) q = -full - 1;
    return q;
  endfunction

  initial begin
    adc_valid = 0;
    main_adc  = '0;
    aux_adc   = '0;
  end

  always @(negedge clk) begin
    real t, x, xc, a, yv, p4, p2;
    if (run) begin
      t  = real'(n) / FS;
      x  = 0.05 * $cos(2.0 * PI * 2.91e6 * t) + 0.05 * $cos(2.0 * PI * 7.5e6 * t + 1.0)
         + 0.40 * $cos(2.0 * PI * 20.01e6 * t + 0.3) + 0.40 * $cos(2.0 * PI * 38.01e6 * t + 2.0)
         + 0.01 * ($itor($urandom_range(0, 2000)) / 1000.0 - 1.0);
      xc = x * x * x;
      p4 = $exp(-2.0 * PI * LIN_FC / FS);
      p2 = $exp(-2.0 * PI * 10.0e6 / FS);
      l4[0] = p4 * l4[0] + (1.0 - p4) * x;
      for (int i = 1; i < 4; i++) l4[i] = p4 * l4[i] + (1.0 - p4) * l4[i-1];
      l2[0] = p2 * l2[0] + (1.0 - p2) * xc;
      l2[1] = p2 * l2[1] + (1.0 - p2) * l2[0];
      a  = KNL * real'(int'(bias) - opt) / 128.0;
      yv = l4[3] + a * l2[1];
      main_adc  <= MAIN_W'(quant(yv, MAIN_W));
      aux_adc   <= AUX_W'(quant(x, AUX_W));
      adc_valid <= 1'b1;
      n++;
    end
  end
endmodule
