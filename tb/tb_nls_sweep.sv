// tb_nls_sweep: the calibration loop at other filter lengths and auxiliary
// ADC resolutions.
//
// Six copies of nls_top run side by side, each with its own front-end model
// (csf_frontend_model, two tones plus two blockers, optimum bias code 100):
// NLMS lengths 3, 15 and 21 taps with a 6-bit auxiliary ADC, and auxiliary
// ADC resolutions 4, 5 and 8 bits with 9 taps. (9 taps with 6 bits is the
// default configuration, run by tb_nls_top.) All copies start a calibration
// together. Every copy must finish and power its auxiliary path down. The
// copies with 15 or 21 taps, or with 5 or 8 bits, must end within TOL codes of
// the optimum. The 3-tap and 4-bit copies are configurations whose
// correlation is known to be less selective; for them only the final bias is
// reported. One result per 2048 * 8 cycles is checked for every copy.
module tb_nls_sweep;
  localparam int NCFG = 6;
  localparam int TAPS_C [NCFG] = '{3, 15, 21, 9, 9, 9};
  localparam int AUXW_C [NCFG] = '{6, 6, 6, 4, 5, 8};
  localparam bit STRICT [NCFG] = '{0, 1, 1, 0, 1, 1};
  localparam int TOL = 12;
  localparam int OPT = 100;

  logic clk = 0, rst_n = 0, calib_start = 0;
  int checks = 0, failures = 0;
  logic [NCFG-1:0] done, cv;
  logic [7:0] bias [NCFG];
  int nsym [NCFG];

  always #2 clk = ~clk;

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    localparam int AW = AUXW_C[c];
    logic adc_valid, y_valid, aux_pd;
    logic signed [11:0] main_adc;
    logic signed [AW-1:0] aux_adc;
    logic signed [14:0] y;
    logic signed [42:0] corr;
    longint last = -1, cyc = 0;

    csf_frontend_model #(.AUX_W(AW)) u_fe (
      .clk, .run(rst_n), .opt(OPT), .bias(bias[c]),
      .adc_valid, .main_adc, .aux_adc
    );

    nls_top #(.AUX_W(AW), .TAPS(TAPS_C[c])) u_dut (
      .clk, .rst_n, .adc_valid, .main_adc, .aux_adc, .calib_start,
      .y_valid, .y, .bias(bias[c]), .aux_pd, .calib_done(done[c]),
      .corr_valid(cv[c]), .corr
    );

    always @(posedge clk) begin
      cyc++;
      if (rst_n && cv[c]) begin
        nsym[c]++;
        checks++;
        if (last >= 0 && cyc - last != 2048 * 8) begin
          failures++;
          $display("FAIL config %0d: result spacing %0d", c, cyc - last);
        end
        last = cyc;
      end
    end
  end

  initial begin
    for (int c = 0; c < NCFG; c++) nsym[c] = 0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (50) @(posedge clk);
    @(negedge clk); calib_start = 1; @(negedge clk); calib_start = 0;
    wait (&done);
    for (int c = 0; c < NCFG; c++) begin
      $display("taps=%0d aux bits=%0d: final bias %0d after %0d symbols (optimum %0d)",
               TAPS_C[c], AUXW_C[c], bias[c], nsym[c], OPT);
      checks++;
      if (nsym[c] < 3 || nsym[c] > 64) begin
        failures++;
        $display("FAIL config %0d: %0d symbols", c, nsym[c]);
      end
      if (STRICT[c]) begin
        checks++;
        if (int'(bias[c]) < OPT - TOL || int'(bias[c]) > OPT + TOL) begin
          failures++;
          $display("FAIL config %0d: bias %0d not at the optimum", c, bias[c]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
