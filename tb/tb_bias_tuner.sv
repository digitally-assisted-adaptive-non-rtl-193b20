// tb_bias_tuner: checks the bias search and the power-down.
//
// A model of the CSF seen through the correlator answers each symbol with
// corr = KC * (bias - OPT), whose magnitude is V-shaped with its minimum at
// the optimal bias code OPT. For several OPT values the tuner must end within
// one code of OPT, raise done, drop aux_en, and have reversed direction at
// least once. Also checked: the restart pulse after start, that the bias only
// moves one cycle after corr_valid, that nothing moves while powered down,
// clamping at the end of the code range, and that a correlation that keeps
// falling ends the search after MAX_ITER symbols.
module tb_bias_tuner;
  localparam int C_W = 43, BIAS_W = 8;
  logic clk = 0, rst_n = 0, start = 0, corr_valid = 0;
  logic signed [C_W-1:0] corr = '0;
  logic [BIAS_W-1:0] bias;
  logic aux_en, restart, done, reversal;
  int checks = 0, failures = 0;

  bias_tuner dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int reversals = 0;
  always @(posedge clk) if (reversal) reversals++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (bias=%0d)", what, bias); end
  endtask

  // one calibration against a V-shaped correlation; returns symbols used
  task automatic calibrate(input int opt, input int kc, input bit falling, output int syms);
    logic [BIAS_W-1:0] b_before;
    int r0;
    r0 = reversals;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    check(restart == 1, "restart pulse after start");
    check(aux_en == 1, "aux_en after start");
    syms = 0;
    while (!done && syms < 200) begin
      repeat ($urandom_range(3, 10)) begin
        @(negedge clk);
        check(aux_en == 1, "aux_en during search");
      end
      b_before = bias;
      if (falling) corr = C_W'(1000000 - syms * 100);
      else         corr = C_W'(longint'(kc) * (int'(bias) - opt) + $urandom_range(0, 2));
      corr_valid = 1;
      @(negedge clk);
      corr_valid = 0;
      syms++;
      b_before = bias;
      repeat (3) begin
        @(negedge clk);
        check(bias == b_before, "bias moves only after corr_valid");
      end
    end
    check(done == 1, "search ends");
    check(aux_en == 0, "aux path powered down when done");
    if (!falling) check(reversals > r0, "direction reversed at least once");
    // nothing moves after done
    b_before = bias;
    corr_valid = 1; corr = 12345; @(negedge clk); corr_valid = 0; @(negedge clk);
    check(bias == b_before, "bias frozen after done");
  endtask

  initial begin
    int syms;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(bias == 128 && aux_en == 0 && done == 0, "reset state");
    foreach (opt_list[i]) begin
      calibrate(opt_list[i], 1000, 0, syms);
      check(int'(bias) >= opt_list[i] - 1 && int'(bias) <= opt_list[i] + 1, "bias at optimum");
      $display("opt=%0d bias=%0d symbols=%0d", opt_list[i], bias, syms);
    end
    // optimum beyond the code range: must clamp at the top
    calibrate(300, 1000, 0, syms);
    check(bias >= 8'd254, "clamped at top of range");
    $display("opt=300 bias=%0d symbols=%0d", bias, syms);
    // a correlation that always falls: bounded by MAX_ITER
    calibrate(0, 0, 1, syms);
    check(syms == 64, "MAX_ITER bounds the search");
    $display("falling: symbols=%0d", syms);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int opt_list [] = '{77, 128, 140, 3, 250};
endmodule
