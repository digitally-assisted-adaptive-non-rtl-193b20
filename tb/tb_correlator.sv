// tb_correlator: checks the per-symbol correlator.
//
// Instance A has the default timing (2048-sample symbols, 48-sample margin,
// 2000 correlated samples, 16-bit multipliers) and 11-bit e, 9-bit k inputs.
// Random e and k are fed with random gaps; for each symbol the expected sum
// of e*k over samples 48..2047 is computed here and compared, and the result
// must appear exactly one cycle after the symbol's last sample. A restart in
// the middle of a symbol must discard it.
// Instance B is small (8-bit multipliers, 16-sample symbols) and is fed
// inputs wider than its multipliers to check operand saturation.
module tb_correlator;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- instance A ----------------
  logic a_restart = 0, a_valid = 0;
  logic signed [10:0] a_e = '0;
  logic signed [8:0]  a_k = '0;
  logic a_cv;
  logic signed [42:0] a_corr;
  correlator dut_a (.clk, .rst_n, .restart(a_restart), .in_valid(a_valid),
                    .e(a_e), .k(a_k), .corr_valid(a_cv), .corr(a_corr));

  // ---------------- instance B ----------------
  logic b_restart = 0, b_valid = 0;
  logic signed [11:0] b_e = '0;
  logic signed [3:0]  b_k = '0;
  logic b_cv;
  logic signed [19:0] b_corr;
  correlator #(.E_W(12), .K_W(4), .MUL_W(8), .SYM_LEN(16), .LEN(10), .MARGIN(4), .ACC_W(20))
    dut_b (.clk, .rst_n, .restart(b_restart), .in_valid(b_valid),
           .e(b_e), .k(b_k), .corr_valid(b_cv), .corr(b_corr));

  // reference for A, evaluated at the same edges as the DUT
  longint a_sum = 0; int a_idx = 0; bit a_exp = 0; longint a_expv = 0; int a_syms = 0;
  longint b_sum = 0; int b_idx = 0; bit b_exp = 0; longint b_expv = 0; int b_syms = 0;

  function automatic longint satv(longint v, int w);
    longint mx = (64'sd1 <<< (w - 1)) - 1;
    longint mn = -(64'sd1 <<< (w - 1));
    return v > mx ? mx : (v < mn ? mn : v);
  endfunction

  always @(posedge clk) if (rst_n) begin
    checks++;
    if (a_cv !== a_exp || (a_exp && a_corr != 43'(a_expv))) begin
      failures++;
      $display("FAIL A t=%0t cv=%0b/%0b corr=%0d/%0d", $time, a_cv, a_exp, a_corr, a_expv);
    end
    checks++;
    if (b_cv !== b_exp || (b_exp && b_corr != 20'(b_expv))) begin
      failures++;
      $display("FAIL B t=%0t cv=%0b/%0b corr=%0d/%0d", $time, b_cv, b_exp, b_corr, b_expv);
    end
    if (a_cv) a_syms++;
    if (b_cv) b_syms++;
    a_exp = 0; b_exp = 0;
    if (a_restart) begin a_sum = 0; a_idx = 0; end
    else if (a_valid) begin
      if (a_idx >= 48) a_sum += longint'(a_e) * longint'(a_k);
      if (a_idx == 2047) begin a_exp = 1; a_expv = a_sum; a_sum = 0; a_idx = 0; end
      else a_idx++;
    end
    if (b_restart) begin b_sum = 0; b_idx = 0; end
    else if (b_valid) begin
      if (b_idx >= 4 && b_idx < 14) b_sum += satv(b_e, 8) * longint'(b_k);
      if (b_idx == 15) begin b_exp = 1; b_expv = b_sum; b_sum = 0; b_idx = 0; end
      else b_idx++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2048 * 5; i++) begin
      @(negedge clk);
      a_valid   = ($urandom_range(0, 7) != 0);
      a_e       = 11'($urandom);
      a_k       = 9'($urandom);
      a_restart = (i == 5000);
      b_valid   = ($urandom_range(0, 3) != 0);
      b_e       = 12'($urandom_range(0, 600) - 300);
      b_k       = 4'($urandom);
      b_restart = (i == 777);
    end
    @(negedge clk); a_valid = 0; b_valid = 0; a_restart = 0; b_restart = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (a_syms < 3 || b_syms < 100) begin
      failures++;
      $display("FAIL too few symbols: %0d %0d", a_syms, b_syms);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
