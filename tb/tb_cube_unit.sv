// tb_cube_unit: exhaustive check of the cubing unit.
//
// Drives every 6-bit input value, with random gaps in in_valid, and compares
// the registered output one cycle later with the cube computed here in
// 64-bit integers, rounded half-up to the six most significant bits of the
// 16-bit cube and saturated. Also checks that out_valid follows in_valid
// with a latency of exactly one cycle and that the output holds while no
// sample arrives.
module tb_cube_unit;
  localparam int IN_W = 6, OUT_W = 6;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic signed [IN_W-1:0]  in_data = '0;
  logic out_valid;
  logic signed [OUT_W-1:0] out_data;
  int checks = 0, failures = 0;

  cube_unit #(.IN_W(IN_W), .OUT_W(OUT_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expect_cube(int v);
    longint c, r;
    int sh;
    sh = 3 * IN_W - 2 - OUT_W;
    c = longint'(v) * v * v;
    r = (c + (64'sd1 <<< (sh - 1))) >>> sh;
    if (r > (1 <<< (OUT_W - 1)) - 1) r = (1 <<< (OUT_W - 1)) - 1;
    if (r < -(1 <<< (OUT_W - 1)))    r = -(1 <<< (OUT_W - 1));
    return int'(r);
  endfunction

  initial begin
    int held;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int v = -(1 << (IN_W - 1)); v < (1 << (IN_W - 1)); v++) begin
      in_valid <= 1;
      in_data  <= IN_W'(v);
      @(posedge clk);
      in_valid <= 0;
      in_data  <= IN_W'($urandom);
      #1;
      checks++;
      if (!out_valid || out_data != OUT_W'(expect_cube(v))) begin
        failures++;
        $display("FAIL x=%0d got v=%0b %0d expected %0d", v, out_valid, out_data, expect_cube(v));
      end
      held = out_data;
      repeat ($urandom_range(0, 2)) begin
        @(posedge clk); #1;
        checks++;
        if (out_valid || out_data != OUT_W'(held)) begin
          failures++;
          $display("FAIL output not held after x=%0d", v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
