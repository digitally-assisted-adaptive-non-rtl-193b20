// tb_decimator: checks the integrate-and-dump decimator.
//
// Feeds random 6-bit samples with random gaps in in_valid to a decimate-by-8
// instance and checks every output against the sum of the last eight accepted
// samples kept here in a queue: one output per eight inputs, out_valid one
// cycle after the eighth input, full-precision sum. A sync_clr in the middle
// of a group must discard the partial sum and restart the phase count.
module tb_decimator;
  localparam int IN_W = 6, RATIO = 8, OUT_W = IN_W + 3;
  logic clk = 0, rst_n = 0, sync_clr = 0, in_valid = 0;
  logic signed [IN_W-1:0]  in_data = '0;
  logic out_valid;
  logic signed [OUT_W-1:0] out_data;
  int checks = 0, failures = 0;

  decimator #(.IN_W(IN_W), .RATIO(RATIO)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int sum = 0, cnt = 0, outs = 0, expected_outs = 0;
  logic expect_out = 0;
  int expect_val = 0;

  // Reference: sample on the same edge the DUT does.
  always @(posedge clk) begin
    if (rst_n) begin
      // compare outputs of the previous edge
      checks++;
      if (out_valid !== expect_out || (expect_out && out_data != OUT_W'(expect_val))) begin
        failures++;
        $display("FAIL t=%0t valid=%0b/%0b data=%0d/%0d", $time, out_valid, expect_out, out_data, expect_val);
      end
      if (out_valid) outs++;
      expect_out = 0;
      if (sync_clr) begin
        sum = 0; cnt = 0;
      end else if (in_valid) begin
        sum += int'(in_data);
        cnt++;
        if (cnt == RATIO) begin
          expect_out = 1; expect_val = sum; expected_outs++;
          sum = 0; cnt = 0;
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      in_data  = IN_W'($urandom);
      sync_clr = (i == 2003 || i == 3501);
      if (i % 97 == 0) in_data = (i % 2) ? IN_W'(-(1 << (IN_W - 1))) : IN_W'((1 << (IN_W - 1)) - 1);
    end
    @(negedge clk); in_valid = 0; sync_clr = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (outs != expected_outs || outs < 400) begin
      failures++;
      $display("FAIL output count %0d expected %0d", outs, expected_outs);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
