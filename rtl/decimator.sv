// decimator: integrate-and-dump decimator by RATIO.
//
// Used three times: for the main path (down by N) and for the linear and
// cubed auxiliary paths (down by M), bringing 245.76 MS/s converter samples
// to the 30.72 MS/s baseband rate. It sums RATIO consecutive input samples
// and outputs the sum once per RATIO inputs: a boxcar low-pass filter
// followed by downsampling. The sum keeps full precision
// (IN_W + clog2(RATIO) bits), so no information is dropped here.
//
// Interface: in_valid marks an input sample. After every RATIO-th accepted
// sample, out_valid pulses for one cycle with the sum of those RATIO samples
// (latency one cycle after the last of them). sync_clr restarts the phase
// counter and accumulator, so that several decimators fed by the same
// strobe stay aligned. Synchronous active-low reset.
//
// From the published scheme: a decimation by M (auxiliary paths) and N (main
// path) to the baseband rate, with an oversampling ratio of 8. Own choice:
// the boxcar (first-order CIC) filter; the scheme only names the decimation
// filters, not their response.
module decimator #(
  parameter int unsigned IN_W  = nls_pkg::AUX_ADC_W,
  parameter int unsigned RATIO = nls_pkg::OSR,
  parameter int unsigned OUT_W = IN_W + $clog2(RATIO)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    sync_clr,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_data,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data
);

  localparam int unsigned CNT_W = (RATIO > 1) ? $clog2(RATIO) : 1;

  logic [CNT_W-1:0]        phase;
  logic signed [OUT_W-1:0] acc;
  logic signed [OUT_W-1:0] acc_next;
  logic                    last;

  always_comb begin
    acc_next = acc + OUT_W'(in_data);
    last     = (phase == CNT_W'(RATIO - 1));
  end

  always_ff @(posedge clk) begin
    if (!rst_n || sync_clr) begin
      phase     <= '0;
      acc       <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        if (last) begin
          phase     <= '0;
          acc       <= '0;
          out_valid <= 1'b1;
          out_data  <= acc_next;
        end else begin
          phase <= phase + 1'b1;
          acc   <= acc_next;
        end
      end
    end
  end

endmodule
