// cube_unit: digital cubing unit of the auxiliary path.
//
// Raises each signed auxiliary ADC sample to the third power, which
// regenerates the third-order intermodulation products of everything the
// auxiliary ADC sees (wanted signal, transmitter leakage, blockers). The
// exact cube (3*IN_W-2 bits) is rounded to its OUT_W most significant bits,
// the 6-bit precision of the cubing unit, and saturated.
//
// Interface: in_valid/in_data are sampled on the rising clock edge;
// out_valid/out_data follow one cycle later (latency 1, one sample per
// cycle). Synchronous active-low reset clears out_valid and out_data.
//
// From the published scheme: cubing of the auxiliary ADC samples and
// the 6-bit width. Own choice: reading the 6 bits as the output precision,
// round-half-up rounding, and the one-cycle register.
module cube_unit #(
  parameter int unsigned IN_W  = nls_pkg::AUX_ADC_W,
  parameter int unsigned OUT_W = nls_pkg::CUBE_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_data,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data
);

  localparam int unsigned FULL_W = 3 * IN_W;      // one guard bit over 3*IN_W-2
  localparam int unsigned SHIFT  = 3 * IN_W - 2 - OUT_W;

  logic signed [FULL_W-1:0] cube_full;
  logic signed [FULL_W-1:0] cube_rnd;
  logic signed [OUT_W-1:0]  cube_out;

  localparam logic signed [FULL_W-1:0] MAX_OUT = FULL_W'((1 << (OUT_W - 1)) - 1);
  localparam logic signed [FULL_W-1:0] MIN_OUT = -FULL_W'(1 << (OUT_W - 1));

  always_comb begin
    cube_full = FULL_W'(in_data) * FULL_W'(in_data) * FULL_W'(in_data);
    if (SHIFT > 0) cube_rnd = (cube_full + FULL_W'(1 << (SHIFT - 1))) >>> SHIFT;
    else           cube_rnd = cube_full;
    if (cube_rnd > MAX_OUT)      cube_out = MAX_OUT[OUT_W-1:0];
    else if (cube_rnd < MIN_OUT) cube_out = MIN_OUT[OUT_W-1:0];
    else                         cube_out = cube_rnd[OUT_W-1:0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_data <= cube_out;
    end
  end

endmodule
