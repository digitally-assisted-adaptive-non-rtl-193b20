// correlator: measures in-band intermodulation once per OFDM symbol.
//
// Accumulates the product of the NLMS error e(n) and the decimated cubed
// auxiliary signal k(n). Because the linear NLMS filter removes the linear
// part of the CSF output, what remains in e(n) that is correlated with k(n)
// is the third-order intermodulation the CSF added; the magnitude of the sum
// is therefore a measure of how far the CSF is from its linear bias point.
//
// Symbol timing: the samples of each SYM_LEN-sample symbol are counted from
// `restart`. The first MARGIN samples are skipped so that the NLMS filter can
// settle after a bias change; the next LEN samples are multiplied and summed.
// After the last sample of the symbol, corr_valid pulses for one cycle with
// the sum in corr and the next symbol begins. Each multiplier operand is
// sign-extended (or saturated, if wider) to MUL_W bits, so the multiplier is
// MUL_W x MUL_W; the accumulator has 2*MUL_W + clog2(LEN) bits and cannot
// overflow.
//
// Interface: in_valid marks a baseband (e, k) pair. restart (synchronous)
// clears the sum and puts the counter at the first sample of a symbol.
// Synchronous active-low reset does the same.
//
// From the published scheme: 2000 correlated samples per 2048-sample symbol with
// 48 samples of settling margin, 16-bit correlator multipliers. Own choice:
// the margin being at the start of the symbol, and operand saturation.
module correlator #(
  parameter int unsigned E_W     = nls_pkg::LMS_OUT_W + 1,
  parameter int unsigned K_W     = nls_pkg::CUBE_W + $clog2(nls_pkg::OSR),
  parameter int unsigned MUL_W   = nls_pkg::CORR_MUL_W,
  parameter int unsigned SYM_LEN = nls_pkg::SYM_LEN,
  parameter int unsigned LEN     = nls_pkg::CORR_LEN,
  parameter int unsigned MARGIN  = nls_pkg::LMS_MARGIN,
  parameter int unsigned ACC_W   = 2 * MUL_W + $clog2(LEN)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    restart,
  input  logic                    in_valid,
  input  logic signed [E_W-1:0]   e,
  input  logic signed [K_W-1:0]   k,
  output logic                    corr_valid,
  output logic signed [ACC_W-1:0] corr
);

  localparam int unsigned CNT_W = $clog2(SYM_LEN);
  localparam int unsigned OPX_W = (E_W > K_W ? E_W : K_W) + MUL_W;

  logic [CNT_W-1:0]          idx;
  logic signed [ACC_W-1:0]   acc;
  logic signed [MUL_W-1:0]   op_e, op_k;
  logic signed [2*MUL_W-1:0] prod;
  logic                      in_window, last;

  // Sign-extend or saturate an operand to MUL_W bits.
  function automatic logic signed [MUL_W-1:0] to_mul(input logic signed [OPX_W-1:0] v);
    localparam logic signed [OPX_W-1:0] MAXV = OPX_W'((64'sd1 <<< (MUL_W - 1)) - 1);
    localparam logic signed [OPX_W-1:0] MINV = -OPX_W'(64'sd1 <<< (MUL_W - 1));
    if (v > MAXV)      return MAXV[MUL_W-1:0];
    else if (v < MINV) return MINV[MUL_W-1:0];
    else               return v[MUL_W-1:0];
  endfunction

  always_comb begin
    op_e      = to_mul(OPX_W'(e));
    op_k      = to_mul(OPX_W'(k));
    prod      = (2*MUL_W)'(op_e) * (2*MUL_W)'(op_k);
    in_window = (32'(idx) >= MARGIN) && (32'(idx) < MARGIN + LEN);
    last      = (idx == CNT_W'(SYM_LEN - 1));
  end

  always_ff @(posedge clk) begin
    if (!rst_n || restart) begin
      idx        <= '0;
      acc        <= '0;
      corr_valid <= 1'b0;
      corr       <= '0;
    end else begin
      corr_valid <= 1'b0;
      if (in_valid) begin
        if (last) begin
          idx        <= '0;
          acc        <= '0;
          corr_valid <= 1'b1;
          corr       <= in_window ? acc + ACC_W'(prod) : acc;
        end else begin
          idx <= idx + 1'b1;
          if (in_window) acc <= acc + ACC_W'(prod);
        end
      end
    end
  end

endmodule
