// bias_tuner: closes the calibration loop around the tunable CSF.
//
// Once per OFDM symbol the correlator reports how much in-band
// intermodulation is left; the tuner moves the CSF bias code one step and
// keeps the direction while the magnitude of the correlation falls. When it
// rises, the direction is reversed and the step halved. When a rise is seen
// with the step already at STEP_MIN, the bias is moved back to the best point
// seen and the search ends: the tuner raises done and drops aux_en, which
// powers down the auxiliary ADC and the digital auxiliary path until the
// next start. MAX_ITER symbols bound the search.
//
// Interface: start (one-cycle pulse) begins a calibration from the present
// bias code; restart pulses at the same time so the datapath can clear
// itself. corr_valid/corr come from the correlator at the end of each
// symbol; bias changes one cycle after corr_valid, at the symbol boundary.
// reversal pulses on every direction change (observability). Synchronous
// active-low reset sets the bias to BIAS_INIT and powers the path down.
//
// From the published scheme: one bias adjustment per OFDM symbol, driven by the
// correlation, repeated until the optimum is found, then power-down. Own
// choice: the step-halving search on the correlation magnitude (the published scheme
// shows that the magnitude is smallest at the linear bias point but gives
// no search rule), the bias code width and the step sizes.
module bias_tuner #(
  parameter int unsigned C_W       = 2 * nls_pkg::CORR_MUL_W + $clog2(nls_pkg::CORR_LEN),
  parameter int unsigned BIAS_W    = nls_pkg::BIAS_W,
  parameter int unsigned BIAS_INIT = 1 << (nls_pkg::BIAS_W - 1),
  parameter int unsigned STEP_INIT = 16,
  parameter int unsigned STEP_MIN  = 1,
  parameter int unsigned MAX_ITER  = 64
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic                  corr_valid,
  input  logic signed [C_W-1:0] corr,
  output logic [BIAS_W-1:0]     bias,
  output logic                  aux_en,
  output logic                  restart,
  output logic                  done,
  output logic                  reversal
);
  import nls_pkg::*;

  localparam int unsigned STEP_W = $clog2(STEP_INIT + 1);
  localparam int unsigned ITER_W = $clog2(MAX_ITER + 1);
  localparam int unsigned B_X    = BIAS_W + 2;          // signed bias arithmetic

  tune_state_e         state;
  logic [C_W-1:0]      prev_mag;
  logic [C_W-1:0]      mag;
  logic [STEP_W-1:0]   step;
  logic                dir_up;
  logic [ITER_W-1:0]   iter;

  // Move the bias by one step, clamped to the code range.
  function automatic logic [BIAS_W-1:0] move(input logic [BIAS_W-1:0] b,
                                             input logic [STEP_W-1:0] s,
                                             input logic up);
    logic signed [B_X-1:0] t;
    t = up ? signed'(B_X'(b)) + signed'(B_X'(s)) : signed'(B_X'(b)) - signed'(B_X'(s));
    if (t < 0)                             return '0;
    else if (t > B_X'((1 << BIAS_W) - 1))  return '1;
    else                                   return t[BIAS_W-1:0];
  endfunction

  always_comb mag = corr[C_W-1] ? C_W'(-corr) : C_W'(corr);

  assign aux_en = (state == TUNE_FIRST) || (state == TUNE_SEARCH);
  assign done   = (state == TUNE_DONE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= TUNE_IDLE;
      bias     <= BIAS_W'(BIAS_INIT);
      prev_mag <= '0;
      step     <= STEP_W'(STEP_INIT);
      dir_up   <= 1'b1;
      iter     <= '0;
      restart  <= 1'b0;
      reversal <= 1'b0;
    end else begin
      restart  <= 1'b0;
      reversal <= 1'b0;
      if (start) begin
        state   <= TUNE_FIRST;
        step    <= STEP_W'(STEP_INIT);
        dir_up  <= 1'b1;
        iter    <= '0;
        restart <= 1'b1;
      end else if (corr_valid) begin
        case (state)
          TUNE_FIRST: begin
            prev_mag <= mag;
            bias     <= move(bias, step, dir_up);
            iter     <= iter + 1'b1;
            state    <= TUNE_SEARCH;
          end
          TUNE_SEARCH: begin
            prev_mag <= mag;
            iter     <= iter + 1'b1;
            if (mag >= prev_mag) begin
              reversal <= 1'b1;
              dir_up   <= !dir_up;
              if (step <= STEP_W'(STEP_MIN)) begin
                bias  <= move(bias, step, !dir_up);   // back to the best point
                state <= TUNE_DONE;
              end else begin
                step <= step >> 1;
                bias <= move(bias, step >> 1, !dir_up);
              end
            end else begin
              bias <= move(bias, step, dir_up);
            end
            if (iter == ITER_W'(MAX_ITER - 1)) state <= TUNE_DONE;
          end
          default: ;
        endcase
      end
    end
  end

endmodule
