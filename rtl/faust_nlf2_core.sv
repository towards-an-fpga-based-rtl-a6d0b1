// faust_nlf2_core -- one-sample compute core of the nlf2 sine oscillator.
//
// The program is a second-order normalised digital waveguide resonator
// (radius 1) excited by a unit impulse at its first sample.  Its per-sample
// computation, with s = sin(th) and c = cos(th) supplied by the ARM as
// control words ctrl_i[1] and ctrl_i[2] (ctrl_i[0] holds th itself and is
// not needed here), is
//     rec0' = s*rec1 + c*rec0
//     rec1' = imp + c*rec1 - s*rec0        imp = 1 on the first sample, else 0
//     out[0] = out[1] = rec1'
// so the output sequence is cos(n*th), n = 0, 1, 2, ...  The sine and
// cosine are never computed in hardware: the ARM computes them at control
// rate and the core only multiplies and adds at audio rate.
//
// Arithmetic is signed fixed point Q2.30 (syfala_pkg::CTRL_FRAC) for the
// controls and the two state registers; products are 64 bits wide and are
// shifted back (truncated) after the sums.  The output is rec1' scaled to
// SAMPLE_W bits and saturated, so 1.0 maps to the largest positive code.
// The original flow computes in single-precision float; fixed point is this
// design's choice.
//
// Timing: start_i (accepted while idle_o) captures the controls and starts
// the four multiplications; the next cycle adds them and updates the state,
// and done_o pulses in the cycle after that, with out_o valid and held until
// the next done_o.  Two cycles from start to done.
module faust_nlf2_core
  import syfala_pkg::*;
#(
  parameter int unsigned NUM_CH     = 2,    // audio output channels (>= 2)
  parameter int unsigned SAMPLE_W   = 16,   // bits per output sample
  parameter int unsigned CTRL_WORDS = 3     // fControl[] words (>= 3)
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             start_i,
  output logic                             idle_o,
  output logic                             done_o,
  input  ctrl_word_t [CTRL_WORDS-1:0]      ctrl_i,
  output logic [NUM_CH-1:0][SAMPLE_W-1:0]  out_o
);

  if (NUM_CH < 2)     begin : g_bad_ch   $error("NUM_CH must be at least 2"); end
  if (CTRL_WORDS < 3) begin : g_bad_ctrl $error("CTRL_WORDS must be at least 3"); end

  localparam int unsigned PW = 2 * CTRL_W;
  localparam logic signed [CTRL_W-1:0] ONE = CTRL_W'(1) <<< CTRL_FRAC;
  localparam logic signed [SAMPLE_W-1:0] SMAX = {1'b0, {(SAMPLE_W-1){1'b1}}};
  localparam logic signed [SAMPLE_W-1:0] SMIN = {1'b1, {(SAMPLE_W-1){1'b0}}};

  typedef enum logic [1:0] {S_IDLE, S_MUL, S_ADD} state_e;
  state_e state;

  logic signed [CTRL_W-1:0] rec0, rec1;     // fRec0, fRec1 of the previous sample
  logic                     ivec_prev;      // iVec0 of the previous sample
  logic signed [PW-1:0]     p_s_r1, p_c_r0, p_c_r1, p_s_r0;
  logic signed [PW-1:0]     sum0, sum1;
  logic signed [CTRL_W-1:0] rec0_new, rec1_new, imp;

  assign imp      = ivec_prev ? '0 : ONE;
  assign sum0     = p_s_r1 + p_c_r0;
  assign sum1     = p_c_r1 - p_s_r0;
  assign rec0_new = CTRL_W'(sum0 >>> CTRL_FRAC);
  assign rec1_new = imp + CTRL_W'(sum1 >>> CTRL_FRAC);

  // Scale Q2.30 to a SAMPLE_W-bit sample (1.0 -> 2^(SAMPLE_W-1)) with saturation.
  function automatic logic [SAMPLE_W-1:0] to_sample(input logic signed [CTRL_W-1:0] v);
    logic signed [CTRL_W-1:0] scaled;
    scaled = v >>> (CTRL_FRAC - (SAMPLE_W - 1));
    if (scaled > CTRL_W'(SMAX))      return SMAX;
    else if (scaled < CTRL_W'(SMIN)) return SMIN;
    else                             return scaled[SAMPLE_W-1:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      rec0      <= '0;
      rec1      <= '0;
      ivec_prev <= 1'b0;
      p_s_r1    <= '0;
      p_c_r0    <= '0;
      p_c_r1    <= '0;
      p_s_r0    <= '0;
      out_o     <= '0;
      done_o    <= 1'b0;
    end else begin
      done_o <= 1'b0;
      unique case (state)
        S_IDLE: if (start_i) begin
          p_s_r1 <= PW'(ctrl_i[1]) * PW'(rec1);
          p_c_r0 <= PW'(ctrl_i[2]) * PW'(rec0);
          p_c_r1 <= PW'(ctrl_i[2]) * PW'(rec1);
          p_s_r0 <= PW'(ctrl_i[1]) * PW'(rec0);
          state  <= S_MUL;
        end
        S_MUL: begin
          rec0      <= rec0_new;
          rec1      <= rec1_new;
          ivec_prev <= 1'b1;
          for (int ch = 0; ch < NUM_CH; ch++)
            out_o[ch] <= (ch < 2) ? to_sample(rec1_new) : '0;
          done_o <= 1'b1;
          state  <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign idle_o = (state == S_IDLE);

endmodule
