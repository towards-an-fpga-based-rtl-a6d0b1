// syfala_pkg -- types and constants shared by the audio SoC modules.
//
// The FAUST IP exchanges audio samples with the I2S transceiver as signed
// integers of the I2S bit depth, and receives its control state from the
// ARM processor as 32-bit words.  The original flow computes in single
// precision float; this RTL uses signed fixed point instead, with
// CTRL_FRAC fractional bits in every control word and in the internal
// state of the oscillator (Q2.30: range [-2, 2)).  That format is a choice
// of this design, not of the flow it follows.
package syfala_pkg;

  // Width of one control word (one fControl[] entry).
  localparam int unsigned CTRL_W    = 32;
  // Fractional bits of control words and of oscillator state.
  localparam int unsigned CTRL_FRAC = 30;

  typedef logic signed [CTRL_W-1:0] ctrl_word_t;

  // Which generated DSP program sits inside the FAUST IP.
  typedef enum logic [0:0] {
    PROG_PASSTHROUGH = 1'b0,   // audio in -> audio out, used to measure latency
    PROG_NLF2_OSC    = 1'b1    // nlf2 waveguide sine oscillator
  } faust_prog_e;

  // AXI response codes.
  localparam logic [1:0] AXI_RESP_OKAY   = 2'b00;
  localparam logic [1:0] AXI_RESP_SLVERR = 2'b10;

endpackage
