// faust_passthrough_core -- one-sample compute core of the pass-through DSP
// program (every audio output equals the audio input of the same channel).
//
// This is the program used to measure the audio latency of the whole chain:
// the analog input goes through the codec, the I2S transceiver, this core and
// back.  Like every core of the FAUST IP it computes exactly one sample per
// start: start_i (accepted while idle_o is high) captures in_i, and one
// clock later done_o pulses with out_o holding the result.  out_o keeps its
// value until the next done_o.  There is no control state.
//
// The handshake (start/idle/done, one result per start) mirrors the
// block-level protocol of a high-level-synthesis core and is this design's
// choice; the function is the pass-through of the latency experiment.
module faust_passthrough_core #(
  parameter int unsigned NUM_CH   = 2,    // audio channels in and out
  parameter int unsigned SAMPLE_W = 16    // bits per sample
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             start_i,
  output logic                             idle_o,
  output logic                             done_o,
  input  logic [NUM_CH-1:0][SAMPLE_W-1:0]  in_i,
  output logic [NUM_CH-1:0][SAMPLE_W-1:0]  out_o
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_o  <= '0;
      done_o <= 1'b0;
    end else begin
      done_o <= start_i;
      if (start_i) out_o <= in_i;
    end
  end

  // Single-cycle core: it is always ready for the next start.
  assign idle_o = 1'b1;

endmodule
