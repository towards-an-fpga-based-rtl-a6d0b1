// faust_ip -- the audio DSP block: runs the selected one-sample compute core
// once per audio sample.
//
// Every pulse of sample_tick_i (a new input frame from the I2S transceiver)
// does two things in the same cycle:
//   * the result of the previous computation is copied to out_o, which feeds
//     the transceiver and stays constant for a whole sample period;
//   * the core is started on the new input in_i, and captures the current
//     control words ctrl_i (the control state that the ARM keeps writing).
// The result for input n therefore leaves on tick n+1: the IP has a constant
// latency of one sample, whatever the core's own cycle count, as long as the
// core finishes within one sample period.  If the core is still busy at a
// tick, the tick is an overrun: the new input is dropped, out_o repeats its
// value, and overrun_o pulses and the overrun counter increments.
//
// Status for the control processor: number of samples computed
// (samples_o), overruns (overruns_o), and the clock cycles the last
// computation took (comp_cycles_o), the figure that must stay below one
// sample period.
//
// PROGRAM selects the core (syfala_pkg::faust_prog_e): the pass-through used
// for latency measurements, or the nlf2 sine oscillator.  The core choice,
// fixed point arithmetic, overrun handling and status counters are this
// design's choices; the once-per-sample call with a one-sample latency and
// the split of control rate work to the ARM follow the flow it implements.
module faust_ip
  import syfala_pkg::*;
#(
  parameter faust_prog_e PROGRAM    = PROG_NLF2_OSC,
  parameter int unsigned NUM_CH     = 2,     // audio channels in and out
  parameter int unsigned SAMPLE_W   = 16,    // bits per sample
  parameter int unsigned CTRL_WORDS = 3      // fControl[] words
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             sample_tick_i,
  input  logic [NUM_CH-1:0][SAMPLE_W-1:0]  in_i,
  input  ctrl_word_t [CTRL_WORDS-1:0]      ctrl_i,
  output logic [NUM_CH-1:0][SAMPLE_W-1:0]  out_o,
  output logic                             overrun_o,
  output logic [31:0]                      samples_o,
  output logic [31:0]                      overruns_o,
  output logic [31:0]                      comp_cycles_o
);

  logic                            core_start, core_idle, core_done;
  logic [NUM_CH-1:0][SAMPLE_W-1:0] core_out;
  logic                            busy;        // a computation is in flight
  logic [31:0]                     cyc_cnt;

  assign core_start = sample_tick_i && core_idle && (!busy || core_done);

  if (PROGRAM == PROG_PASSTHROUGH) begin : g_pass
    faust_passthrough_core #(.NUM_CH(NUM_CH), .SAMPLE_W(SAMPLE_W)) u_core (
      .clk, .rst_n,
      .start_i (core_start),
      .idle_o  (core_idle),
      .done_o  (core_done),
      .in_i    (in_i),
      .out_o   (core_out)
    );
  end else begin : g_nlf2
    faust_nlf2_core #(.NUM_CH(NUM_CH), .SAMPLE_W(SAMPLE_W), .CTRL_WORDS(CTRL_WORDS)) u_core (
      .clk, .rst_n,
      .start_i (core_start),
      .idle_o  (core_idle),
      .done_o  (core_done),
      .ctrl_i  (ctrl_i),
      .out_o   (core_out)
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy          <= 1'b0;
      out_o         <= '0;
      overrun_o     <= 1'b0;
      samples_o     <= '0;
      overruns_o    <= '0;
      comp_cycles_o <= '0;
      cyc_cnt       <= '0;
    end else begin
      overrun_o <= 1'b0;
      if (busy) cyc_cnt <= cyc_cnt + 1'b1;
      if (core_done) begin
        busy          <= 1'b0;
        samples_o     <= samples_o + 1'b1;
        comp_cycles_o <= cyc_cnt + 1'b1;
      end
      if (sample_tick_i) begin
        if (core_start) begin
          out_o   <= core_out;   // result of the previous sample
          busy    <= 1'b1;
          cyc_cnt <= '0;
        end else begin
          overrun_o  <= 1'b1;
          overruns_o <= overruns_o + 1'b1;
        end
      end
    end
  end

  // A core reports done only for a computation that was started.
  a_done_when_busy: assert property (@(posedge clk) disable iff (!rst_n) core_done |-> busy);

endmodule
