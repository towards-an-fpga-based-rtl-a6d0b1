// tb_syfala_top -- end-to-end test of syfala_top.
//
// Three systems side by side: the pass-through program with 24-bit samples
// on two I2S lines (latency measurement on every line), the pass-through
// program at the default 16-bit / one-line configuration, and the sine
// oscillator at the defaults with a frequency change while running.  See
// top_bench for the checks.
module tb_syfala_top;
  import syfala_pkg::*;
  int c0, f0, c1, f1, c2, f2;
  logic d0, d1, d2;

  top_bench #(.PROGRAM(PROG_PASSTHROUGH), .BIT_DEPTH(24), .NUM_LINES(2), .BCLK_DIV(4), .NFRAMES(40)) b0 (c0, f0, d0);
  top_bench #(.PROGRAM(PROG_PASSTHROUGH), .BIT_DEPTH(16), .NUM_LINES(1), .BCLK_DIV(5), .NFRAMES(40)) b1 (c1, f1, d1);
  top_bench #(.PROGRAM(PROG_NLF2_OSC),    .BIT_DEPTH(16), .NUM_LINES(1), .BCLK_DIV(5), .NFRAMES(120)) b2 (c2, f2, d2);

  initial begin
    #1;
    wait (d0 && d1 && d2);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2);
    $finish;
  end

  initial begin
    #2_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2 + 1);
    $finish;
  end
endmodule
