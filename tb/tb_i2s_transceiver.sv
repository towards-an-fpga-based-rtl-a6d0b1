// tb_i2s_transceiver -- self-checking test of i2s_transceiver.
//
// Runs three configurations side by side against behavioural codec models:
// the default one (16-bit, one line, bclk = clk/5), 24-bit samples on two
// lines with bclk = clk/4, and 8-bit samples with the smallest divider (2).
// See i2s_bench for what is checked.
module tb_i2s_transceiver;
  int c0, f0, c1, f1, c2, f2;
  logic d0, d1, d2;

  i2s_bench #(.BIT_DEPTH(16), .NUM_LINES(1), .BCLK_DIV(5), .NFRAMES(12)) b0 (c0, f0, d0);
  i2s_bench #(.BIT_DEPTH(24), .NUM_LINES(2), .BCLK_DIV(4), .NFRAMES(10)) b1 (c1, f1, d1);
  i2s_bench #(.BIT_DEPTH(8),  .NUM_LINES(1), .BCLK_DIV(2), .NFRAMES(10)) b2 (c2, f2, d2);

  initial begin
    #1;
    wait (d0 && d1 && d2);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2);
    $finish;
  end

  // watchdog
  initial begin
    #2_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2 + 1);
    $finish;
  end
endmodule
