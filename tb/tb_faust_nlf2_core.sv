// tb_faust_nlf2_core -- self-checking test of the nlf2 oscillator core.
//
// The core is started once every few cycles with control words
// s = sin(th), c = cos(th) in Q2.30.  The output must follow cos(n*th),
// computed here in real arithmetic, within 2 LSB; both output channels must
// agree; done must come exactly two cycles after start.  Halfway the
// frequency changes: the phase must then continue from where it was
// (cos(phi + k*th2)), showing that the controls are picked up per sample
// and the state is kept.
module tb_faust_nlf2_core;
  import syfala_pkg::*;

  localparam int SW = 16;
  localparam int N1 = 120, N2 = 120;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start = 1'b0, idle, done;
  ctrl_word_t [2:0] ctrl;
  logic [1:0][SW-1:0] out;

  faust_nlf2_core #(.NUM_CH(2), .SAMPLE_W(SW), .CTRL_WORDS(3)) dut (
    .clk, .rst_n, .start_i(start), .idle_o(idle), .done_o(done), .ctrl_i(ctrl), .out_o(out)
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic ctrl_word_t q30(input real v);
    return ctrl_word_t'($rtoi(v * 1073741824.0));
  endfunction

  function automatic int expect_code(input real y);
    real v;
    v = y * 32768.0;
    if (v > 32767.0) v = 32767.0;
    if (v < -32768.0) v = -32768.0;
    return $rtoi(v);
  endfunction

  task automatic set_freq(input real th);
    ctrl[0] = q30(th);
    ctrl[1] = q30($sin(th));
    ctrl[2] = q30($cos(th));
  endtask

  task automatic run_sample(input real y_ref, input int n);
    int lat, got, want;
    @(posedge clk);
    check(idle, $sformatf("idle before sample %0d", n));
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    lat = 1;
    #1;
    while (!done && lat < 10) begin
      check(!idle || lat > 1, "busy after start");
      @(posedge clk); #1; lat++;
    end
    check(lat == 2, $sformatf("start-to-done %0d cycles", lat));
    got  = int'($signed(out[0]));
    want = expect_code(y_ref);
    check(got - want <= 2 && want - got <= 2,
          $sformatf("sample %0d: got %0d want %0d", n, got, want));
    check(out[0] == out[1], "both channels equal");
  endtask

  initial begin
    real th1, th2, phi;
    th1 = 2.0 * 3.14159265358979 * 440.0 / 48000.0 * 7.0;   // a few cycles over N1
    th2 = 2.0 * 3.14159265358979 * 1000.0 / 48000.0 * 5.0;
    set_freq(th1);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < N1; n++) run_sample($cos(n * th1), n);
    phi = (N1 - 1) * th1;
    set_freq(th2);
    for (int k = 1; k <= N2; k++) run_sample($cos(phi + k * th2), N1 - 1 + k);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
