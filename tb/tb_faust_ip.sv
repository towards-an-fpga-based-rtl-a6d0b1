// tb_faust_ip -- self-checking test of the FAUST IP shell.
//
// Two instances: the pass-through program and the nlf2 oscillator.
// Sample ticks come every TICK cycles.  Checked: after tick k the output
// holds the result for the input of tick k-1 (one sample of latency) and
// does not change between ticks; the sample and cycle counters; and an
// overrun, provoked by two ticks one cycle apart on the oscillator, which
// must drop the second input, keep the output and count one overrun.
module tb_faust_ip;
  import syfala_pkg::*;
  localparam int SW = 16, NC = 2, TICK = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic tick = 1'b0;
  logic [NC-1:0][SW-1:0] in, out_p, out_o;
  ctrl_word_t [2:0] ctrl;
  logic ovr_p, ovr_o;
  logic [31:0] smp_p, ovs_p, cyc_p, smp_o, ovs_o, cyc_o;

  faust_ip #(.PROGRAM(PROG_PASSTHROUGH), .NUM_CH(NC), .SAMPLE_W(SW), .CTRL_WORDS(3)) u_pass (
    .clk, .rst_n, .sample_tick_i(tick), .in_i(in), .ctrl_i(ctrl), .out_o(out_p),
    .overrun_o(ovr_p), .samples_o(smp_p), .overruns_o(ovs_p), .comp_cycles_o(cyc_p)
  );
  faust_ip #(.PROGRAM(PROG_NLF2_OSC), .NUM_CH(NC), .SAMPLE_W(SW), .CTRL_WORDS(3)) u_osc (
    .clk, .rst_n, .sample_tick_i(tick), .in_i(in), .ctrl_i(ctrl), .out_o(out_o),
    .overrun_o(ovr_o), .samples_o(smp_o), .overruns_o(ovs_o), .comp_cycles_o(cyc_o)
  );

  int checks = 0, failures = 0, overrun_pulses = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  always @(posedge clk) if (rst_n && ovr_o) overrun_pulses++;

  function automatic int code(input real y);
    real v;
    v = y * 32768.0;
    if (v > 32767.0) v = 32767.0;
    return $rtoi(v);
  endfunction

  initial begin
    logic [NC-1:0][SW-1:0] prev_in;
    real th;
    int got, want;
    th = 0.05;
    ctrl[0] = ctrl_word_t'($rtoi(th * 1073741824.0));
    ctrl[1] = ctrl_word_t'($rtoi($sin(th) * 1073741824.0));
    ctrl[2] = ctrl_word_t'($rtoi($cos(th) * 1073741824.0));
    in = '0;
    prev_in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 60; k++) begin
      @(negedge clk);
      for (int c = 0; c < NC; c++) in[c] = SW'($urandom);
      tick = 1'b1;
      @(negedge clk);
      tick = 1'b0;
      // pass-through: result of the previous tick
      check(out_p == prev_in, $sformatf("pass tick %0d: out %h want %h", k, out_p, prev_in));
      // oscillator: cos((k-1)*th) after tick k
      if (k >= 1) begin
        got  = int'($signed(out_o[0]));
        want = code($cos((k - 1) * th));
        check(got - want <= 2 && want - got <= 2, $sformatf("osc tick %0d: got %0d want %0d", k, got, want));
      end else begin
        check(out_o == '0, "osc output before first result");
      end
      begin
        logic [NC-1:0][SW-1:0] held_p, held_o;
        held_p  = out_p;
        held_o  = out_o;
        prev_in = in;
        repeat (TICK - 2) begin
          @(negedge clk);
          check(out_p == held_p && out_o == held_o, "outputs held between ticks");
          in[0] = ~in[0];
        end
        in = prev_in;
      end
    end
    check(smp_p == 60 && smp_o == 60, $sformatf("sample counters %0d %0d", smp_p, smp_o));
    check(cyc_p == 1 && cyc_o == 2, $sformatf("cycle counters %0d %0d", cyc_p, cyc_o));
    check(ovs_p == 0 && ovs_o == 0, "no overrun at TICK spacing");

    // overrun: two ticks one cycle apart
    begin
      logic [NC-1:0][SW-1:0] held;
      @(negedge clk);
      tick = 1'b1;
      @(negedge clk);
      held = out_o;
      @(negedge clk);
      tick = 1'b0;
      check(out_o == held, "output kept on overrun");
      repeat (4) @(negedge clk);
      check(ovs_o == 1 && overrun_pulses == 1, $sformatf("one overrun counted (%0d)", ovs_o));
      check(smp_o == 61, $sformatf("dropped sample not computed (%0d)", smp_o));
      check(ovs_p == 0, "pass-through keeps up with back-to-back ticks");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
