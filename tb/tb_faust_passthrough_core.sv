// tb_faust_passthrough_core -- self-checking test of the pass-through core.
//
// Four channels of random samples are started at random intervals; done
// must follow start by one cycle with out equal to the input captured at
// start, and out must hold while inputs change between starts.
module tb_faust_passthrough_core;
  localparam int NC = 4, SW = 24;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start = 1'b0, idle, done;
  logic [NC-1:0][SW-1:0] in, out, sent;

  faust_passthrough_core #(.NUM_CH(NC), .SAMPLE_W(SW)) dut (
    .clk, .rst_n, .start_i(start), .idle_o(idle), .done_o(done), .in_i(in), .out_o(out)
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    check(out == '0, "reset output");
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      for (int c = 0; c < NC; c++) in[c] = SW'($urandom);
      sent  = in;
      start = 1'b1;
      check(idle, "idle");
      @(negedge clk);
      start = 1'b0;
      check(done, $sformatf("done one cycle after start (%0d)", n));
      check(out == sent, $sformatf("sample %0d: out %h want %h", n, out, sent));
      for (int c = 0; c < NC; c++) in[c] = SW'($urandom);
      repeat ($urandom_range(0, 3)) begin
        @(negedge clk);
        check(!done, "no done without start");
        check(out == sent, "output held");
      end
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
