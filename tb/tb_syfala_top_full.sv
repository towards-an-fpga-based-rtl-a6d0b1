// tb_syfala_top_full -- syfala_top exactly as configured by default: the
// sine oscillator program, 16-bit samples on one stereo I2S line, bclk =
// clk/5 (768 kHz frames from a 122.88 MHz clock).
//
// One complete operation: the ARM (behavioural AXI4-Lite master) computes
// th = 2*pi*freq/fs, sin(th) and cos(th) for freq = 440 Hz, the default of
// the oscillator's frequency slider, and writes them; the codec (behavioural
// model) then receives NFRAMES stereo frames, which must be cos(k*th) for
// the k-th computed sample, arriving one frame after the frame that
// triggered the computation.  Halfway the slider moves to 1000 Hz and the
// phase must continue with the new step.  Finally the status registers are
// read (samples computed, overruns, cycles per sample).  Between the
// updates the ARM model rewrites the same values continuously, as the
// control software does.
module tb_syfala_top_full;
  import syfala_pkg::*;
  localparam int W = 16, NFRAMES = 1536;      // 2 ms of audio at 768 kHz
  localparam real FS = 768000.0, PI = 3.14159265358979;

  logic clk = 1'b0, rst_n = 1'b0;
  always #4 clk = ~clk;

  logic bclk, ws, overrun;
  logic [0:0] sd_rx, sd_tx;
  logic [7:0] awaddr, araddr;
  logic awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [31:0] wdata, rdata;
  logic [3:0] wstrb;
  logic [1:0] bresp, rresp;

  syfala_top dut (
    .clk, .rst_n,
    .i2s_bclk_o(bclk), .i2s_ws_o(ws), .i2s_sd_rx_i(sd_rx), .i2s_sd_tx_o(sd_tx),
    .s_axil_awaddr(awaddr), .s_axil_awvalid(awvalid), .s_axil_awready(awready),
    .s_axil_wdata(wdata), .s_axil_wstrb(wstrb), .s_axil_wvalid(wvalid), .s_axil_wready(wready),
    .s_axil_bresp(bresp), .s_axil_bvalid(bvalid), .s_axil_bready(bready),
    .s_axil_araddr(araddr), .s_axil_arvalid(arvalid), .s_axil_arready(arready),
    .s_axil_rdata(rdata), .s_axil_rresp(rresp), .s_axil_rvalid(rvalid), .s_axil_rready(rready),
    .overrun_o(overrun)
  );

  axil_master_model #(.ADDR_W(8)) arm (
    .clk, .awaddr, .awvalid, .awready, .wdata, .wstrb, .wvalid, .wready,
    .bresp, .bvalid, .bready, .araddr, .arvalid, .arready, .rdata, .rresp, .rvalid, .rready
  );

  i2s_codec_model #(.W(W)) codec (.bclk(bclk), .ws(ws), .sd_o(sd_rx[0]), .sd_i(sd_tx[0]));

  int checks = 0, failures = 0, ticks = 0, overruns = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n && dut.u_i2s.rx_valid_o) ticks++;
  always @(posedge clk) if (rst_n && overrun) overruns++;

  function automatic ctrl_word_t q30(input real v);
    return ctrl_word_t'($rtoi(v * 1073741824.0));
  endfunction

  function automatic int code(input real y);
    real v;
    v = y * 32768.0;
    if (v > 32767.0) v = 32767.0;
    if (v < -32768.0) v = -32768.0;
    return $rtoi(v);
  endfunction

  task automatic set_freq(input real th);
    logic [1:0] resp;
    arm.write(8'h00, q30(th), 4'hF, resp);        check(resp == AXI_RESP_OKAY, "write th");
    arm.write(8'h04, q30($sin(th)), 4'hF, resp);  check(resp == AXI_RESP_OKAY, "write sin");
    arm.write(8'h08, q30($cos(th)), 4'hF, resp);  check(resp == AXI_RESP_OKAY, "write cos");
  endtask


  // Best effort: like the ARM software, keep rewriting the current control
  // values in a loop.  Rewriting identical values must not disturb the audio.
  real cur_th = 0.0;
  bit  loop_run = 0, loop_idle = 1;
  int  n_rewrites = 0;
  initial forever begin
    @(posedge clk);
    if (loop_run) begin
      loop_idle = 0;
      set_freq(cur_th);
      n_rewrites++;
      loop_idle = 1;
    end
  end

  initial begin
    real th1, th2;
    int m, t0, peak;
    logic [1:0] resp;
    logic [31:0] d;
    th1 = 2.0 * PI * 440.0 / FS;
    th2 = 2.0 * PI * 1000.0 / FS;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    set_freq(th1);
    check(ticks == 0, "controls in place before the first sample");
    cur_th = th1; loop_run = 1;
    wait (ticks == NFRAMES / 2 - 1);
    loop_run = 0;
    wait (loop_idle);
    wait (ticks == NFRAMES / 2);
    m = ticks - 1;
    set_freq(th2);
    check(ticks == m + 1, "control update within one frame");
    cur_th = th2; loop_run = 1;
    wait (codec.rx_q.size() >= NFRAMES);
    loop_run = 0;
    wait (loop_idle);
    check(n_rewrites > 10, $sformatf("best-effort rewrites while running: %0d", n_rewrites));
    peak = 0;
    for (int j = 0; j < NFRAMES; j++) begin
      int k, gl, gr, want;
      gl = int'($signed(codec.rx_q[j][2*W-1:W]));
      gr = int'($signed(codec.rx_q[j][W-1:0]));
      k  = j - 1;
      if (k < 0) want = 0;
      else if (k <= m) want = code($cos(k * th1));
      else want = code($cos(m * th1 + (k - m) * th2));
      check(gl - want <= 2 && want - gl <= 2 && gl == gr,
            $sformatf("frame %0d: got %0d/%0d want %0d", j, gl, gr, want));
      if (gl > peak) peak = gl;
    end
    check(peak > 32000, "full-scale tone");
    t0 = ticks;
    arm.read(8'h80, d, resp);
    check(resp == AXI_RESP_OKAY && int'(d) >= t0 - 1 && int'(d) <= ticks, $sformatf("samples computed %0d", d));
    arm.read(8'h84, d, resp);
    check(resp == AXI_RESP_OKAY && d == 0 && overruns == 0, "no overrun");
    arm.read(8'h88, d, resp);
    check(resp == AXI_RESP_OKAY && d == 2, $sformatf("cycles per sample %0d", d));
    $display("frames=%0d control_updates=2 best_effort_rewrites=%0d peak=%0d cycles_per_sample=%0d", NFRAMES, n_rewrites, peak, d);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NFRAMES * 160 + 20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
