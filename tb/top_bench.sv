// top_bench -- one end-to-end run of syfala_top with given parameters.
//
// Codec models sit on every I2S line; a behavioural AXI4-Lite master plays
// the ARM processor.  What is checked depends on the program:
//   pass-through: every frame a codec sends comes back to it exactly two
//     frames later (two frames of 2*BIT_DEPTH*BCLK_DIV clocks, MSB to MSB),
//     on every line;
//   oscillator: the ARM writes th, sin(th), cos(th); the codec must receive
//     cos(k*th) for the k-th computed sample, one frame after the result
//     of frame k; after a frequency change written just after a sample tick
//     the phase continues with the new step.  Between updates the ARM model
//     keeps rewriting the same values, as the control software does.
// In both cases the status registers are read back at the end (samples
// computed, no overrun, cycles per sample).  Counts of each mechanism seen
// leave through the ports; a mechanism never seen counts as a failure.
module top_bench
  import syfala_pkg::*;
#(
  parameter faust_prog_e PROGRAM   = PROG_NLF2_OSC,
  parameter int unsigned BIT_DEPTH = 16,
  parameter int unsigned NUM_LINES = 1,
  parameter int unsigned BCLK_DIV  = 5,
  parameter int unsigned NFRAMES   = 60
) (
  output int   checks_o,
  output int   failures_o,
  output logic done_o
);
  localparam int unsigned W = BIT_DEPTH;
  localparam int unsigned AW = 8;
  localparam longint FRAME_CYC = 2 * W * BCLK_DIV;

  logic clk = 1'b0, rst_n = 1'b0;
  always #4 clk = ~clk;     // period 8 time units

  logic bclk, ws, overrun;
  logic [NUM_LINES-1:0] sd_rx, sd_tx;
  logic [AW-1:0] awaddr, araddr;
  logic awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [31:0] wdata, rdata;
  logic [3:0] wstrb;
  logic [1:0] bresp, rresp;

  syfala_top #(
    .PROGRAM(PROGRAM), .BIT_DEPTH(BIT_DEPTH), .NUM_LINES(NUM_LINES), .BCLK_DIV(BCLK_DIV)
  ) dut (
    .clk, .rst_n,
    .i2s_bclk_o(bclk), .i2s_ws_o(ws), .i2s_sd_rx_i(sd_rx), .i2s_sd_tx_o(sd_tx),
    .s_axil_awaddr(awaddr), .s_axil_awvalid(awvalid), .s_axil_awready(awready),
    .s_axil_wdata(wdata), .s_axil_wstrb(wstrb), .s_axil_wvalid(wvalid), .s_axil_wready(wready),
    .s_axil_bresp(bresp), .s_axil_bvalid(bvalid), .s_axil_bready(bready),
    .s_axil_araddr(araddr), .s_axil_arvalid(arvalid), .s_axil_arready(arready),
    .s_axil_rdata(rdata), .s_axil_rresp(rresp), .s_axil_rvalid(rvalid), .s_axil_rready(rready),
    .overrun_o(overrun)
  );

  axil_master_model #(.ADDR_W(AW)) arm (
    .clk, .awaddr, .awvalid, .awready, .wdata, .wstrb, .wvalid, .wready,
    .bresp, .bvalid, .bready, .araddr, .arvalid, .arready, .rdata, .rresp, .rvalid, .rready
  );

  for (genvar l = 0; l < NUM_LINES; l++) begin : g_codec
    i2s_codec_model #(.W(W)) codec (.bclk(bclk), .ws(ws), .sd_o(sd_rx[l]), .sd_i(sd_tx[l]));
  end

  int checks = 0, failures = 0;
  int n_latency = 0, n_osc = 0, n_ctrl_update = 0, n_lines = 0, n_status = 0, n_overrun = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL [prog=%0d W=%0d L=%0d] %s", PROGRAM, W, NUM_LINES, what); end
  endtask

  always @(posedge clk) if (rst_n && overrun) n_overrun++;

  // sample ticks of the design (frames received), for timing the control update
  int ticks = 0;
  always @(posedge clk) if (rst_n && dut.u_i2s.rx_valid_o) ticks++;

  function automatic logic [W-1:0] pat(input int f, input int ch);
    logic [31:0] x;
    x = 32'(f) * 32'h9E3779B1 ^ 32'(ch + 1) * 32'h85EBCA6B;
    x = x ^ (x >> 15);
    x = x * 32'h2C1B3C6D;
    return W'(x ^ (x >> 12));
  endfunction

  function automatic ctrl_word_t q30(input real v);
    return ctrl_word_t'($rtoi(v * 1073741824.0));
  endfunction

  function automatic int code(input real y);
    real v;
    v = y * (2.0 ** (W - 1));
    if (v > 2.0 ** (W - 1) - 1.0) v = 2.0 ** (W - 1) - 1.0;
    if (v < -(2.0 ** (W - 1))) v = -(2.0 ** (W - 1));
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

  int lines_done = 0;
  real th1 = 0.07, th2 = 0.19;
  int  m_switch = -1;   // index of the last computation with th1

  initial begin
    done_o = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    if (PROGRAM == PROG_NLF2_OSC) begin
      set_freq(th1);
      check(ticks == 0, "controls written before the first sample");
      cur_th = th1; loop_run = 1;
      wait (ticks == NFRAMES / 2 - 1);
      loop_run = 0;
      wait (loop_idle);
      wait (ticks == NFRAMES / 2);
      m_switch = ticks - 1;      // computations 0..m_switch used th1
      set_freq(th2);
      check(ticks == m_switch + 1, "control update fits in one frame");
      n_ctrl_update++;
      cur_th = th2; loop_run = 1;
    end
  end

  for (genvar l = 0; l < NUM_LINES; l++) begin : g_line
    initial begin
      for (int f = 0; f < NFRAMES + 8; f++)
        g_codec[l].codec.tx_q.push_back({pat(f, 2*l), pat(f, 2*l+1)});
      wait (g_codec[l].codec.rx_q.size() >= NFRAMES);
      if (PROGRAM == PROG_PASSTHROUGH) begin
        for (int j = 0; j < NFRAMES; j++) begin
          logic [2*W-1:0] got, want;
          got  = g_codec[l].codec.rx_q[j];
          want = (j < 2) ? '0 : {pat(j - 2, 2*l), pat(j - 2, 2*l+1)};
          check(got == want, $sformatf("line %0d frame %0d: got %h want %h", l, j, got, want));
          if (j >= 2) begin
            time dt;
            dt = g_codec[l].codec.rx_time_q[j] - g_codec[l].codec.tx_time_q[j - 2];
            // driven on a falling bclk edge, sampled on a rising one: plus the low phase
            check(dt == time'((2 * FRAME_CYC + (BCLK_DIV - BCLK_DIV / 2)) * 8),
                  $sformatf("latency %0t, want two frames", dt));
            n_latency++;
          end
        end
      end else begin
        for (int j = 0; j < NFRAMES; j++) begin
          int k, gl, gr, want;
          real y;
          logic [2*W-1:0] got;
          got = g_codec[l].codec.rx_q[j];
          gl  = int'($signed(got[2*W-1:W]));
          gr  = int'($signed(got[W-1:0]));
          k   = j - 1;    // computation whose result the codec receives in frame j
          if (k < 0) want = 0;
          else if (k <= m_switch) want = code($cos(k * th1));
          else want = code($cos(m_switch * th1 + (k - m_switch) * th2));
          check(gl - want <= 2 && want - gl <= 2 && gl == gr,
                $sformatf("line %0d frame %0d: got %0d/%0d want %0d", l, j, gl, gr, want));
          n_osc++;
        end
      end
      n_lines++;
      lines_done++;
    end
  end

  initial begin
    logic [1:0] resp;
    logic [31:0] d;
    int t0;
    wait (lines_done == NUM_LINES);
    loop_run = 0;
    wait (loop_idle);
    // the counter may advance while the read is in flight
    t0 = ticks;
    arm.read(8'h80, d, resp);
    check(resp == AXI_RESP_OKAY && int'(d) >= t0 - 1 && int'(d) <= ticks,
          $sformatf("samples computed %0d, ticks %0d..%0d", d, t0, ticks));
    arm.read(8'h84, d, resp);
    check(resp == AXI_RESP_OKAY && d == 0, "no overrun");
    arm.read(8'h88, d, resp);
    check(resp == AXI_RESP_OKAY && d == ((PROGRAM == PROG_PASSTHROUGH) ? 1 : 2), $sformatf("cycles per sample %0d", d));
    check(d < FRAME_CYC, "computation fits in one sample period");
    n_status++;
    check(n_overrun == 0, "no overrun pulse");
    // every mechanism of this configuration happened at least once
    if (PROGRAM == PROG_PASSTHROUGH) check(n_latency > 0, "latency measured");
    else begin
      check(n_osc > 0, "oscillator samples checked");
      check(n_ctrl_update > 0, "control update");
      check(n_rewrites > 0, "best-effort control rewrites");
    end
    check(n_lines == NUM_LINES, "every I2S line checked");
    $display("[prog=%0d W=%0d L=%0d DIV=%0d] frames=%0d latency_checks=%0d osc_samples=%0d ctrl_updates=%0d rewrites=%0d lines=%0d status_reads=%0d; loop delay %0d clk = 2 frames",
             PROGRAM, W, NUM_LINES, BCLK_DIV, NFRAMES, n_latency, n_osc, n_ctrl_update, n_rewrites, n_lines, n_status, 2 * FRAME_CYC);
    checks_o   = checks;
    failures_o = failures;
    done_o     = 1'b1;
  end

endmodule
