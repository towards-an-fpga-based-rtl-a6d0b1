// i2s_bench -- one configuration of the i2s_transceiver test.
//
// Connects the transceiver to NUM_LINES codec models and runs NFRAMES
// frames.  The codec models send known frames; every rx_valid_o pulse must
// present the frame the codecs sent one frame earlier, every frame the
// transceiver sends (tx_sample_i, changed after each tx_load_o) must reach
// the codecs unchanged, bclk must have a period of BCLK_DIV clocks and
// frames must be 2*BIT_DEPTH bit clocks apart.  Results leave through the
// output ports when done_o rises.
module i2s_bench #(
  parameter int unsigned BIT_DEPTH = 16,
  parameter int unsigned NUM_LINES = 1,
  parameter int unsigned BCLK_DIV  = 5,
  parameter int unsigned NFRAMES   = 12
) (
  output int   checks_o,
  output int   failures_o,
  output logic done_o
);
  localparam int unsigned W  = BIT_DEPTH;
  localparam int unsigned NC = 2 * NUM_LINES;

  logic clk = 1'b0, rst_n = 1'b0;
  always #4 clk = ~clk;

  logic                     bclk, ws;
  logic [NUM_LINES-1:0]     sd_rx, sd_tx;
  logic [NC-1:0][W-1:0]     rx_sample, tx_sample;
  logic                     rx_valid, tx_load;

  i2s_transceiver #(.BIT_DEPTH(W), .NUM_LINES(NUM_LINES), .BCLK_DIV(BCLK_DIV)) dut (
    .clk, .rst_n, .bclk_o(bclk), .ws_o(ws), .sd_rx_i(sd_rx), .sd_tx_o(sd_tx),
    .rx_sample_o(rx_sample), .rx_valid_o(rx_valid), .tx_sample_i(tx_sample), .tx_load_o(tx_load)
  );

  for (genvar l = 0; l < NUM_LINES; l++) begin : g_codec
    i2s_codec_model #(.W(W)) codec (.bclk(bclk), .ws(ws), .sd_o(sd_rx[l]), .sd_i(sd_tx[l]));
  end

  // deterministic pseudo-random pattern per (frame, channel)
  function automatic logic [W-1:0] pat(input int f, input int ch, input int salt);
    logic [31:0] x;
    x = 32'(f) * 32'h9E3779B1 ^ 32'(ch) * 32'h85EBCA6B ^ 32'(salt) * 32'hC2B2AE35;
    x = x ^ (x >> 13);
    x = x * 32'h27D4EB2F;
    return W'(x ^ (x >> 16));
  endfunction

  int checks = 0, failures = 0;
  int rx_frames = 0, tx_frames = 0;
  longint last_rx_cyc = -1, cyc = 0;
  always @(posedge clk) cyc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL [W=%0d L=%0d DIV=%0d] %s", W, NUM_LINES, BCLK_DIV, what);
    end
  endtask

  // receive side: frame n on rx_valid equals codec frame n-1
  always @(posedge clk) if (rst_n && rx_valid && rx_frames < NFRAMES) begin
    for (int l = 0; l < NUM_LINES; l++) begin
      logic [W-1:0] el, er;
      el = (rx_frames == 0) ? '0 : pat(rx_frames - 1, 2*l,   1);
      er = (rx_frames == 0) ? '0 : pat(rx_frames - 1, 2*l+1, 1);
      check(rx_sample[2*l] == el && rx_sample[2*l+1] == er,
            $sformatf("rx frame %0d line %0d: got %h/%h want %h/%h", rx_frames, l,
                      rx_sample[2*l], rx_sample[2*l+1], el, er));
    end
    if (last_rx_cyc >= 0)
      check(cyc - last_rx_cyc == longint'(2 * W * BCLK_DIV),
            $sformatf("frame period %0d cycles", cyc - last_rx_cyc));
    last_rx_cyc = cyc;
    rx_frames++;
  end

  // transmit side: change tx_sample right after each load
  always @(posedge clk) if (rst_n && tx_load) begin
    tx_frames++;
    for (int c = 0; c < NC; c++) tx_sample[c] <= pat(tx_frames, c, 2);
  end

  // bclk period and ws position relative to the frame
  longint last_bclk_rise = -1;
  always @(posedge bclk) if (rst_n && rx_frames < NFRAMES) begin
    if (last_bclk_rise >= 0)
      check(cyc - last_bclk_rise == longint'(BCLK_DIV), "bclk period");
    last_bclk_rise = cyc;
  end

  initial begin
    for (int c = 0; c < NC; c++) tx_sample[c] = pat(0, c, 2);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
  end

  // per line: fill the codec queue, then compare what the codec received.
  // Codec frame i was sent in transceiver frame i+1, which carried the
  // tx_sample value set after the (i+1)-th load: pattern index i+1.
  int lines_done = 0;
  for (genvar l = 0; l < NUM_LINES; l++) begin : g_line
    initial begin
      for (int f = 0; f < NFRAMES + 4; f++)
        g_codec[l].codec.tx_q.push_back({pat(f, 2*l, 1), pat(f, 2*l+1, 1)});
      wait (rx_frames == NFRAMES);
      repeat (2 * W * BCLK_DIV) @(posedge clk);
      check(g_codec[l].codec.rx_q.size() >= NFRAMES - 2, "codec received enough frames");
      for (int i = 0; i < NFRAMES - 2 && i < g_codec[l].codec.rx_q.size(); i++) begin
        logic [2*W-1:0] got, want;
        got  = g_codec[l].codec.rx_q[i];
        want = {pat(i + 1, 2*l, 2), pat(i + 1, 2*l+1, 2)};
        check(got == want, $sformatf("codec line %0d frame %0d: got %h want %h", l, i, got, want));
      end
      lines_done++;
    end
  end

  initial begin
    done_o = 1'b0;
    wait (lines_done == NUM_LINES);
    checks_o   = checks;
    failures_o = failures;
    done_o     = 1'b1;
  end

endmodule
