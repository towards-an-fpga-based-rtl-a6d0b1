// i2s_codec_model -- behavioural model of the I2S port of an audio codec
// (one data line, codec is bus slave).  Not synthesizable.
//
// The codec follows bclk and ws driven by the FPGA.  It samples ws on the
// rising edge of bclk; a change of ws announces a new slot whose MSB goes
// out on the next falling edge (ADC side, sd_o) and is sampled on the next
// rising edge (DAC side, sd_i).  ws = 0 is the left slot, 1 the right one.
// The model waits for the first left slot before it sends or records
// anything, so its frame n is always a whole frame.
//
// Test side: frames to send are queued in tx_q ({left, right}); an empty
// queue sends zeros.  Received frames are appended to rx_q, with the
// simulation time of the MSB of each sent / received frame in
// tx_time_q / rx_time_q.
module i2s_codec_model #(
  parameter int unsigned W = 16
) (
  input  logic bclk,
  input  logic ws,
  output logic sd_o,    // towards the FPGA (ADC data)
  input  logic sd_i     // from the FPGA (DAC data)
);

  logic [2*W-1:0] tx_q[$];
  logic [2*W-1:0] rx_q[$];
  time            tx_time_q[$];
  time            rx_time_q[$];

  logic           ws_prev  = 1'b0;
  logic           started  = 1'b0;
  logic           tx_pend  = 1'b0;   // a slot starts at the next falling edge
  logic           tx_slot  = 1'b0;
  int             tx_cnt   = 0;
  logic [W-1:0]   tx_bits  = '0;
  logic [W-1:0]   tx_right = '0;
  logic           rx_act   = 1'b0;
  logic           rx_slot  = 1'b0;
  int             rx_cnt   = 0;
  logic [W-1:0]   rx_bits  = '0;
  logic [W-1:0]   rx_left  = '0;

  initial sd_o = 1'b0;

  always @(posedge bclk) begin
    // receive: shift in the bit of the current slot
    if (rx_act) begin
      rx_bits = {rx_bits[W-2:0], sd_i};
      rx_cnt++;
      if (rx_slot == 1'b0 && rx_cnt == 1) rx_time_q.push_back($time);
      if (rx_cnt == W) begin
        rx_act = 1'b0;
        if (rx_slot == 1'b0) rx_left = rx_bits;
        else                 rx_q.push_back({rx_left, rx_bits});
      end
    end
    if (ws != ws_prev) begin
      if (ws == 1'b0) started = 1'b1;
      if (started) begin
        rx_act  = 1'b1;
        rx_slot = ws;
        rx_cnt  = 0;
        tx_pend = 1'b1;
        tx_slot = ws;
      end
    end
    ws_prev = ws;
  end

  always @(negedge bclk) begin
    if (tx_pend) begin
      tx_pend = 1'b0;
      tx_cnt  = W;
      if (tx_slot == 1'b0) begin
        logic [2*W-1:0] f;
        f = (tx_q.size() > 0) ? tx_q.pop_front() : '0;
        tx_bits  = f[2*W-1:W];
        tx_right = f[W-1:0];
        tx_time_q.push_back($time);
      end else begin
        tx_bits = tx_right;
      end
    end
    if (tx_cnt > 0) begin
      sd_o    <= tx_bits[W-1];
      tx_bits = {tx_bits[W-2:0], 1'b0};
      tx_cnt--;
    end else begin
      sd_o <= 1'b0;
    end
  end

endmodule
