// i2s_transceiver -- I2S bus master with any sample bit depth and any number
// of data lines.
//
// The transceiver drives the bit clock (bclk_o) and the word select (ws_o)
// towards the audio codec, shifts received bits in from every sd_rx_i line
// and shifts transmit bits out on every sd_tx_o line.  All lines share the
// one bclk/ws pair, so each extra stereo channel pair costs one pin per
// direction.  One frame holds 2*BIT_DEPTH bit clocks (left slot with ws=0,
// then right slot with ws=1), i.e. f_bclk = fs * 2 * BIT_DEPTH.
//
// Timing follows the Philips I2S format: ws and sd_tx change on the falling
// edge of bclk, ws changes one bit clock before the MSB of a slot, data is
// sent MSB first, and sd_rx is sampled on the rising edge of bclk.
// bclk is made by dividing clk by BCLK_DIV (low for BCLK_DIV-BCLK_DIV/2
// clk cycles, high for BCLK_DIV/2), so everything runs in the single clk
// domain.  The defaults give 768 kHz with 16-bit samples from a
// 122.88 MHz clk (bclk 24.576 MHz), the fastest configuration of the flow.
//
// Parallel side:
//   * rx_sample_o / rx_valid_o: at the end of each received frame (after the
//     rising edge that samples the last right-channel bit) all channels are
//     presented together with a one-cycle rx_valid_o pulse.  They are held
//     until the next frame ends.
//   * tx_sample_i is captured on the first falling bclk edge of each frame
//     (tx_load_o pulses in that cycle) and sent during that frame.
// Channel c of line l is index 2*l+c (c=0 left, c=1 right).
// A frame is therefore available on the parallel side one frame after its
// first bit arrived: the transceiver itself adds one sample of delay.
//
// Design choices not taken from the flow: the single-clock divider, reset
// values, sampling sd_rx without a synchroniser (bclk is produced here, so
// the data returned by the codec is in phase with it).
module i2s_transceiver
#(
  parameter int unsigned BIT_DEPTH = 16,   // bits per sample and per slot
  parameter int unsigned NUM_LINES = 1,    // I2S data lines per direction
  parameter int unsigned BCLK_DIV  = 5     // clk cycles per bclk period (>= 2)
) (
  input  logic                                      clk,
  input  logic                                      rst_n,
  // I2S pins
  output logic                                      bclk_o,
  output logic                                      ws_o,
  input  logic [NUM_LINES-1:0]                      sd_rx_i,
  output logic [NUM_LINES-1:0]                      sd_tx_o,
  // parallel side
  output logic [2*NUM_LINES-1:0][BIT_DEPTH-1:0]     rx_sample_o,
  output logic                                      rx_valid_o,
  input  logic [2*NUM_LINES-1:0][BIT_DEPTH-1:0]     tx_sample_i,
  output logic                                      tx_load_o
);

  localparam int unsigned FRAME_BITS = 2 * BIT_DEPTH;
  localparam int unsigned LOW_CYC    = BCLK_DIV - BCLK_DIV / 2;
  localparam int unsigned CNT_W      = $clog2(BCLK_DIV + 1);
  localparam int unsigned POS_W      = $clog2(FRAME_BITS);

  if (BCLK_DIV < 2)  begin : g_bad_div   $error("BCLK_DIV must be at least 2"); end
  if (BIT_DEPTH < 2) begin : g_bad_depth $error("BIT_DEPTH must be at least 2"); end

  logic [CNT_W-1:0] cnt;
  logic [POS_W-1:0] pos;        // bit position inside the frame
  logic [POS_W-1:0] pos_next;
  logic             fall_tick;  // bclk falls at this clk edge
  logic             rise_tick;  // bclk rises at this clk edge

  logic [NUM_LINES-1:0][FRAME_BITS-1:0] tx_shift;
  logic [NUM_LINES-1:0][FRAME_BITS-1:0] rx_shift;

  assign fall_tick = (cnt == CNT_W'(BCLK_DIV - 1));
  assign rise_tick = (cnt == CNT_W'(LOW_CYC - 1));
  assign pos_next  = (pos == POS_W'(FRAME_BITS - 1)) ? '0 : pos + 1'b1;

  // Bit clock, word select and frame position.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= CNT_W'(LOW_CYC);          // start in the high phase: first event is a fall
      bclk_o <= 1'b1;
      ws_o   <= 1'b0;
      pos    <= POS_W'(FRAME_BITS - 1);   // first fall begins frame position 0
    end else begin
      cnt <= fall_tick ? '0 : cnt + 1'b1;
      if (fall_tick) begin
        bclk_o <= 1'b0;
        pos    <= pos_next;
        // ws leads the slot by one bit clock
        ws_o   <= (pos_next >= POS_W'(BIT_DEPTH - 1)) && (pos_next != POS_W'(FRAME_BITS - 1));
      end else if (rise_tick) begin
        bclk_o <= 1'b1;
      end
    end
  end

  // Transmit: load a whole frame at its first falling edge, shift MSB first.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_shift  <= '0;
      tx_load_o <= 1'b0;
    end else begin
      tx_load_o <= 1'b0;
      if (fall_tick) begin
        for (int l = 0; l < NUM_LINES; l++) begin
          if (pos_next == '0) tx_shift[l] <= {tx_sample_i[2*l], tx_sample_i[2*l+1]};
          else                tx_shift[l] <= {tx_shift[l][FRAME_BITS-2:0], 1'b0};
        end
        if (pos_next == '0) tx_load_o <= 1'b1;
      end
    end
  end

  always_comb begin
    for (int l = 0; l < NUM_LINES; l++) sd_tx_o[l] = tx_shift[l][FRAME_BITS-1];
  end

  // Receive: sample on every rising edge, publish the frame after its last bit.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_shift    <= '0;
      rx_sample_o <= '0;
      rx_valid_o  <= 1'b0;
    end else begin
      rx_valid_o <= 1'b0;
      if (rise_tick) begin
        for (int l = 0; l < NUM_LINES; l++) begin
          rx_shift[l] <= {rx_shift[l][FRAME_BITS-2:0], sd_rx_i[l]};
          if (pos == POS_W'(FRAME_BITS - 1)) begin
            rx_sample_o[2*l]   <= rx_shift[l][FRAME_BITS-2:BIT_DEPTH-1];
            rx_sample_o[2*l+1] <= {rx_shift[l][BIT_DEPTH-2:0], sd_rx_i[l]};
          end
        end
        if (pos == POS_W'(FRAME_BITS - 1)) rx_valid_o <= 1'b1;
      end
    end
  end

endmodule
