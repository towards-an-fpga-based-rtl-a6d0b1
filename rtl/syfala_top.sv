// syfala_top -- programmable-logic side of the low-latency audio system.
//
// Audio path: codec ADC -> I2S -> i2s_transceiver -> faust_ip -> i2s_transceiver
// -> I2S -> codec DAC.  Every received frame triggers one computation of the
// DSP program in faust_ip; its result goes back to the codec in the frame
// after next.  From the first bit of a frame on sd_rx to the first bit of the
// corresponding result on sd_tx the chain adds exactly two frames: one for
// deserialising in the transceiver and one for the FAUST IP (see the
// module headers).  With the defaults (16-bit samples, 768 kHz frames,
// bclk = clk/5 with clk = 122.88 MHz) that is 2.6 us.
//
// Control path: the ARM processor, which is not part of this RTL, runs the
// control-rate part of the program and writes its results through the
// AXI4-Lite port s_axil_* into axil_ctrl_regs; faust_ip samples them once per
// audio sample.  The same port reads back sample, overrun and cycle counters.
//
// Ports: clk/rst_n (active-low asynchronous reset), the I2S pins (one
// bclk/ws pair shared by NUM_LINES data lines per direction), the AXI4-Lite
// slave, and overrun_o, a one-cycle pulse for every sample the DSP program
// could not finish in time.  The external DDR memory of the original system
// is not connected: the DSP programs provided here keep all their state on
// chip.
//
// Defaults follow the fastest configuration of the system (768 kHz, 16-bit
// samples, 2 inputs and 2 outputs) and the sine oscillator example program.
module syfala_top
  import syfala_pkg::*;
#(
  parameter faust_prog_e PROGRAM    = PROG_NLF2_OSC,
  parameter int unsigned BIT_DEPTH  = 16,
  parameter int unsigned NUM_LINES  = 1,
  parameter int unsigned BCLK_DIV   = 5,
  parameter int unsigned CTRL_WORDS = 3,
  parameter int unsigned ADDR_W     = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // I2S to the codec
  output logic                 i2s_bclk_o,
  output logic                 i2s_ws_o,
  input  logic [NUM_LINES-1:0] i2s_sd_rx_i,
  output logic [NUM_LINES-1:0] i2s_sd_tx_o,
  // AXI4-Lite from the ARM processor
  input  logic [ADDR_W-1:0]    s_axil_awaddr,
  input  logic                 s_axil_awvalid,
  output logic                 s_axil_awready,
  input  logic [31:0]          s_axil_wdata,
  input  logic [3:0]           s_axil_wstrb,
  input  logic                 s_axil_wvalid,
  output logic                 s_axil_wready,
  output logic [1:0]           s_axil_bresp,
  output logic                 s_axil_bvalid,
  input  logic                 s_axil_bready,
  input  logic [ADDR_W-1:0]    s_axil_araddr,
  input  logic                 s_axil_arvalid,
  output logic                 s_axil_arready,
  output logic [31:0]          s_axil_rdata,
  output logic [1:0]           s_axil_rresp,
  output logic                 s_axil_rvalid,
  input  logic                 s_axil_rready,
  // status
  output logic                 overrun_o
);

  localparam int unsigned NUM_CH = 2 * NUM_LINES;

  logic [NUM_CH-1:0][BIT_DEPTH-1:0] rx_sample, tx_sample;
  logic                             rx_valid, tx_load;
  ctrl_word_t [CTRL_WORDS-1:0]      ctrl;
  logic [31:0]                      samples, overruns, comp_cycles;

  i2s_transceiver #(
    .BIT_DEPTH (BIT_DEPTH),
    .NUM_LINES (NUM_LINES),
    .BCLK_DIV  (BCLK_DIV)
  ) u_i2s (
    .clk, .rst_n,
    .bclk_o      (i2s_bclk_o),
    .ws_o        (i2s_ws_o),
    .sd_rx_i     (i2s_sd_rx_i),
    .sd_tx_o     (i2s_sd_tx_o),
    .rx_sample_o (rx_sample),
    .rx_valid_o  (rx_valid),
    .tx_sample_i (tx_sample),
    .tx_load_o   (tx_load)
  );

  faust_ip #(
    .PROGRAM    (PROGRAM),
    .NUM_CH     (NUM_CH),
    .SAMPLE_W   (BIT_DEPTH),
    .CTRL_WORDS (CTRL_WORDS)
  ) u_faust (
    .clk, .rst_n,
    .sample_tick_i (rx_valid),
    .in_i          (rx_sample),
    .ctrl_i        (ctrl),
    .out_o         (tx_sample),
    .overrun_o     (overrun_o),
    .samples_o     (samples),
    .overruns_o    (overruns),
    .comp_cycles_o (comp_cycles)
  );

  axil_ctrl_regs #(
    .ADDR_W     (ADDR_W),
    .CTRL_WORDS (CTRL_WORDS)
  ) u_ctrl (
    .clk, .rst_n,
    .s_awaddr  (s_axil_awaddr),
    .s_awvalid (s_axil_awvalid),
    .s_awready (s_axil_awready),
    .s_wdata   (s_axil_wdata),
    .s_wstrb   (s_axil_wstrb),
    .s_wvalid  (s_axil_wvalid),
    .s_wready  (s_axil_wready),
    .s_bresp   (s_axil_bresp),
    .s_bvalid  (s_axil_bvalid),
    .s_bready  (s_axil_bready),
    .s_araddr  (s_axil_araddr),
    .s_arvalid (s_axil_arvalid),
    .s_arready (s_axil_arready),
    .s_rdata   (s_axil_rdata),
    .s_rresp   (s_axil_rresp),
    .s_rvalid  (s_axil_rvalid),
    .s_rready  (s_axil_rready),
    .ctrl_o        (ctrl),
    .samples_i     (samples),
    .overruns_i    (overruns),
    .comp_cycles_i (comp_cycles)
  );

  // The transceiver loads tx_sample at frame start; the FAUST IP must not
  // change its output in that very cycle (it changes only on rx_valid).
  a_no_load_race: assert property (@(posedge clk) disable iff (!rst_n) !(tx_load && rx_valid));

endmodule
