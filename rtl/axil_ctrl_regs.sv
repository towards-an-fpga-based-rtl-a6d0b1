// axil_ctrl_regs -- control state of the FAUST IP, written by the ARM
// processor over an AXI4-Lite slave port.
//
// The DSP program's control-rate part runs on the ARM: it reads the
// physical or software controllers, computes the values that depend on them
// (for the sine oscillator: th, sin(th), cos(th)) and writes the results as
// the fControl[] array into this block, over and over, as fast as it can.
// The FAUST IP reads ctrl_o and takes a copy at the start of every sample
// computation, so a sample never sees a half-updated word.
//
// Register map (byte addresses, 32-bit words):
//   0x00 + 4*i  fControl[i], i < CTRL_WORDS   read/write, byte strobes honoured
//   0x80        samples computed              read only
//   0x84        overruns                      read only
//   0x88        cycles of the last computation read only
// A write to a read-only or unmapped address, and a read of an unmapped
// address, answer SLVERR (reads then return 0).  Control words reset to 0.
//
// Handshakes: a write is taken in the cycle where awvalid and wvalid are
// both high and no write response is pending (awready = wready in that
// cycle); bvalid follows one cycle later and stays until bready.  A read
// address is taken while no read data is pending; rvalid follows one cycle
// later and stays until rready.  The register map, reset values and error
// responses are this design's choices.
module axil_ctrl_regs
  import syfala_pkg::*;
#(
  parameter int unsigned ADDR_W     = 8,
  parameter int unsigned CTRL_WORDS = 3
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // AXI4-Lite slave
  input  logic [ADDR_W-1:0]            s_awaddr,
  input  logic                         s_awvalid,
  output logic                         s_awready,
  input  logic [31:0]                  s_wdata,
  input  logic [3:0]                   s_wstrb,
  input  logic                         s_wvalid,
  output logic                         s_wready,
  output logic [1:0]                   s_bresp,
  output logic                         s_bvalid,
  input  logic                         s_bready,
  input  logic [ADDR_W-1:0]            s_araddr,
  input  logic                         s_arvalid,
  output logic                         s_arready,
  output logic [31:0]                  s_rdata,
  output logic [1:0]                   s_rresp,
  output logic                         s_rvalid,
  input  logic                         s_rready,
  // to and from the FAUST IP
  output ctrl_word_t [CTRL_WORDS-1:0]  ctrl_o,
  input  logic [31:0]                  samples_i,
  input  logic [31:0]                  overruns_i,
  input  logic [31:0]                  comp_cycles_i
);

  if (4 * CTRL_WORDS > 'h80) begin : g_bad_words $error("CTRL_WORDS overlaps the status registers"); end
  if (ADDR_W < 8)            begin : g_bad_addr  $error("ADDR_W must be at least 8"); end

  localparam logic [ADDR_W-1:0] A_SAMPLES  = ADDR_W'('h80);
  localparam logic [ADDR_W-1:0] A_OVERRUNS = ADDR_W'('h84);
  localparam logic [ADDR_W-1:0] A_CYCLES   = ADDR_W'('h88);

  logic                  wr_fire, rd_fire;
  logic [ADDR_W-3:0]     wr_word, rd_word;

  assign s_awready = s_awvalid && s_wvalid && !s_bvalid;
  assign s_wready  = s_awready;
  assign wr_fire   = s_awready;
  assign wr_word   = s_awaddr[ADDR_W-1:2];

  assign s_arready = !s_rvalid;
  assign rd_fire   = s_arvalid && s_arready;
  assign rd_word   = s_araddr[ADDR_W-1:2];

  // Write channel
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl_o   <= '0;
      s_bvalid <= 1'b0;
      s_bresp  <= AXI_RESP_OKAY;
    end else begin
      if (s_bvalid && s_bready) s_bvalid <= 1'b0;
      if (wr_fire) begin
        s_bvalid <= 1'b1;
        if (32'(wr_word) < CTRL_WORDS) begin
          for (int b = 0; b < 4; b++)
            if (s_wstrb[b]) ctrl_o[wr_word][8*b +: 8] <= s_wdata[8*b +: 8];
          s_bresp <= AXI_RESP_OKAY;
        end else begin
          s_bresp <= AXI_RESP_SLVERR;
        end
      end
    end
  end

  // Read channel
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_rvalid <= 1'b0;
      s_rdata  <= '0;
      s_rresp  <= AXI_RESP_OKAY;
    end else begin
      if (s_rvalid && s_rready) s_rvalid <= 1'b0;
      if (rd_fire) begin
        s_rvalid <= 1'b1;
        s_rresp  <= AXI_RESP_OKAY;
        if (32'(rd_word) < CTRL_WORDS)          s_rdata <= ctrl_o[rd_word];
        else if ({rd_word, 2'b00} == A_SAMPLES)  s_rdata <= samples_i;
        else if ({rd_word, 2'b00} == A_OVERRUNS) s_rdata <= overruns_i;
        else if ({rd_word, 2'b00} == A_CYCLES)   s_rdata <= comp_cycles_i;
        else begin
          s_rdata <= '0;
          s_rresp <= AXI_RESP_SLVERR;
        end
      end
    end
  end

  // AXI rule: a valid, once raised, stays high until its handshake.
  a_aw_stable: assert property (@(posedge clk) disable iff (!rst_n) s_awvalid && !s_awready |=> s_awvalid);
  a_w_stable:  assert property (@(posedge clk) disable iff (!rst_n) s_wvalid  && !s_wready  |=> s_wvalid);
  a_ar_stable: assert property (@(posedge clk) disable iff (!rst_n) s_arvalid && !s_arready |=> s_arvalid);

endmodule
