// tb_axil_ctrl_regs -- self-checking test of the control register block.
//
// A behavioural AXI4-Lite master writes random words, with full and partial
// byte strobes, to the control words and reads them back; ctrl_o is
// compared with a reference copy kept here.  The status words must read
// the values on the status inputs, writes to them and accesses to unmapped
// addresses must answer SLVERR without changing any control word.
module tb_axil_ctrl_regs;
  import syfala_pkg::*;
  localparam int AW = 8, NW = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [AW-1:0] awaddr, araddr;
  logic awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [31:0] wdata, rdata;
  logic [3:0] wstrb;
  logic [1:0] bresp, rresp;
  ctrl_word_t [NW-1:0] ctrl;
  logic [31:0] samples = 32'h1234_5678, overruns = 32'd7, cycles = 32'd2;

  axil_ctrl_regs #(.ADDR_W(AW), .CTRL_WORDS(NW)) dut (
    .clk, .rst_n,
    .s_awaddr(awaddr), .s_awvalid(awvalid), .s_awready(awready),
    .s_wdata(wdata), .s_wstrb(wstrb), .s_wvalid(wvalid), .s_wready(wready),
    .s_bresp(bresp), .s_bvalid(bvalid), .s_bready(bready),
    .s_araddr(araddr), .s_arvalid(arvalid), .s_arready(arready),
    .s_rdata(rdata), .s_rresp(rresp), .s_rvalid(rvalid), .s_rready(rready),
    .ctrl_o(ctrl), .samples_i(samples), .overruns_i(overruns), .comp_cycles_i(cycles)
  );

  axil_master_model #(.ADDR_W(AW)) arm (
    .clk, .awaddr, .awvalid, .awready, .wdata, .wstrb, .wvalid, .wready,
    .bresp, .bvalid, .bready, .araddr, .arvalid, .arready, .rdata, .rresp, .rvalid, .rready
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [31:0] ref_w [NW];

  task automatic check_all(input string when);
    for (int i = 0; i < NW; i++)
      check(ctrl[i] == ref_w[i], $sformatf("%s: ctrl[%0d] %h want %h", when, i, ctrl[i], ref_w[i]));
  endtask

  initial begin
    logic [1:0] resp;
    logic [31:0] d;
    for (int i = 0; i < NW; i++) ref_w[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    check_all("after reset");
    for (int n = 0; n < 60; n++) begin
      int idx;
      logic [31:0] v;
      logic [3:0] s;
      idx = $urandom_range(0, NW - 1);
      v   = $urandom;
      s   = (n % 3 == 0) ? 4'($urandom) : 4'hF;
      arm.write(AW'(4 * idx), v, s, resp);
      check(resp == AXI_RESP_OKAY, "write OKAY");
      for (int b = 0; b < 4; b++) if (s[b]) ref_w[idx][8*b +: 8] = v[8*b +: 8];
      check_all($sformatf("after write %0d", n));
      arm.read(AW'(4 * idx), d, resp);
      check(resp == AXI_RESP_OKAY && d == ref_w[idx], $sformatf("read back %h want %h", d, ref_w[idx]));
    end
    arm.read(8'h80, d, resp); check(resp == AXI_RESP_OKAY && d == samples,  "samples");
    arm.read(8'h84, d, resp); check(resp == AXI_RESP_OKAY && d == overruns, "overruns");
    arm.read(8'h88, d, resp); check(resp == AXI_RESP_OKAY && d == cycles,   "cycles");
    arm.write(8'h80, 32'hdead_beef, 4'hF, resp); check(resp == AXI_RESP_SLVERR, "write to status: SLVERR");
    arm.write(8'h0C, 32'hdead_beef, 4'hF, resp); check(resp == AXI_RESP_SLVERR, "write unmapped: SLVERR");
    check_all("after rejected writes");
    arm.read(8'h40, d, resp); check(resp == AXI_RESP_SLVERR && d == 0, "read unmapped: SLVERR");
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
