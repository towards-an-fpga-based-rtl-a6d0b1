// axil_master_model -- behavioural AXI4-Lite master standing in for the ARM
// processor's general-purpose port.  Not synthesizable.
//
// write(addr, data, strb, resp) presents address and data (with a random
// offset of 0-2 cycles between the two valids), waits for both handshakes
// and for the response.  read(addr, data, resp) does the same for a read.
// bready/rready are held low for a random 0-2 cycles to exercise the
// slave's wait on the response channels.
module axil_master_model #(
  parameter int unsigned ADDR_W = 8
) (
  input  logic              clk,
  output logic [ADDR_W-1:0] awaddr,
  output logic              awvalid,
  input  logic              awready,
  output logic [31:0]       wdata,
  output logic [3:0]        wstrb,
  output logic              wvalid,
  input  logic              wready,
  input  logic [1:0]        bresp,
  input  logic              bvalid,
  output logic              bready,
  output logic [ADDR_W-1:0] araddr,
  output logic              arvalid,
  input  logic              arready,
  input  logic [31:0]       rdata,
  input  logic [1:0]        rresp,
  input  logic              rvalid,
  output logic              rready
);

  initial begin
    awvalid = 1'b0; wvalid = 1'b0; bready = 1'b0; arvalid = 1'b0; rready = 1'b0;
    awaddr = '0; wdata = '0; wstrb = '0; araddr = '0;
  end

  task automatic write(input logic [ADDR_W-1:0] addr, input logic [31:0] data,
                       input logic [3:0] strb, output logic [1:0] resp);
    bit aw_done = 0, w_done = 0;
    int gap;
    gap = $urandom_range(0, 2);
    @(negedge clk);
    awaddr = addr; awvalid = 1'b1;
    wdata  = data; wstrb   = strb;
    if (gap == 0) wvalid = 1'b1;
    while (!(aw_done && w_done)) begin
      @(posedge clk);
      if (awvalid && awready) aw_done = 1;
      if (wvalid && wready)   w_done  = 1;
      @(negedge clk);
      if (aw_done) awvalid = 1'b0;
      if (w_done)  wvalid  = 1'b0;
      if (gap > 0) begin gap--; if (gap == 0 && !w_done) wvalid = 1'b1; end
    end
    repeat ($urandom_range(0, 2)) @(negedge clk);
    bready = 1'b1;
    do @(posedge clk); while (!bvalid);
    resp = bresp;
    @(negedge clk);
    bready = 1'b0;
  endtask

  task automatic read(input logic [ADDR_W-1:0] addr, output logic [31:0] data,
                      output logic [1:0] resp);
    @(negedge clk);
    araddr = addr; arvalid = 1'b1;
    do @(posedge clk); while (!arready);
    @(negedge clk);
    arvalid = 1'b0;
    repeat ($urandom_range(0, 2)) @(negedge clk);
    rready = 1'b1;
    do @(posedge clk); while (!rvalid);
    data = rdata;
    resp = rresp;
    @(negedge clk);
    rready = 1'b0;
  endtask

endmodule
