// AXI4-Lite master model for the testbenches: plays the processor's part.
// write(addr, data) and read(addr, data) are blocking tasks called by
// hierarchical reference; each completes one transaction with full
// handshakes, synchronous to clk.
module axil_bfm
  import rfid_pkg::*;
(
  input  logic      clk,
  output axil_req_t req,
  input  axil_rsp_t rsp
);
  initial req = '0;

  task automatic write(input logic [3:0] addr, input logic [31:0] data);
    @(posedge clk);
    req.awvalid <= 1'b1; req.awaddr <= addr;
    req.wvalid  <= 1'b1; req.wdata  <= data; req.wstrb <= 4'hF;
    req.bready  <= 1'b1;
    fork
      begin do @(posedge clk); while (!rsp.awready); req.awvalid <= 1'b0; end
      begin do @(posedge clk); while (!rsp.wready);  req.wvalid  <= 1'b0; end
    join
    while (!rsp.bvalid) @(posedge clk);
    @(posedge clk);
    req.bready <= 1'b0;
  endtask

  task automatic read(input logic [3:0] addr, output logic [31:0] data);
    @(posedge clk);
    req.arvalid <= 1'b1; req.araddr <= addr; req.rready <= 1'b1;
    do @(posedge clk); while (!rsp.arready);
    req.arvalid <= 1'b0;
    while (!rsp.rvalid) @(posedge clk);
    data = rsp.rdata;
    @(posedge clk);
    req.rready <= 1'b0;
  endtask
endmodule
