// axil_master_model: AXI4-Lite master for testbenches (plays the processing
// system). write() and read() perform one transaction each; inputs are
// driven at the falling clock edge and the slave's ready/valid are looked at
// shortly after it, so every handshake completes on a rising edge.
module axil_master_model
  import dsniff_pkg::*;
(
  input  logic      clk,
  output axil_req_t req,
  input  axil_rsp_t rsp
);

  initial req = '0;

  task automatic write(input logic [31:0] addr, input logic [31:0] data,
                       output axi_resp_e resp);
    @(negedge clk);
    req.awvalid = 1'b1;
    req.awaddr  = addr;
    req.wvalid  = 1'b1;
    req.wdata   = data;
    req.wstrb   = 4'hF;
    #1;
    while (!(rsp.awready && rsp.wready)) begin
      @(negedge clk); #1;
    end
    @(negedge clk);
    req.awvalid = 1'b0;
    req.wvalid  = 1'b0;
    req.bready  = 1'b1;
    #1;
    while (!rsp.bvalid) begin
      @(negedge clk); #1;
    end
    resp = rsp.bresp;
    @(negedge clk);
    req.bready = 1'b0;
  endtask

  task automatic read(input logic [31:0] addr, output logic [31:0] data,
                      output axi_resp_e resp);
    @(negedge clk);
    req.arvalid = 1'b1;
    req.araddr  = addr;
    #1;
    while (!rsp.arready) begin
      @(negedge clk); #1;
    end
    @(negedge clk);
    req.arvalid = 1'b0;
    req.rready  = 1'b1;
    #1;
    while (!rsp.rvalid) begin
      @(negedge clk); #1;
    end
    data = rsp.rdata;
    resp = rsp.rresp;
    @(negedge clk);
    req.rready = 1'b0;
  endtask

endmodule
