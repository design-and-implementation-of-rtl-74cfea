// axil_reg_if: AXI4-Lite slave front end for a small register block.
//
// Turns AXI4-Lite transactions into single-cycle register strobes. A write is
// accepted when both its address and its data are present (AWREADY and WREADY
// rise together for one cycle) and no response is waiting; wr_en then pulses
// with wr_addr, wr_data and wr_strb, and BVALID rises in the next cycle with
// an OKAY response. A read is accepted when ARVALID is high and no read data
// is waiting; rd_en pulses with rd_addr, the register block returns rd_data
// combinationally in that cycle, and RVALID rises in the next cycle holding
// it. Only the low ADDR_W address bits are passed on. One write and one read
// may be in flight at a time. The structure is this design's own; the thesis
// gives only that the processing system reads the registers over AXI.
module axil_reg_if
  import dsniff_pkg::*;
#(
  parameter int unsigned ADDR_W = 12
) (
  input  logic               clk,
  input  logic               rst_n,
  input  axil_req_t          req,
  output axil_rsp_t          rsp,
  output logic               wr_en,
  output logic [ADDR_W-1:0]  wr_addr,
  output logic [AXIL_DW-1:0] wr_data,
  output logic [3:0]         wr_strb,
  output logic               rd_en,
  output logic [ADDR_W-1:0]  rd_addr,
  input  logic [AXIL_DW-1:0] rd_data
);

  logic               bvalid_q, rvalid_q;
  logic [AXIL_DW-1:0] rdata_q;

  always_comb begin
    wr_en   = req.awvalid && req.wvalid && !bvalid_q;
    wr_addr = req.awaddr[ADDR_W-1:0];
    wr_data = req.wdata;
    wr_strb = req.wstrb;
    rd_en   = req.arvalid && !rvalid_q;
    rd_addr = req.araddr[ADDR_W-1:0];

    rsp         = '0;
    rsp.awready = wr_en;
    rsp.wready  = wr_en;
    rsp.bvalid  = bvalid_q;
    rsp.bresp   = RESP_OKAY;
    rsp.arready = rd_en;
    rsp.rvalid  = rvalid_q;
    rsp.rdata   = rdata_q;
    rsp.rresp   = RESP_OKAY;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bvalid_q <= 1'b0;
      rvalid_q <= 1'b0;
      rdata_q  <= '0;
    end else begin
      if (wr_en)                       bvalid_q <= 1'b1;
      else if (bvalid_q && req.bready) bvalid_q <= 1'b0;
      if (rd_en) begin
        rvalid_q <= 1'b1;
        rdata_q  <= rd_data;
      end else if (rvalid_q && req.rready) begin
        rvalid_q <= 1'b0;
      end
    end
  end

  // AXI rule: a response, once valid, stays valid until taken.
  a_bvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    bvalid_q && !req.bready |=> bvalid_q);
  a_rvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    rvalid_q && !req.rready |=> rvalid_q && $stable(rdata_q));

endmodule
