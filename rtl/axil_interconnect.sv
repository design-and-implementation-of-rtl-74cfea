// axil_interconnect: one AXI4-Lite master to N_SLAVES register blocks.
//
// The processing system reaches the sniffer's registers through one
// AXI4-Lite port; this block routes each access by address to one register
// block. Slave i owns the 4 KiB window starting at BASE + i*0x1000 (slave 0
// the display check, slave 1 the VDMA in the sniffer top). An access outside
// all windows is answered with DECERR without reaching a slave.
//
// Writes and reads are handled independently, one of each at a time. A write
// is taken once address and data are both present; the address and data are
// registered and presented to the selected slave until it accepts them, and
// the slave's response is passed back. Reads work the same way. The thesis
// names the AXI interconnect as the component joining AXI masters and slaves;
// this minimal, registered form is this design's own.
//
// Timing: a write reaches the slave one cycle after the master's handshake,
// its response returns to the master in the cycle the slave gives it.
module axil_interconnect
  import dsniff_pkg::*;
#(
  parameter int unsigned  N_SLAVES = 2,
  parameter logic [31:0]  BASE     = 32'h0000_0000
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t s_req,
  output axil_rsp_t s_rsp,
  output axil_req_t m_req [N_SLAVES],
  input  axil_rsp_t m_rsp [N_SLAVES]
);

  localparam int unsigned SW = (N_SLAVES > 1) ? $clog2(N_SLAVES) : 1;

  typedef enum logic [1:0] {T_IDLE, T_ADDR, T_RESP, T_ERR} tstate_e;

  // Window decode: returns 1 and the index when the address is mapped.
  function automatic logic decode(input logic [31:0] a, output logic [SW-1:0] idx);
    logic [32:0] off;   // off[32] is the borrow: address below BASE
    off = {1'b0, a} - {1'b0, BASE};
    idx = SW'(off[31:12]);
    return !off[32] && (off[31:12] < 20'(N_SLAVES));
  endfunction

  // ------------------------------------------------------------------
  // Write path
  // ------------------------------------------------------------------
  tstate_e     wst;
  logic [SW-1:0] wsel;
  logic [31:0] waddr_q, wdata_q;
  logic [3:0]  wstrb_q;
  axi_resp_e   bresp_q;
  logic        w_take;
  logic        w_hit;
  logic [SW-1:0] w_idx;

  always_comb begin
    w_take = (wst == T_IDLE) && s_req.awvalid && s_req.wvalid;
    w_hit  = decode(s_req.awaddr, w_idx);
  end

  // ------------------------------------------------------------------
  // Read path
  // ------------------------------------------------------------------
  tstate_e     rst_q;
  logic [SW-1:0] rsel;
  logic [31:0] raddr_q, rdata_q;
  axi_resp_e   rresp_q;
  logic        r_take;
  logic        r_hit;
  logic [SW-1:0] r_idx;

  always_comb begin
    r_take = (rst_q == T_IDLE) && s_req.arvalid;
    r_hit  = decode(s_req.araddr, r_idx);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wst     <= T_IDLE;
      wsel    <= '0;
      waddr_q <= '0;
      wdata_q <= '0;
      wstrb_q <= '0;
      bresp_q <= RESP_OKAY;
      rst_q   <= T_IDLE;
      rsel    <= '0;
      raddr_q <= '0;
      rdata_q <= '0;
      rresp_q <= RESP_OKAY;
    end else begin
      // write
      unique case (wst)
        T_IDLE: if (w_take) begin
          waddr_q <= s_req.awaddr;
          wdata_q <= s_req.wdata;
          wstrb_q <= s_req.wstrb;
          wsel    <= w_idx;
          bresp_q <= RESP_DECERR;
          wst     <= w_hit ? T_ADDR : T_ERR;
        end
        T_ADDR: if (m_rsp[wsel].awready && m_rsp[wsel].wready) wst <= T_RESP;
        T_RESP: if (m_rsp[wsel].bvalid && s_req.bready) wst <= T_IDLE;
        T_ERR:  if (s_req.bready) wst <= T_IDLE;
        default: wst <= T_IDLE;
      endcase
      // read
      unique case (rst_q)
        T_IDLE: if (r_take) begin
          raddr_q <= s_req.araddr;
          rsel    <= r_idx;
          rresp_q <= RESP_DECERR;
          rdata_q <= '0;
          rst_q   <= r_hit ? T_ADDR : T_ERR;
        end
        T_ADDR: if (m_rsp[rsel].arready) rst_q <= T_RESP;
        T_RESP: if (m_rsp[rsel].rvalid && s_req.rready) rst_q <= T_IDLE;
        T_ERR:  if (s_req.rready) rst_q <= T_IDLE;
        default: rst_q <= T_IDLE;
      endcase
    end
  end

  always_comb begin
    for (int i = 0; i < N_SLAVES; i++) begin
      m_req[i]         = '0;
      m_req[i].awaddr  = waddr_q;
      m_req[i].wdata   = wdata_q;
      m_req[i].wstrb   = wstrb_q;
      m_req[i].araddr  = raddr_q;
      m_req[i].awvalid = (wst == T_ADDR) && (wsel == SW'(i));
      m_req[i].wvalid  = (wst == T_ADDR) && (wsel == SW'(i));
      m_req[i].bready  = (wst == T_RESP) && (wsel == SW'(i)) && s_req.bready;
      m_req[i].arvalid = (rst_q == T_ADDR) && (rsel == SW'(i));
      m_req[i].rready  = (rst_q == T_RESP) && (rsel == SW'(i)) && s_req.rready;
    end

    s_rsp         = '0;
    s_rsp.awready = w_take;
    s_rsp.wready  = w_take;
    s_rsp.bvalid  = (wst == T_ERR) || ((wst == T_RESP) && m_rsp[wsel].bvalid);
    s_rsp.bresp   = (wst == T_ERR) ? bresp_q : m_rsp[wsel].bresp;
    s_rsp.arready = r_take;
    s_rsp.rvalid  = (rst_q == T_ERR) || ((rst_q == T_RESP) && m_rsp[rsel].rvalid);
    s_rsp.rdata   = (rst_q == T_ERR) ? rdata_q : m_rsp[rsel].rdata;
    s_rsp.rresp   = (rst_q == T_ERR) ? rresp_q : m_rsp[rsel].rresp;
  end

endmodule
