// tb_axil_interconnect: two register slaves behind the interconnect, each a
// small memory of 16 words that answers after random delays and tags its
// read data with its own number. The processing-system master model writes
// and reads back random words in both windows, mixed in random order, and
// the test checks that every value comes back from the right slave, that
// each slave saw only its own accesses, and that addresses outside both
// windows get DECERR (reads returning zero) without reaching a slave.
module tb_axil_interconnect;
  import dsniff_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  axil_req_t s_req, m_req [2];
  axil_rsp_t s_rsp, m_rsp [2];

  axil_interconnect #(.N_SLAVES(2), .BASE(32'h4000_0000)) dut (
    .clk(clk), .rst_n(rst_n), .s_req(s_req), .s_rsp(s_rsp), .m_req(m_req), .m_rsp(m_rsp));
  axil_master_model u_ps (.clk(clk), .req(s_req), .rsp(s_rsp));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- slave models ----------------
  logic [31:0] regs [2][16];
  int unsigned accesses [2];

  for (genvar s = 0; s < 2; s++) begin : g_slave
    // all outputs change at the falling edge, inputs are looked at on the rising one
    initial begin
      m_rsp[s] = '0;
      accesses[s] = 0;
      for (int i = 0; i < 16; i++) regs[s][i] = 32'h0;
      forever begin
        @(negedge clk);
        m_rsp[s].awready = 1'b0;
        m_rsp[s].wready  = 1'b0;
        m_rsp[s].arready = 1'b0;
        if (m_req[s].awvalid && m_req[s].wvalid && !m_rsp[s].bvalid && $urandom_range(2) == 0) begin
          m_rsp[s].awready = 1'b1;
          m_rsp[s].wready  = 1'b1;
          @(negedge clk);
          m_rsp[s].awready = 1'b0;
          m_rsp[s].wready  = 1'b0;
          regs[s][m_req[s].awaddr[5:2]] = m_req[s].wdata;
          accesses[s]++;
          if (m_req[s].awaddr[31:12] != 20'h40000 + 20'(s)) begin
            failures++;
            $display("FAIL: slave %0d got write address %h", s, m_req[s].awaddr);
          end
          repeat ($urandom_range(3)) @(negedge clk);
          m_rsp[s].bvalid = 1'b1;
          m_rsp[s].bresp  = RESP_OKAY;
          #1;
          while (!m_req[s].bready) begin
            @(negedge clk); #1;
          end
          @(negedge clk);
          m_rsp[s].bvalid = 1'b0;
        end else if (m_req[s].arvalid && $urandom_range(2) == 0) begin
          logic [31:0] a;
          m_rsp[s].arready = 1'b1;
          a = m_req[s].araddr;
          @(negedge clk);
          m_rsp[s].arready = 1'b0;
          accesses[s]++;
          if (a[31:12] != 20'h40000 + 20'(s)) begin
            failures++;
            $display("FAIL: slave %0d got read address %h", s, a);
          end
          repeat ($urandom_range(3)) @(negedge clk);
          m_rsp[s].rvalid = 1'b1;
          m_rsp[s].rdata  = regs[s][a[5:2]] ^ (32'(s) << 28);
          m_rsp[s].rresp  = RESP_OKAY;
          #1;
          while (!m_req[s].rready) begin
            @(negedge clk); #1;
          end
          @(negedge clk);
          m_rsp[s].rvalid = 1'b0;
        end
      end
    end
  end

  logic [31:0] model [2][16];

  initial begin
    axi_resp_e r;
    logic [31:0] d;
    int unsigned acc0, acc1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 2; s++) for (int i = 0; i < 16; i++) model[s][i] = '0;

    for (int n = 0; n < 300; n++) begin
      int s, i;
      logic [31:0] a;
      s = $urandom_range(1);
      i = $urandom_range(15);
      a = 32'h4000_0000 + 32'(s) * 32'h1000 + 32'(i) * 4;
      if ($urandom_range(1) == 0) begin
        d = $urandom;
        u_ps.write(a, d, r);
        model[s][i] = d;
        check(r == RESP_OKAY, $sformatf("write %h response %0d", a, r));
      end else begin
        u_ps.read(a, d, r);
        check(r == RESP_OKAY && d == (model[s][i] ^ (32'(s) << 28)),
              $sformatf("read %h got %h want %h", a, d, model[s][i] ^ (32'(s) << 28)));
      end
    end

    // unmapped: above the windows, below the base
    acc0 = accesses[0];
    acc1 = accesses[1];
    u_ps.write(32'h4000_2000, 32'h1234, r); check(r == RESP_DECERR, "write above windows DECERR");
    u_ps.read (32'h4000_2004, d, r);        check(r == RESP_DECERR && d == 0, "read above windows DECERR");
    u_ps.write(32'h3FFF_FFFC, 32'h1234, r); check(r == RESP_DECERR, "write below base DECERR");
    u_ps.read (32'h0000_0000, d, r);        check(r == RESP_DECERR, "read below base DECERR");
    repeat (10) @(negedge clk);
    check(accesses[0] == acc0 && accesses[1] == acc1, "unmapped accesses reach no slave");
    // still working afterwards
    u_ps.read(32'h4000_1000, d, r);
    check(r == RESP_OKAY && d == (model[1][0] ^ 32'h1000_0000), "read after DECERR");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
