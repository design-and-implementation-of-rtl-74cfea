// tb_dsniff_resolutions: the sniffer at its default parameters (RGB888) on
// the display sizes of the thesis's measurements: 100x100, 200x200, 500x400,
// 600x400 and 960x544. One copy of the design per size runs side by side,
// each with its own display, memory and register master. Each display has
// porches of 16 + 8 + 16 pixels per line and 2 + 2 + 2 lines per frame, a
// pixel clock at one sixth of the system clock and colour lines settling
// late after each clock edge.
//
// For each size the software sequence is the one of a real capture: wait
// for the display to be identified, check the resolution and totals read,
// program the frame writer from them (stride one line, rounded up to a
// multiple of 8 bytes), capture one frame,
// stop, and compare every byte of the frame in memory with the pixels sent.
// No error may be flagged and no AXI rule broken.
module tb_dsniff_resolutions;
  import dsniff_pkg::*;

  localparam int N = 5;
  localparam int unsigned WS [N] = '{100, 200, 500, 600, 960};
  localparam int unsigned HS [N] = '{100, 200, 400, 400, 544};
  localparam int unsigned BASE = 32'h0000_0040;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (25_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [23:0] pix(int unsigned f, int unsigned x, int unsigned y);
    return {8'(x * 3 + f), 8'(y * 5 + 1), 8'(x ^ (y << 2))};
  endfunction

  bit done [N];

  initial begin
    for (int i = 0; i < N; i++) done[i] = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
  end

  for (genvar i = 0; i < N; i++) begin : g_res
    localparam int unsigned HA = WS[i], VA = HS[i];
    localparam int unsigned HT = HA + 40, VT = VA + 6;
    localparam int unsigned MEM = BASE + (HA * 3 + 7) / 8 * 8 * VA + 64;

    logic        pclk, de, hsync, vsync;
    logic [23:0] data;
    int unsigned frames_sent;

    dpi_source_model #(
      .H_ACTIVE(HA), .H_FP(16), .H_SYNC(8), .H_BP(16),
      .V_ACTIVE(VA), .V_FP(2), .V_SYNC(2), .V_BP(2),
      .PCLK_PERIOD(60), .SETTLE(2), .DATA_LAG(27)
    ) u_src (
      .enable(1'b1), .pclk(pclk), .de(de), .hsync(hsync), .vsync(vsync),
      .data(data), .frames_sent(frames_sent));

    axil_req_t   s_req;
    axil_rsp_t   s_rsp;
    axi_wr_req_t mreq;
    axi_wr_rsp_t mrsp;
    logic        frame_done;

    dsniff_top dut (
      .clk(clk), .rst_n(rst_n),
      .dpi_pclk(pclk), .dpi_de(de), .dpi_hsync(hsync), .dpi_vsync(vsync), .dpi_data(data),
      .s_axil_req(s_req), .s_axil_rsp(s_rsp),
      .m_axi_req(mreq), .m_axi_rsp(mrsp),
      .frame_done(frame_done));

    axi_mem_model #(.MEM_BYTES(MEM), .STALL_PCT(25)) u_mem (
      .clk(clk), .rst_n(rst_n), .req(mreq), .rsp(mrsp),
      .force_stall(1'b0), .err_resp(1'b0));
    axil_master_model u_ps (.clk(clk), .req(s_req), .rsp(s_rsp));

    int unsigned done_cnt = 0;
    always @(posedge clk) if (rst_n && frame_done) done_cnt++;

    initial begin
      logic [31:0] d, w, h, stride;
      axi_resp_e   r;
      int unsigned bad, f;
      @(posedge rst_n);
      do begin
        repeat (20000) @(negedge clk);
        u_ps.read(32'(DC_STATUS), d, r);
      end while (d[1:0] != 2'b11);
      u_ps.read(32'(DC_H_ACTIVE), w, r);
      u_ps.read(32'(DC_V_ACTIVE), h, r);
      check(w == HA && h == VA, $sformatf("%0dx%0d: active read %0dx%0d", HA, VA, w, h));
      u_ps.read(32'(DC_H_TOTAL), d, r);
      check(d == HT, $sformatf("%0dx%0d: h total %0d", HA, VA, d));
      u_ps.read(32'(DC_V_TOTAL), d, r);
      check(d == VT, $sformatf("%0dx%0d: v total %0d", HA, VA, d));
      u_ps.write(32'(DC_ERRORS), 32'hF, r);

      stride = (w * 3 + 7) / 8 * 8;   // line starts are 8-byte aligned
      u_ps.write(32'h1000 + 32'(VD_START_ADDR), BASE, r);
      u_ps.write(32'h1000 + 32'(VD_HSIZE), w * 3, r);
      u_ps.write(32'h1000 + 32'(VD_VSIZE), h, r);
      u_ps.write(32'h1000 + 32'(VD_STRIDE), stride, r);
      u_ps.write(32'h1000 + 32'(VD_CTRL), 1, r);
      while (done_cnt == 0) @(negedge clk);
      u_ps.write(32'h1000 + 32'(VD_CTRL), 0, r);
      do u_ps.read(32'h1000 + 32'(VD_STATUS), d, r); while (!d[0]);
      check(d[11:8] == 0, $sformatf("%0dx%0d: VDMA status %h", HA, VA, d));

      // red of pixel x = 0 is the frame number
      bad = 0;
      f = 32'(u_mem.mem[BASE + 2]);
      for (int unsigned y = 0; y < VA; y++)
        for (int unsigned b = 0; b < HA * 3; b++)
          if (u_mem.mem[BASE + y * stride + b] != 8'(pix(f, b / 3, y) >> (8 * (b % 3)))) bad++;
      check(bad == 0, $sformatf("%0dx%0d: %0d bytes wrong", HA, VA, bad));
      check(u_mem.mem[BASE - 1] == 8'hEE && u_mem.mem[BASE + VA * stride] == 8'hEE,
            $sformatf("%0dx%0d: nothing written outside the buffer", HA, VA));
      check(u_mem.rule_errors == 0, $sformatf("%0dx%0d: AXI rules kept", HA, VA));
      u_ps.read(32'(DC_ERRORS), d, r);
      check(d == 0, $sformatf("%0dx%0d: display check errors %h", HA, VA, d));
      $display("%0dx%0d captured at cycle %0t", HA, VA, $time / 10);
      done[i] = 1'b1;
    end
  end

  initial begin
    wait (done.and() == 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
