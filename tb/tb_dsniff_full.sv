// tb_dsniff_full: the sniffer at its default parameters on a display of the
// size the thesis tests with, 320 x 240 pixels RGB888 (360 x 250 pixel
// clocks per frame with porches and syncs), pixel clock at one sixth of the
// system clock, colour lines settling late after each clock edge.
//
// One complete operation as the software performs it: wait for the display
// to be identified, read and check its resolution and pixel clock, program
// the VDMA with what was read (HSIZE = width x 3, VSIZE = height, stride one
// line), start, wait for the frame, stop, and compare the whole frame in
// memory with the pixels sent, the frame number taken from the first pixel.
// No errors may be flagged and the memory model may see no AXI rule broken.
module tb_dsniff_full;
  import dsniff_pkg::*;

  localparam int unsigned HA = 320, VA = 240;
  localparam int unsigned HT = HA + 40, VT = VA + 10;
  localparam int unsigned MEM = 1 << 18;
  localparam int unsigned BASE = 32'h0000_1000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        pclk, de, hsync, vsync;
  logic [23:0] data;
  int unsigned frames_sent;

  dpi_source_model #(
    .H_ACTIVE(HA), .H_FP(10), .H_SYNC(10), .H_BP(20),
    .V_ACTIVE(VA), .V_FP(4), .V_SYNC(2), .V_BP(4),
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

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned done_cnt = 0;
  always @(posedge clk) if (rst_n && frame_done) done_cnt++;

  function automatic logic [23:0] pix(int unsigned f, int unsigned x, int unsigned y);
    return {8'(x * 3 + f), 8'(y * 5 + 1), 8'(x ^ (y << 2))};
  endfunction

  logic [31:0] d, w, h, stride;
  axi_resp_e   r;

  initial begin
    int unsigned bad, f;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // identify the display
    do begin
      repeat (20000) @(negedge clk);
      u_ps.read(32'(DC_STATUS), d, r);
    end while (d[1:0] != 2'b11);
    u_ps.read(32'(DC_H_ACTIVE), w, r);
    u_ps.read(32'(DC_V_ACTIVE), h, r);
    check(w == HA && h == VA, $sformatf("active %0dx%0d", w, h));
    u_ps.read(32'(DC_H_TOTAL), d, r);    check(d == HT, $sformatf("h total %0d", d));
    u_ps.read(32'(DC_V_TOTAL), d, r);    check(d == VT, $sformatf("v total %0d", d));
    u_ps.read(32'(DC_CLK_PERIOD), d, r); check(d == 6, $sformatf("clock period %0d", d));
    u_ps.read(32'(DC_ERRORS), d, r);
    u_ps.write(32'(DC_ERRORS), 32'hF, r);   // what the start-up partial frame left

    // program the VDMA from what was read and capture one frame
    stride = w * 3;
    u_ps.write(32'h1000 + 32'(VD_START_ADDR), BASE, r);
    u_ps.write(32'h1000 + 32'(VD_HSIZE), w * 3, r);
    u_ps.write(32'h1000 + 32'(VD_VSIZE), h, r);
    u_ps.write(32'h1000 + 32'(VD_STRIDE), stride, r);
    u_ps.write(32'h1000 + 32'(VD_CTRL), 1, r);
    while (done_cnt == 0) @(negedge clk);
    u_ps.write(32'h1000 + 32'(VD_CTRL), 0, r);
    do u_ps.read(32'h1000 + 32'(VD_STATUS), d, r); while (!d[0]);
    check(d[11:8] == 0, $sformatf("VDMA status %h", d));
    u_ps.read(32'h1000 + 32'(VD_FRAME_CNT), d, r);
    check(d >= 1, $sformatf("frames written %0d", d));

    // the frame in memory
    bad = 0;
    f = u_mem.mem[BASE + 2];
    for (int unsigned y = 0; y < VA; y++)
      for (int unsigned b = 0; b < HA * 3; b++)
        if (u_mem.mem[BASE + y * stride + b] != 8'(pix(f, b / 3, y) >> (8 * (b % 3)))) begin
          if (bad < 4) $display("  line %0d byte %0d got %h", y, b, u_mem.mem[BASE + y * stride + b]);
          bad++;
        end
    check(bad == 0, $sformatf("320 x 240 frame: %0d bytes wrong", bad));
    check(u_mem.mem[BASE - 1] == 8'hEE && u_mem.mem[BASE + VA * stride] == 8'hEE,
          "nothing written outside the buffer");
    check(u_mem.rule_errors == 0, "AXI rules kept");
    check(u_mem.stalls > 0, "memory stalled at times");
    u_ps.read(32'(DC_ERRORS), d, r);
    check(d == 0, $sformatf("display check errors %h", d));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
