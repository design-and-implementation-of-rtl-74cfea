// tb_dsniff_formats: the whole sniffer built for the two narrower colour
// formats, RGB565 and RGB666, side by side. Each build has its own display,
// memory and register master. The display is 12 x 5 pixels with a pixel
// clock at one sixth of the system clock and late-settling colour lines.
//
// For each build the test identifies the display, programs the frame writer
// with HSIZE = width x bytes per pixel (2 for RGB565, 3 for RGB666),
// captures one frame and compares every byte in memory with the pixel sent
// reduced to the format: RGB565 keeps R[7:3] G[7:2] B[7:3], RGB666 keeps
// R[7:2] G[7:2] B[7:2], packed from the lowest bit and stored lowest byte
// first. RGB888 is covered by the other end-to-end tests.
module tb_dsniff_formats;
  import dsniff_pkg::*;

  localparam int unsigned HA = 12, VA = 5;
  localparam int unsigned BASE = 32'h0000_0100;
  localparam int unsigned STRIDE = 64;

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
    repeat (400_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [23:0] pix(int unsigned f, int unsigned x, int unsigned y);
    return {8'(x * 3 + f), 8'(y * 5 + 1), 8'(x ^ (y << 2))};
  endfunction

  // the pixel as the format stores it, LSB-aligned
  function automatic logic [23:0] packed_pix(color_fmt_e fmt, logic [23:0] p);
    case (fmt)
      CF_RGB565: return 24'({p[23:19], p[15:10], p[7:3]});
      CF_RGB666: return 24'({p[23:18], p[15:10], p[7:2]});
      default:   return p;
    endcase
  endfunction

  localparam color_fmt_e FMTS [2] = '{CF_RGB565, CF_RGB666};
  bit done [2] = '{1'b0, 1'b0};

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
  end

  for (genvar i = 0; i < 2; i++) begin : g_fmt
    localparam color_fmt_e  FMT = FMTS[i];
    localparam int unsigned BPP = bytes_per_pixel(FMT);

    logic        pclk, de, hsync, vsync;
    logic [23:0] data;
    int unsigned frames_sent;

    dpi_source_model #(
      .H_ACTIVE(HA), .H_FP(2), .H_SYNC(2), .H_BP(2),
      .V_ACTIVE(VA), .V_FP(1), .V_SYNC(1), .V_BP(1),
      .PCLK_PERIOD(60), .SETTLE(2), .DATA_LAG(27)
    ) u_src (
      .enable(1'b1), .pclk(pclk), .de(de), .hsync(hsync), .vsync(vsync),
      .data(data), .frames_sent(frames_sent));

    axil_req_t   s_req;
    axil_rsp_t   s_rsp;
    axi_wr_req_t mreq;
    axi_wr_rsp_t mrsp;
    logic        frame_done;

    dsniff_top #(.COLOR_FMT(FMT)) dut (
      .clk(clk), .rst_n(rst_n),
      .dpi_pclk(pclk), .dpi_de(de), .dpi_hsync(hsync), .dpi_vsync(vsync), .dpi_data(data),
      .s_axil_req(s_req), .s_axil_rsp(s_rsp),
      .m_axi_req(mreq), .m_axi_rsp(mrsp),
      .frame_done(frame_done));

    axi_mem_model #(.MEM_BYTES(4096), .STALL_PCT(25)) u_mem (
      .clk(clk), .rst_n(rst_n), .req(mreq), .rsp(mrsp),
      .force_stall(1'b0), .err_resp(1'b0));
    axil_master_model u_ps (.clk(clk), .req(s_req), .rsp(s_rsp));

    int unsigned done_cnt = 0;
    always @(posedge clk) if (rst_n && frame_done) done_cnt++;

    initial begin
      logic [31:0] d, w, h;
      axi_resp_e   r;
      int unsigned bad, f, pad;
      @(posedge rst_n);
      do begin
        repeat (2000) @(negedge clk);
        u_ps.read(32'(DC_STATUS), d, r);
      end while (d[1:0] != 2'b11);
      u_ps.read(32'(DC_H_ACTIVE), w, r);
      u_ps.read(32'(DC_V_ACTIVE), h, r);
      check(w == HA && h == VA, $sformatf("format %0d: active %0dx%0d", i, w, h));
      u_ps.write(32'(DC_ERRORS), 32'hF, r);

      u_ps.write(32'h1000 + 32'(VD_START_ADDR), BASE, r);
      u_ps.write(32'h1000 + 32'(VD_HSIZE), w * BPP, r);
      u_ps.write(32'h1000 + 32'(VD_VSIZE), h, r);
      u_ps.write(32'h1000 + 32'(VD_STRIDE), STRIDE, r);
      u_ps.write(32'h1000 + 32'(VD_CTRL), 1, r);
      while (done_cnt == 0) @(negedge clk);
      u_ps.write(32'h1000 + 32'(VD_CTRL), 0, r);
      do u_ps.read(32'h1000 + 32'(VD_STATUS), d, r); while (!d[0]);
      check(d[11:8] == 0, $sformatf("format %0d: VDMA status %h", i, d));

      // the frame captured is one of those sent so far: take the best match
      bad = HA * VA * BPP + 1;
      f = 0;
      for (int unsigned c = 0; c <= frames_sent; c++) begin
        int unsigned n;
        n = 0;
        for (int unsigned y = 0; y < VA; y++)
          for (int unsigned b = 0; b < HA * BPP; b++)
            if (u_mem.mem[BASE + y * STRIDE + b] !=
                8'(packed_pix(FMT, pix(c, b / BPP, y)) >> (8 * (b % BPP)))) n++;
        if (n < bad) begin
          bad = n;
          f = c;
        end
      end
      // the tail of each line's last 64-bit word is zero
      pad = 0;
      for (int unsigned y = 0; y < VA; y++)
        for (int unsigned b = HA * BPP; b < (HA * BPP + 7) / 8 * 8; b++)
          if (u_mem.mem[BASE + y * STRIDE + b] != 8'h00) pad++;
      check(bad == 0, $sformatf("format %0d: %0d bytes wrong (frame %0d)", i, bad, f));
      check(pad == 0, $sformatf("format %0d: %0d line tail bytes not zero", i, pad));
      check(u_mem.rule_errors == 0, $sformatf("format %0d: AXI rules kept", i));
      u_ps.read(32'(DC_ERRORS), d, r);
      check(d == 0, $sformatf("format %0d: display check errors %h", i, d));
      done[i] = 1'b1;
    end
  end

  initial begin
    wait (done[0] && done[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
