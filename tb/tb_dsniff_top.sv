// tb_dsniff_top: end-to-end test of the sniffer at its default parameters.
//
// A display controller model drives a 16 x 6 pixel display (22 x 9 pixel
// clocks per frame with porches and syncs) at one sixth of the system clock.
// Its colour lines settle 2.7 system clocks after each pixel clock edge while
// DE and the syncs change at once, so a capture taken right at the detected
// edge gets unsettled colours. An AXI memory model with random stalls
// stands in for the processing system's memory, and the AXI4-Lite master
// model plays the software: it reads the display check registers, programs
// the VDMA and starts and stops each capture as the thesis's application
// does around every frame read.
//
// Checked and counted, each at least once (a mechanism never seen counts a
// failure at the end):
//   resolution   H/V active and total, valid flag
//   clock        pixel clock period and average, presence
//   capture      frames in memory equal the pixels sent (frame number found
//                from the first pixel), lines split at a 4 KiB boundary
//   dtc_needed   with correction off the captured colours are wrong
//   dtc_dynamic  dynamic delay (half the measured period) gives correct data
//   dtc_user     user delay alone gives correct data
//   dtc_miss     a delay longer than the pixel clock raises the miss error
//   mem_stall    the memory held off writes
//   overflow     memory stalled for frames: stream FIFO overflow flagged,
//                the next capture is correct again
//   line_len     a DE glitch gives a line of another length: error flagged
//   short_frame  VSIZE larger than the display: lines zero-filled, flagged
//   stop         with RUN cleared no frames are written
//   clk_lost     pixel clock stopped: loss flagged, measurement recovers
//   decerr       an unmapped register address answers DECERR
//   multi        two consecutive frames into one long buffer, RUN clears itself
module tb_dsniff_top;
  import dsniff_pkg::*;

  localparam int unsigned HA = 16, VA = 6;
  localparam int unsigned HT = HA + 6, VT = VA + 3;
  localparam int unsigned MEM = 1 << 16;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  // display controller
  logic        src_en = 1'b1;
  logic        pclk, src_de, hsync, vsync;
  logic [23:0] data;
  int unsigned frames_sent;
  logic        de_glitch = 1'b0;

  dpi_source_model #(
    .H_ACTIVE(HA), .H_FP(2), .H_SYNC(2), .H_BP(2),
    .V_ACTIVE(VA), .V_FP(1), .V_SYNC(1), .V_BP(1),
    .PCLK_PERIOD(60), .SETTLE(2), .DATA_LAG(27)
  ) u_src (
    .enable(src_en), .pclk(pclk), .de(src_de), .hsync(hsync), .vsync(vsync),
    .data(data), .frames_sent(frames_sent));

  axil_req_t   s_req;
  axil_rsp_t   s_rsp;
  axi_wr_req_t mreq;
  axi_wr_rsp_t mrsp;
  logic        frame_done;
  logic        force_stall = 1'b0;

  dsniff_top dut (
    .clk(clk), .rst_n(rst_n),
    .dpi_pclk(pclk), .dpi_de(src_de && !de_glitch), .dpi_hsync(hsync), .dpi_vsync(vsync),
    .dpi_data(data),
    .s_axil_req(s_req), .s_axil_rsp(s_rsp),
    .m_axi_req(mreq), .m_axi_rsp(mrsp),
    .frame_done(frame_done));

  axi_mem_model #(.MEM_BYTES(MEM), .STALL_PCT(25)) u_mem (
    .clk(clk), .rst_n(rst_n), .req(mreq), .rsp(mrsp),
    .force_stall(force_stall), .err_resp(1'b0));
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
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  typedef enum int {M_RES, M_CLK, M_CAPTURE, M_SPLIT4K, M_DTC_NEEDED, M_DTC_DYN, M_DTC_USER,
                    M_DTC_MISS, M_STALL, M_OVERFLOW, M_LINE_LEN, M_SHORT_FRAME, M_STOP,
                    M_CLK_LOST, M_DECERR, M_MULTI, M_N} mech_e;
  int unsigned mech [M_N];
  initial for (int i = 0; i < M_N; i++) mech[i] = 0;

  int unsigned done_cnt = 0, ovf_pulses = 0, miss_pulses = 0, lost_pulses = 0;
  always @(posedge clk) if (rst_n) begin
    if (frame_done)            done_cnt++;
    if (dut.fifo_overflow)     ovf_pulses++;
    if (dut.dtc_miss)          miss_pulses++;
    if (dut.clk_lost)          lost_pulses++;
    // a burst cut short by a 4 KiB boundary
    if (mreq.awvalid && mrsp.awready && (32'(mreq.awlen) + 1 < 16)
        && ((mreq.awaddr & 32'hFFF) + (32'(mreq.awlen) + 1) * 8 == 32'h1000))
      mech[M_SPLIT4K]++;
  end

  // ---------------- register helpers ----------------
  task automatic dc_rd(input logic [11:0] a, output logic [31:0] d);
    axi_resp_e r;
    u_ps.read(32'(a), d, r);
    check(r == RESP_OKAY, "display check read response");
  endtask
  task automatic dc_wr(input logic [11:0] a, input logic [31:0] d);
    axi_resp_e r;
    u_ps.write(32'(a), d, r);
    check(r == RESP_OKAY, "display check write response");
  endtask
  task automatic vd_rd(input logic [11:0] a, output logic [31:0] d);
    axi_resp_e r;
    u_ps.read(32'h1000 + 32'(a), d, r);
    check(r == RESP_OKAY, "VDMA read response");
  endtask
  task automatic vd_wr(input logic [11:0] a, input logic [31:0] d);
    axi_resp_e r;
    u_ps.write(32'h1000 + 32'(a), d, r);
    check(r == RESP_OKAY, "VDMA write response");
  endtask

  task automatic wait_frames(input int unsigned n);
    int unsigned f0;
    f0 = frames_sent;
    while (frames_sent < f0 + n) @(negedge clk);
  endtask

  // ---------------- capture and memory check ----------------
  localparam int unsigned BASE = 32'h0FE0;   // line 0 crosses 4 KiB
  localparam int unsigned STRIDE = 64;

  function automatic logic [23:0] pix(int unsigned f, int unsigned x, int unsigned y);
    return {8'(x * 3 + f), 8'(y * 5 + 1), 8'(x ^ (y << 2))};
  endfunction

  // One frame: RUN, wait for the frame, stop, wait until halted.
  task automatic capture();
    int unsigned n;
    logic [31:0] d;
    n = done_cnt;
    vd_wr(VD_CTRL, 1);
    while (done_cnt == n) @(negedge clk);
    vd_wr(VD_CTRL, 0);
    do vd_rd(VD_STATUS, d); while (!d[0]);
  endtask

  // Number of wrong bytes of the frame in memory; vsize lines, lines from
  // VA on must be zero. The frame number comes from the red byte of (0,0).
  function automatic int unsigned bad_bytes(input int unsigned vsize, input int unsigned base = BASE);
    int unsigned bad = 0, f;
    f = u_mem.mem[base + 2];
    for (int unsigned y = 0; y < vsize; y++)
      for (int unsigned b = 0; b < HA * 3; b++) begin
        logic [7:0] want;
        want = (y < VA) ? 8'(pix(f, b / 3, y) >> (8 * (b % 3))) : 8'h00;
        if (u_mem.mem[base + y * STRIDE + b] != want) bad++;
      end
    return bad;
  endfunction

  task automatic clear_mem();
    for (int i = 0; i < MEM; i++) u_mem.mem[i] = 8'hEE;
  endtask

  task automatic clear_errors();
    dc_wr(DC_ERRORS, 32'hF);
    vd_wr(VD_STATUS, 32'hF00);
  endtask

  logic [31:0] d;
  int unsigned n0, bad;
  axi_resp_e   r;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait_frames(3);

    // ---- resolution and clock ----
    dc_rd(DC_STATUS, d);     check(d[1:0] == 2'b11, $sformatf("clock present, resolution valid %h", d));
    dc_rd(DC_CLK_PERIOD, d); check(d == 6, $sformatf("clock period %0d", d));
    dc_rd(DC_CLK_AVG, d);    check(d == 96, $sformatf("clock period sum %0d", d));
    if (d == 96) mech[M_CLK]++;
    begin
      logic [31:0] ha, va, ht, vt;
      dc_rd(DC_H_ACTIVE, ha);
      dc_rd(DC_V_ACTIVE, va);
      dc_rd(DC_H_TOTAL, ht);
      dc_rd(DC_V_TOTAL, vt);
      check(ha == HA && va == VA && ht == HT && vt == VT,
            $sformatf("resolution %0dx%0d total %0dx%0d", ha, va, ht, vt));
      if (ha == HA && va == VA && ht == HT && vt == VT) mech[M_RES]++;
    end
    dc_rd(DC_DTC_DELAY, d);  check(d == 3, $sformatf("dynamic delay %0d", d));
    clear_errors();

    // ---- capture with dynamic correction ----
    vd_wr(VD_START_ADDR, BASE);
    vd_wr(VD_HSIZE, HA * 3);
    vd_wr(VD_VSIZE, VA);
    vd_wr(VD_STRIDE, STRIDE);
    n0 = mech[M_SPLIT4K];
    capture();
    bad = bad_bytes(VA);
    check(bad == 0, $sformatf("dynamic correction capture: %0d bytes wrong", bad));
    check(mech[M_SPLIT4K] > n0, "line split at 4 KiB");
    if (bad == 0) begin
      mech[M_CAPTURE]++;
      mech[M_DTC_DYN]++;
    end
    check(u_mem.mem[BASE + 2] >= 3, "captured frame is one sent after RUN");

    // ---- no correction: unsettled colours captured ----
    dc_wr(DC_DTC_CTRL, 32'h0000_0000);
    dc_rd(DC_DTC_DELAY, d); check(d == 0, "delay off");
    wait_frames(1);
    clear_mem();
    capture();
    bad = bad_bytes(VA);
    check(bad > 0, "capture at the clock edge differs from the pixels");
    if (bad > 0) mech[M_DTC_NEEDED]++;

    // ---- user delay only ----
    dc_wr(DC_DTC_CTRL, 32'h0000_0300);
    wait_frames(1);
    clear_mem();
    capture();
    bad = bad_bytes(VA);
    check(bad == 0, $sformatf("user delay capture: %0d bytes wrong", bad));
    if (bad == 0) begin
      mech[M_CAPTURE]++;
      mech[M_DTC_USER]++;
    end
    dc_wr(DC_DTC_CTRL, 32'h0000_0001);
    wait_frames(1);
    clear_errors();

    // ---- memory stalled for several frames: stream FIFO overflows ----
    n0 = ovf_pulses;
    force_stall = 1'b1;
    vd_wr(VD_CTRL, 1);
    wait_frames(8);
    force_stall = 1'b0;
    vd_wr(VD_CTRL, 0);
    do vd_rd(VD_STATUS, d); while (!d[0]);
    dc_rd(DC_ERRORS, d);
    check(ovf_pulses > n0 && d[ERR_FIFO_OVF], $sformatf("overflow flagged %h", d));
    if (ovf_pulses > n0 && d[ERR_FIFO_OVF]) mech[M_OVERFLOW]++;
    wait_frames(1);
    clear_errors();
    clear_mem();
    capture();
    bad = bad_bytes(VA);
    check(bad == 0, $sformatf("capture after overflow: %0d bytes wrong", bad));
    if (bad == 0) mech[M_CAPTURE]++;
    vd_rd(VD_STATUS, d); check(d[11:8] == 0, $sformatf("no VDMA errors after recovery %h", d));

    // ---- delay longer than a pixel clock ----
    n0 = miss_pulses;
    dc_wr(DC_DTC_CTRL, 32'h0000_0801);
    wait_frames(1);
    dc_rd(DC_ERRORS, d);
    check(miss_pulses > n0 && d[ERR_DTC_MISS], $sformatf("miss flagged %h", d));
    if (miss_pulses > n0 && d[ERR_DTC_MISS]) mech[M_DTC_MISS]++;
    dc_wr(DC_DTC_CTRL, 32'h0000_0001);
    wait_frames(1);
    clear_errors();
    dc_rd(DC_ERRORS, d); check(d == 0, $sformatf("errors cleared %h", d));

    // ---- DE glitch: one line of another length ----
    @(posedge src_de);
    repeat (4) @(posedge pclk);
    #10 de_glitch = 1'b1;
    @(posedge pclk);
    #10 de_glitch = 1'b0;
    wait_frames(1);
    dc_rd(DC_ERRORS, d);
    check(d[ERR_LINE_LEN] == 1'b1, $sformatf("line length error %h", d));
    if (d[ERR_LINE_LEN]) mech[M_LINE_LEN]++;
    clear_errors();

    // ---- VSIZE beyond the display: short frame ----
    vd_wr(VD_VSIZE, VA + 2);
    clear_mem();
    capture();
    bad = bad_bytes(VA + 2);
    vd_rd(VD_STATUS, d);
    check(bad == 0 && d[VERR_FRAME_SHORT], $sformatf("short frame: %0d bytes wrong, status %h", bad, d));
    if (bad == 0 && d[VERR_FRAME_SHORT]) mech[M_SHORT_FRAME]++;
    vd_wr(VD_VSIZE, VA);
    clear_errors();

    // ---- stopped: nothing written ----
    vd_rd(VD_FRAME_CNT, d);
    n0 = d;
    u_mem.mem[BASE] = 8'h5A;
    wait_frames(3);
    vd_rd(VD_FRAME_CNT, d);
    check(d == n0 && u_mem.mem[BASE] == 8'h5A, "no frames written while stopped");
    vd_rd(VD_STATUS, d);
    check(d[1:0] == 2'b01, $sformatf("halted, not busy %h", d));
    if (n0 == done_cnt && d[1:0] == 2'b01) mech[M_STOP]++;

    // ---- pixel clock lost and back ----
    n0 = lost_pulses;
    src_en = 1'b0;
    wait_frames(1);
    repeat (5000) @(negedge clk);
    dc_rd(DC_STATUS, d);
    check(d[1:0] == 2'b00, $sformatf("clock absent %h", d));
    begin
      logic [31:0] e;
      dc_rd(DC_ERRORS, e);
      check(e[ERR_CLK_LOST] && lost_pulses > n0, $sformatf("clock loss flagged %h", e));
      if (d[1:0] == 2'b00 && e[ERR_CLK_LOST] && lost_pulses > n0) mech[M_CLK_LOST]++;
    end
    src_en = 1'b1;
    wait_frames(3);
    dc_rd(DC_STATUS, d);      check(d[1:0] == 2'b11, $sformatf("clock back, resolution valid %h", d));
    dc_rd(DC_CLK_PERIOD, d);  check(d == 6, $sformatf("clock period after loss %0d", d));
    clear_errors();
    clear_mem();
    capture();
    bad = bad_bytes(VA);
    check(bad == 0, $sformatf("capture after clock loss: %0d bytes wrong", bad));
    if (bad == 0) mech[M_CAPTURE]++;

    // ---- two frames into one long buffer ----
    clear_mem();
    vd_wr(VD_FRAME_STRIDE, 32'h200);
    vd_wr(VD_NFRAMES, 2);
    n0 = done_cnt;
    vd_wr(VD_CTRL, 1);
    while (done_cnt < n0 + 2) @(negedge clk);
    repeat (20) @(negedge clk);
    vd_rd(VD_CTRL, d);
    check(d[0] == 1'b0, "RUN cleared after two frames");
    begin
      int unsigned b0, b1;
      b0 = bad_bytes(VA, BASE);
      b1 = bad_bytes(VA, BASE + 'h200);
      check(b0 == 0 && b1 == 0 && u_mem.mem[BASE + 'h202] == u_mem.mem[BASE + 2] + 8'd1,
            $sformatf("long buffer: %0d and %0d bytes wrong, frames %0d %0d", b0, b1,
                      u_mem.mem[BASE + 2], u_mem.mem[BASE + 'h202]));
      if (b0 == 0 && b1 == 0 && d[0] == 1'b0) mech[M_MULTI]++;
    end
    vd_wr(VD_NFRAMES, 0);

    // ---- unmapped register ----
    u_ps.read(32'h2000, d, r);
    check(r == RESP_DECERR, "unmapped address DECERR");
    if (r == RESP_DECERR) mech[M_DECERR]++;

    // ---- totals ----
    if (u_mem.stalls > 0) mech[M_STALL]++;
    check(u_mem.rule_errors == 0, $sformatf("AXI rule errors %0d", u_mem.rule_errors));
    for (int i = 0; i < M_N; i++) begin
      mech_e m;
      m = mech_e'(i);
      $display("mechanism %-14s %0d", m.name(), mech[i]);
      check(mech[i] > 0, $sformatf("mechanism %s never happened", m.name()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
