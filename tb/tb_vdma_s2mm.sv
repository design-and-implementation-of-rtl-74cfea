// tb_vdma_s2mm: streams numbered frames of RGB888 pixels into the frame
// writer while an AXI memory model stalls at random, programs it over
// AXI4-Lite like the processing system does (size, address, stride, run,
// stop) and checks the memory byte by byte against values computed here:
// pixels stored B, G, R from the buffer address, lines STRIDE apart, the tail
// of the last word of a line zero, nothing written past HSIZE bytes. Further
// cases: the capture starting at the frame boundary after RUN, lines split
// at 4 KiB boundaries and into several bursts, a short line, a long line and
// a short frame (padding and sticky error bits), an error response from
// memory, a run of three frames into one long buffer (frame stride, RUN
// clearing itself), the status bits and the frame counter.
module tb_vdma_s2mm;
  import dsniff_pkg::*;

  localparam int unsigned MEM = 1 << 16;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        tvalid = 1'b0, tready;
  vid_beat_t   beat = '0;
  axi_wr_req_t mreq;
  axi_wr_rsp_t mrsp;
  axil_req_t   req;
  axil_rsp_t   rsp;
  logic        frame_done;
  logic        force_stall = 1'b0, err_resp = 1'b0;

  vdma_s2mm dut (
    .clk(clk), .rst_n(rst_n), .s_tvalid(tvalid), .s_tready(tready), .s_beat(beat),
    .m_axi_req(mreq), .m_axi_rsp(mrsp), .s_axil_req(req), .s_axil_rsp(rsp),
    .frame_done(frame_done)
  );
  axi_mem_model #(.MEM_BYTES(MEM), .STALL_PCT(30)) u_mem (
    .clk(clk), .rst_n(rst_n), .req(mreq), .rsp(mrsp),
    .force_stall(force_stall), .err_resp(err_resp));
  axil_master_model u_ps (.clk(clk), .req(req), .rsp(rsp));

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

  function automatic logic [23:0] val(int f, int x, int y);
    return {8'(f), 8'(y + 1), 8'(x + 16)};
  endfunction

  // ---------------- stream source ----------------
  vid_beat_t q [$];
  int unsigned frames_queued = 0;
  // w/h of the frame; short_y/long_y: that line has w-1 / w+2 pixels;
  // h_cut: number of lines actually sent (short frame when < h)
  task automatic queue_frame(input int f, input int w, input int h,
                             input int short_y = -1, input int long_y = -1, input int h_cut = -1);
    int hs;
    hs = (h_cut < 0) ? h : h_cut;
    for (int y = 0; y < hs; y++) begin
      int n;
      n = (y == short_y) ? w - 1 : (y == long_y) ? w + 2 : w;
      for (int x = 0; x < n; x++)
        q.push_back('{tdata: val(f, x, y), tuser: x == n - 1, tlast: (x == n - 1) && (y == hs - 1)});
    end
    frames_queued++;
  endtask

  always @(negedge clk) begin
    if (tvalid && tready_q) void'(q.pop_front());
    tvalid = (q.size() > 0) && ($urandom_range(1) == 0 || tvalid);
    if (tvalid) beat = q[0];
  end
  logic tready_q;
  always @(posedge clk) tready_q <= tready;

  int unsigned done_cnt = 0;
  always @(posedge clk) if (rst_n && frame_done) done_cnt++;

  // ---------------- register helpers ----------------
  task automatic wr(input logic [11:0] a, input logic [31:0] d);
    axi_resp_e r;
    u_ps.write(32'h1000 + 32'(a), d, r);
  endtask
  task automatic rd(input logic [11:0] a, output logic [31:0] d);
    axi_resp_e r;
    u_ps.read(32'h1000 + 32'(a), d, r);
  endtask

  // ---------------- memory check ----------------
  // Frame f at base with w x h pixels expected; short_y line has w-1 pixels;
  // lines >= h_ok are zero.
  task automatic check_frame(input string name, input int f, input int base, input int w, input int h,
                             input int stride, input int short_y = -1, input int h_ok = -1);
    int bad = 0, hb, wpl_b;
    hb    = w * 3;
    wpl_b = ((hb + 7) / 8) * 8;
    for (int y = 0; y < h; y++) begin
      for (int b = 0; b < stride; b++) begin
        logic [7:0] want, got;
        int x;
        x = b / 3;
        if (b < hb) begin
          if ((h_ok >= 0 && y >= h_ok) || (y == short_y && x >= w - 1)) want = 8'h00;
          else want = val(f, x, y) >> (8 * (b % 3));
        end else if (b < wpl_b) want = 8'h00;
        else want = 8'hEE;
        got = u_mem.mem[(base + y * stride + b) % MEM];
        if (got != want) begin
          bad++;
          if (bad < 4) $display("  %s: line %0d byte %0d got %h want %h", name, y, b, got, want);
        end
      end
    end
    check(bad == 0, $sformatf("%s: %0d bytes wrong", name, bad));
  endtask

  task automatic clear_mem();
    for (int i = 0; i < MEM; i++) u_mem.mem[i] = 8'hEE;
  endtask

  task automatic wait_done(input int unsigned n);
    while (done_cnt < n) @(negedge clk);
  endtask

  // Capture exactly one frame: the stream is idle (so the writer is at a
  // frame boundary), RUN is set, the frame is sent, RUN is cleared.
  task automatic capture_one(input int f, input int w, input int h,
                             input int short_y = -1, input int long_y = -1, input int h_cut = -1);
    int unsigned n;
    while (q.size() > 0) @(negedge clk);
    repeat (20) @(negedge clk);
    n = done_cnt;
    wr(VD_CTRL, 1);
    queue_frame(f, w, h, short_y, long_y, h_cut);
    wait_done(n + 1);
    wr(VD_CTRL, 0);
  endtask

  logic [31:0] d;
  int unsigned bursts0;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    rd(VD_STATUS, d); check(d == 32'h1, $sformatf("halted after reset %h", d));

    // ---- 1: 10 x 4 frame, stride 64, frames streaming continuously ----
    wr(VD_START_ADDR, 32'h100);
    wr(VD_HSIZE, 30);
    wr(VD_VSIZE, 4);
    wr(VD_STRIDE, 64);
    queue_frame(1, 10, 4);       // partly sent before RUN: must be skipped
    repeat (30) @(negedge clk);
    wr(VD_CTRL, 1);
    rd(VD_STATUS, d); check(d[0] == 1'b0, "not halted while running");
    queue_frame(2, 10, 4);
    queue_frame(3, 10, 4);
    wait_done(1);
    wr(VD_CTRL, 0);
    check_frame("frame after RUN", 2, 'h100, 10, 4, 64);
    wait_done(2);               // the frame in progress at stop completes
    check_frame("second frame", 3, 'h100, 10, 4, 64);
    while (q.size() > 0) @(negedge clk);
    repeat (50) @(negedge clk);
    rd(VD_STATUS, d);    check(d == 32'h1, $sformatf("halted, no errors %h", d));
    rd(VD_FRAME_CNT, d); check(d == 2, $sformatf("frame count %0d", d));

    // ---- 2: wide lines across a 4 KiB boundary, several bursts ----
    clear_mem();
    bursts0 = u_mem.bursts;
    wr(VD_START_ADDR, 32'h0F50);
    wr(VD_HSIZE, 150);          // 50 pixels = 19 words
    wr(VD_VSIZE, 3);
    wr(VD_STRIDE, 160);
    capture_one(5, 50, 3);
    check_frame("4 KiB crossing", 5, 'h0F50, 50, 3, 160);
    check(u_mem.bursts - bursts0 >= 7, $sformatf("bursts %0d", u_mem.bursts - bursts0));

    // ---- 3: short line, long line, short frame ----
    clear_mem();
    wr(VD_START_ADDR, 32'h2000);
    wr(VD_HSIZE, 24);           // 8 pixels
    wr(VD_VSIZE, 4);
    wr(VD_STRIDE, 32);
    capture_one(6, 8, 4, 1, 2); // line 1 short, line 2 long
    check_frame("short line padded, long line cut", 6, 'h2000, 8, 4, 32, 1);
    rd(VD_STATUS, d);
    check(d[11:8] == 4'b0011, $sformatf("short and long line errors %h", d));
    wr(VD_STATUS, 32'h0000_0F00);
    rd(VD_STATUS, d); check(d[11:8] == 4'b0000, "errors cleared");
    clear_mem();
    capture_one(7, 8, 4, -1, -1, 2);  // frame ends after 2 lines
    check_frame("short frame zero-filled", 7, 'h2000, 8, 4, 32, -1, 2);
    rd(VD_STATUS, d);
    check(d[11:8] == 4'b0100, $sformatf("short frame error %h", d));
    wr(VD_STATUS, 32'h0000_0F00);

    // ---- 4: memory error response ----
    err_resp = 1'b1;
    capture_one(11, 8, 4);
    err_resp = 1'b0;
    rd(VD_STATUS, d); check(d[11] == 1'b1, "memory error response flagged");
    wr(VD_STATUS, 32'h0000_0F00);

    // ---- 5: three frames into one long buffer, RUN clears itself ----
    clear_mem();
    while (q.size() > 0) @(negedge clk);
    repeat (20) @(negedge clk);
    wr(VD_START_ADDR, 32'h4000);
    wr(VD_FRAME_STRIDE, 32'h100);   // 4 lines x 32 bytes = 0x80, gap of 0x80
    wr(VD_NFRAMES, 3);
    wr(VD_CTRL, 1);
    for (int f = 20; f < 25; f++) queue_frame(f, 8, 4);
    while (q.size() > 0) @(negedge clk);
    repeat (50) @(negedge clk);
    rd(VD_CTRL, d);   check(d[0] == 1'b0, "RUN cleared after the requested frames");
    rd(VD_STATUS, d); check(d[1:0] == 2'b01 && d[11:8] == 0, $sformatf("halted after frames %h", d));
    check_frame("long buffer frame 0", 20, 'h4000, 8, 4, 32);
    check_frame("long buffer frame 1", 21, 'h4100, 8, 4, 32);
    check_frame("long buffer frame 2", 22, 'h4200, 8, 4, 32);
    check(u_mem.mem['h4080] == 8'hEE && u_mem.mem['h4300] == 8'hEE, "gaps and after the last buffer untouched");
    wr(VD_NFRAMES, 0);
    rd(VD_FRAME_CNT, d); check(d == 32'(done_cnt), "frame count matches frame_done pulses");
    check(u_mem.rule_errors == 0, $sformatf("AXI rule errors %0d", u_mem.rule_errors));
    check(u_mem.stalls > 0, "memory stalled the writer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
