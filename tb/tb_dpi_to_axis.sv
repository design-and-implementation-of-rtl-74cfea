// tb_dpi_to_axis: sends frames of corrected DPI samples (5 x 3 active
// pixels, porches and active-high syncs) through two converters, one built
// for RGB888 and one for RGB565, with a randomly stalling consumer. Every
// beat is compared with the expected pixel, tuser on the last pixel of each
// line and tlast on the last pixel of the frame (the DPI to AXI mapping).
// Finally the consumer stops, the 16-entry FIFO fills and overflow must be
// reported, with the stored beats still intact and in order.
module tb_dpi_to_axis;
  import dsniff_pkg::*;

  localparam int unsigned W = 5, H = 3, DEPTH = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        pix_valid = 1'b0;
  dpi_sample_t pix = '0;
  logic        tv8, tr8, ov8, tv5, tr5, ov5;
  vid_beat_t   b8, b5;

  dpi_to_axis #(.COLOR_FMT(CF_RGB888), .FIFO_DEPTH(DEPTH)) dut8 (
    .clk(clk), .rst_n(rst_n), .pix_valid(pix_valid), .pix(pix),
    .m_tvalid(tv8), .m_tready(tr8), .m_beat(b8), .overflow(ov8));
  dpi_to_axis #(.COLOR_FMT(CF_RGB565), .FIFO_DEPTH(DEPTH)) dut5 (
    .clk(clk), .rst_n(rst_n), .pix_valid(pix_valid), .pix(pix),
    .m_tvalid(tv5), .m_tready(tr5), .m_beat(b5), .overflow(ov5));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [23:0] val(int f, int x, int y);
    return {8'(8'hA0 + x * 16 + f), 8'(y * 37 + 5), 8'(x * 51 + y)};
  endfunction

  vid_beat_t exp8 [$], exp5 [$];
  int n_ov8 = 0, n_ov5 = 0;
  logic stall_all = 1'b0;

  // one DPI sample every 3 cycles
  task automatic send(input logic de, input logic hs, input logic vs, input logic [23:0] d);
    @(negedge clk);
    pix_valid = 1'b1;
    pix = '{de: de, hsync: hs, vsync: vs, data: d};
    @(negedge clk) pix_valid = 1'b0;
    @(negedge clk);
  endtask

  task automatic frame(input int f, input bit record);
    for (int y = 0; y < H + 3; y++) begin
      for (int x = 0; x < W + 5; x++) begin
        logic act, hs, vs;
        logic [23:0] d;
        act = (y < H) && (x < W);
        hs  = (x >= W + 2) && (x < W + 4);
        vs  = (y == H + 1);
        d   = act ? val(f, x, y) : 24'h0;
        send(act, hs, vs, d);
        if (act && record) begin
          exp8.push_back('{tdata: d, tuser: x == W - 1, tlast: (x == W - 1) && (y == H - 1)});
          exp5.push_back('{tdata: {8'h0, d[23:19], d[15:10], d[7:3]},
                           tuser: x == W - 1, tlast: (x == W - 1) && (y == H - 1)});
        end
      end
    end
  endtask

  always @(negedge clk) begin
    tr8 = !stall_all && ($urandom_range(3) != 0);
    tr5 = !stall_all && ($urandom_range(3) != 0);
  end

  int beats8 = 0, beats5 = 0, bad8 = 0, bad5 = 0;
  always @(posedge clk) if (rst_n) begin
    if (tv8 && tr8) begin
      vid_beat_t e;
      beats8++;
      e = (exp8.size() > 0) ? exp8.pop_front() : '0;
      if (b8 != e) begin
        bad8++;
        if (bad8 < 4) $display("888 beat %0d: got %h/%b%b want %h/%b%b", beats8, b8.tdata, b8.tuser, b8.tlast, e.tdata, e.tuser, e.tlast);
      end
    end
    if (tv5 && tr5) begin
      vid_beat_t e;
      beats5++;
      e = (exp5.size() > 0) ? exp5.pop_front() : '0;
      if (b5 != e) bad5++;
    end
    if (ov8) n_ov8++;
    if (ov5) n_ov5++;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // first frame has no VSYNC before it: the converter still starts cleanly
    for (int f = 0; f < 4; f++) frame(f, 1'b1);
    repeat (50) @(negedge clk);
    check(beats8 == 4 * W * H && bad8 == 0, $sformatf("RGB888: %0d beats, %0d wrong", beats8, bad8));
    check(beats5 == 4 * W * H && bad5 == 0, $sformatf("RGB565: %0d beats, %0d wrong", beats5, bad5));
    check(n_ov8 == 0 && n_ov5 == 0, "no overflow with a consumer");
    // overflow: consumer stopped for two frames (30 pixels > 16 entries)
    stall_all = 1'b1;
    frame(10, 1'b1);
    frame(11, 1'b1);
    check(n_ov8 > 0 && n_ov5 > 0, $sformatf("overflow reported (%0d, %0d)", n_ov8, n_ov5));
    check(!tv8 || (b8 == exp8[0]), "oldest beat kept");
    // keep only the 16 beats that fit
    while (exp8.size() > DEPTH) void'(exp8.pop_back());
    while (exp5.size() > DEPTH) void'(exp5.pop_back());
    stall_all = 1'b0;
    repeat (100) @(negedge clk);
    check(beats8 == 4 * W * H + DEPTH && bad8 == 0, $sformatf("after overflow: %0d beats, %0d wrong", beats8, bad8));
    check(beats5 == 4 * W * H + DEPTH && bad5 == 0, "RGB565 after overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
