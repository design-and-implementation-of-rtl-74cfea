// tb_disp_check: feeds frames of corrected DPI samples with a known layout
// (6 x 4 active, 11 pixel clocks per line, 7 lines per frame) and reads the
// display check registers over AXI4-Lite: resolution with and without
// porches, frame count, status, clock figures passed through, the sticky
// error bits (set by event pulses and by a frame with one short line,
// cleared by writing 1) and the timing correction controls.
module tb_disp_check;
  import dsniff_pkg::*;

  localparam int unsigned W = 6, H = 4, HFP = 2, HS = 2, HBP = 1, VFP = 1, VS = 1, VBP = 1;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        pix_valid = 1'b0;
  dpi_sample_t pix = '0;
  logic        clk_present = 1'b1, clk_lost = 1'b0, dtc_miss = 1'b0, fifo_overflow = 1'b0;
  logic        dyn_en;
  logic [7:0]  user_delay;
  axil_req_t   req;
  axil_rsp_t   rsp;

  disp_check dut (
    .clk(clk), .rst_n(rst_n), .pix_valid(pix_valid), .pix(pix),
    .period_last(16'd5), .period_sum(20'd83), .clk_present(clk_present),
    .clk_lost(clk_lost), .dtc_miss(dtc_miss), .fifo_overflow(fifo_overflow),
    .dtc_delay(8'd7), .dtc_dyn_en(dyn_en), .dtc_user_delay(user_delay),
    .s_axil_req(req), .s_axil_rsp(rsp)
  );

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
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input logic de, input logic hs, input logic vs);
    @(negedge clk);
    pix_valid = 1'b1;
    pix = '{de: de, hsync: hs, vsync: vs, data: 24'($urandom)};
    @(negedge clk) pix_valid = 1'b0;
  endtask

  // short_line >= 0 makes that line one pixel shorter
  task automatic frame(input int short_line);
    for (int y = 0; y < H + VFP + VS + VBP; y++)
      for (int x = 0; x < W + HFP + HS + HBP; x++) begin
        int w;
        w = (y == short_line) ? W - 1 : W;
        send((y < H) && (x < w), (x >= W + HFP) && (x < W + HFP + HS),
             (y >= H + VFP) && (y < H + VFP + VS));
      end
  endtask

  task automatic rd(input logic [11:0] a, output logic [31:0] d);
    axi_resp_e r;
    u_ps.read(32'(a), d, r);
    check(r == RESP_OKAY, "read response OKAY");
  endtask
  task automatic wr(input logic [11:0] a, input logic [31:0] d);
    axi_resp_e r;
    u_ps.write(32'(a), d, r);
    check(r == RESP_OKAY, "write response OKAY");
  endtask

  task automatic pulse(ref logic s);
    @(negedge clk) s = 1'b1;
    @(negedge clk) s = 1'b0;
  endtask

  logic [31:0] d;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    rd(DC_STATUS, d);   check(d == 32'h1, $sformatf("status after reset %h", d));
    rd(DC_DTC_CTRL, d); check(d == 32'h1, "DTC control reset: dynamic on, user delay 0");
    check(dyn_en && user_delay == 0, "DTC outputs at reset");
    frame(-1);
    frame(-1);
    frame(-1);
    rd(DC_STATUS, d);     check(d == 32'h3, $sformatf("status with resolution %h", d));
    rd(DC_H_ACTIVE, d);   check(d == W, $sformatf("H_ACTIVE %0d", d));
    rd(DC_V_ACTIVE, d);   check(d == H, $sformatf("V_ACTIVE %0d", d));
    rd(DC_H_TOTAL, d);    check(d == W + HFP + HS + HBP, $sformatf("H_TOTAL %0d", d));
    rd(DC_V_TOTAL, d);    check(d == H + VFP + VS + VBP, $sformatf("V_TOTAL %0d", d));
    rd(DC_FRAME_CNT, d);  check(d == 3, $sformatf("FRAME_CNT %0d", d));
    rd(DC_CLK_PERIOD, d); check(d == 5, "clock period passed through");
    rd(DC_CLK_AVG, d);    check(d == 83, "clock sum passed through");
    rd(DC_DTC_DELAY, d);  check(d == 7, "delay in use passed through");
    rd(DC_ERRORS, d);     check(d == 0, $sformatf("no errors yet %h", d));
    rd(12'hFFC, d);       check(d == 0, "unmapped offset reads 0");
    // errors
    frame(2);
    rd(DC_ERRORS, d);     check(d == (1 << ERR_LINE_LEN), $sformatf("line length error %h", d));
    pulse(dtc_miss);
    pulse(fifo_overflow);
    rd(DC_ERRORS, d);
    check(d == ((1 << ERR_LINE_LEN) | (1 << ERR_DTC_MISS) | (1 << ERR_FIFO_OVF)), $sformatf("errors %h", d));
    wr(DC_ERRORS, 32'(1 << ERR_LINE_LEN));
    rd(DC_ERRORS, d);     check(d == ((1 << ERR_DTC_MISS) | (1 << ERR_FIFO_OVF)), "write 1 clears one bit");
    wr(DC_ERRORS, 32'hF);
    rd(DC_ERRORS, d);     check(d == 0, "all cleared");
    // clock lost: status drops, resolution invalid, error bit
    clk_present = 1'b0;
    pulse(clk_lost);
    rd(DC_STATUS, d);     check(d == 0, $sformatf("status after clock loss %h", d));
    rd(DC_ERRORS, d);     check(d == (1 << ERR_CLK_LOST), "clock lost error");
    clk_present = 1'b1;
    // DTC control
    wr(DC_DTC_CTRL, 32'h0000_0900);
    check(!dyn_en && user_delay == 9, "DTC control written");
    rd(DC_DTC_CTRL, d);   check(d == 32'h0000_0900, "DTC control read back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
