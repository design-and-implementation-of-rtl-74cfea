// tb_dpi_timing_corr: models a display whose data change LAG cycles after
// its clock edge (period P cycles) and checks the capture of every pixel:
//   * dynamic delay (period/2 = 4) captures the new pixel, delay+1 cycles
//     after the edge;
//   * no delay (dynamic off, user 0) captures the previous pixel - the
//     error the correction exists to fix;
//   * a user delay of 3 alone captures the new pixel;
//   * a delay longer than the period loses pixels and raises miss.
module tb_dpi_timing_corr;
  import dsniff_pkg::*;

  localparam int unsigned P = 8, LAG = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  dpi_sample_t smp = '0;
  logic        pclk_edge = 1'b0;
  logic [15:0] period = 16'(P);
  logic        period_valid = 1'b1;
  logic        dyn_en = 1'b1;
  logic [7:0]  user_delay = 8'd0;
  logic [7:0]  delay;
  logic        pix_valid, miss;
  dpi_sample_t pix;

  dpi_timing_corr dut (
    .clk(clk), .rst_n(rst_n), .smp(smp), .pclk_edge(pclk_edge),
    .period(period), .period_valid(period_valid), .dyn_en(dyn_en),
    .user_delay(user_delay), .delay(delay), .pix_valid(pix_valid),
    .pix(pix), .miss(miss)
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Source: pixel n's edge at cycle n*P, its data LAG cycles later.
  int unsigned cyc = 0, n_px = 0;
  int unsigned last_edge_cyc;
  logic run = 1'b0;
  always @(negedge clk) begin
    cyc++;
    pclk_edge = 1'b0;
    if (run) begin
      if (cyc % P == 0) begin
        pclk_edge     = 1'b1;
        last_edge_cyc = cyc;
        n_px++;
      end
      if (cyc % P == LAG) smp.data = 24'(n_px);
    end
  end

  // Captures: value and cycle distance to the last edge.
  int unsigned got_val, got_dist, n_cap = 0, n_miss = 0;
  always @(negedge clk) if (rst_n) begin
    if (pix_valid) begin
      got_val  = pix.data;
      got_dist = cyc - last_edge_cyc;
      n_cap++;
    end
    if (miss) n_miss++;
  end

  // Run a phase and check that all captured values equal the pixel
  // number (or pixel number - 1 when expect_old) at distance want_dist.
  task automatic phase(input bit expect_old, input int unsigned want_dist, input string name);
    int unsigned bad = 0, caps = 0;
    repeat (3 * P) @(negedge clk);   // settle on the new setting
    for (int i = 0; i < 20 * P; i++) begin
      @(negedge clk);
      #1;
      if (pix_valid) begin
        caps++;
        if (pix.data != 24'(expect_old ? n_px - 1 : n_px) || (cyc - last_edge_cyc) != want_dist)
          begin bad++; if (bad == 1) $display("  got %0d at distance %0d (pixel %0d)", pix.data, cyc - last_edge_cyc, n_px); end
      end
    end
    check(caps == 20 && bad == 0, $sformatf("%s: %0d captures, %0d wrong", name, caps, bad));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run   = 1'b1;
    // dynamic: delay = P/2 = 4 > LAG
    phase(1'b0, 5, "dynamic delay");
    check(delay == 8'(P / 2), $sformatf("delay %0d, want %0d", delay, P / 2));
    // no correction: old data captured
    dyn_en = 1'b0;
    phase(1'b1, 1, "no delay");
    check(delay == 0, "delay 0");
    // user delay of 3 cycles alone
    user_delay = 8'd3;
    phase(1'b0, 4, "user delay 3");
    check(delay == 3, "delay 3");
    // dynamic plus user: 4 + 2 = 6 < P
    dyn_en = 1'b1; user_delay = 8'd2;
    phase(1'b0, 7, "dynamic plus user");
    // too long: misses, at least one per pixel
    check(n_miss == 0, "no miss so far");
    user_delay = 8'd20;
    repeat (20 * P) @(negedge clk);
    check(n_miss >= 15, $sformatf("misses %0d with delay beyond the period", n_miss));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
