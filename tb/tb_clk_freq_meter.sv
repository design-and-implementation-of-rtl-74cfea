// tb_clk_freq_meter: feeds edge pulses at known periods (steady, alternating
// and changing) and checks the last period, the 16-period sum, the valid and
// present flags, and the loss-of-clock timeout with its single lost pulse.
module tb_clk_freq_meter;
  localparam int unsigned CNT_W = 16, AVG_LOG2 = 4, TIMEOUT = 200;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                      pclk_edge = 1'b0;
  logic [CNT_W-1:0]          period_last;
  logic [CNT_W+AVG_LOG2-1:0] period_sum;
  logic                      period_valid, present, lost;

  clk_freq_meter #(.CNT_W(CNT_W), .AVG_LOG2(AVG_LOG2), .TIMEOUT(TIMEOUT)) dut (
    .clk(clk), .rst_n(rst_n), .pclk_edge(pclk_edge),
    .period_last(period_last), .period_sum(period_sum),
    .period_valid(period_valid), .present(present), .lost(lost)
  );

  int checks = 0, failures = 0, lost_pulses = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) if (rst_n && lost) lost_pulses++;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one edge pulse, then p-1 quiet cycles
  task automatic edge_every(input int p);
    @(negedge clk) pclk_edge = 1'b1;
    @(negedge clk) pclk_edge = 1'b0;
    repeat (p - 2) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check(!present && !period_valid, "nothing present after reset");
    // steady period of 5 cycles (the recommended 5x oversampling)
    repeat (40) edge_every(5);
    check(present, "present with clock running");
    check(period_last == 5, $sformatf("period_last %0d, want 5", period_last));
    check(period_valid && period_sum == 16 * 5, $sformatf("sum %0d, want 80", period_sum));
    // alternating 6/7: average 6.5, sum of 16 = 104
    repeat (40) begin
      edge_every(6);
      edge_every(7);
    end
    check(period_sum == 104, $sformatf("alternating sum %0d, want 104", period_sum));
    // slower clock, 23 cycles
    repeat (40) edge_every(23);
    check(period_last == 23 && period_sum == 16 * 23, "period 23");
    // clock stops
    repeat (TIMEOUT + 10) @(negedge clk);
    check(!present && !period_valid, "absent after timeout");
    check(lost_pulses == 1, $sformatf("lost pulses %0d, want 1", lost_pulses));
    repeat (TIMEOUT) @(negedge clk);
    check(lost_pulses == 1, "lost pulses only once");
    // clock returns: first edge only restarts, valid again after 17 edges
    repeat (10) edge_every(9);
    check(present && !period_valid && period_last == 9, "restart, not yet averaged");
    repeat (10) edge_every(9);
    check(period_valid && period_sum == 16 * 9, "averaged after restart");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
