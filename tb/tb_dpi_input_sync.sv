// tb_dpi_input_sync: drives random DPI pin values (pixel clock toggling at
// random) and checks that every line comes out exactly SYNC_STAGES cycles
// later, syncs inverted to active-high, and that pclk_edge pulses once per
// rising pixel clock edge, in the cycle the high level first appears.
module tb_dpi_input_sync;
  import dsniff_pkg::*;

  localparam int unsigned S = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        pclk, de, hs, vs;
  logic [23:0] d;
  dpi_sample_t smp;
  logic        pclk_edge;

  dpi_input_sync #(.SYNC_STAGES(S)) dut (
    .clk(clk), .rst_n(rst_n),
    .dpi_pclk(pclk), .dpi_de(de), .dpi_hsync(hs), .dpi_vsync(vs), .dpi_data(d),
    .smp(smp), .pclk_edge(pclk_edge)
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  typedef struct packed { logic pclk, de, hs, vs; logic [23:0] d; } pins_t;
  pins_t hist [S+1];
  int edges_driven = 0, edges_seen = 0;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {pclk, de, hs, vs, d} = '0;
    for (int i = 0; i <= S; i++) hist[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      if (n > S + 1) begin
        check(smp.de == hist[S-1].de && smp.data == hist[S-1].d, "data/de delayed by SYNC_STAGES");
        check(smp.hsync == !hist[S-1].hs && smp.vsync == !hist[S-1].vs, "syncs inverted and delayed");
        check(pclk_edge == (hist[S-1].pclk && !hist[S].pclk), "edge pulse position");
        if (pclk_edge) edges_seen++;
      end
      for (int i = S; i > 0; i--) hist[i] = hist[i-1];
      if ($urandom_range(2) == 0) begin
        pclk = ~pclk;
        if (pclk && n > 1) edges_driven++;
      end
      de = 1'($urandom); hs = 1'($urandom); vs = 1'($urandom); d = 24'($urandom);
      hist[0] = '{pclk, de, hs, vs, d};
    end
    // edges driven in the last S cycles are not yet visible
    repeat (S + 1) @(negedge clk) if (pclk_edge) edges_seen++;
    check(edges_seen == edges_driven, $sformatf("edge count %0d vs %0d", edges_seen, edges_driven));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
