// dpi_timing_corr: dynamic timing correction (DTC) of the DPI sampling point.
//
// Some displays drive their data late relative to the pixel clock. Latching
// the lines right at the clock edge then captures the previous pixel. As in
// the thesis, the sniffer instead waits a number of system clock cycles after
// each active pixel clock edge and captures DE, HSYNC, VSYNC and data then.
// The wait is derived from the measured pixel clock period and can be extended
// by a user delay:
//
//   delay = (dyn_en && period_valid ? period / 2 : 0) + user_delay
//
// saturated to DELAY_W bits. Half a period (the middle of the data eye) as the
// dynamic part is this design's choice; the thesis says only that the delay is
// adjusted to the measured frequency and that the user can add to it.
//
// A delay of 0 captures in the edge cycle itself. If the next edge arrives
// before a pending capture was taken the pending pixel is lost and miss
// pulses; the new edge starts a fresh wait.
//
// Interface: smp/pclk_edge come from dpi_input_sync. pix_valid pulses for one
// cycle with pix holding the captured sample. Timing: pix_valid is registered,
// delay + 1 cycles after the edge cycle.
module dpi_timing_corr
  import dsniff_pkg::*;
#(
  parameter int unsigned DELAY_W = 8,
  parameter int unsigned CNT_W   = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  dpi_sample_t        smp,
  input  logic               pclk_edge,
  input  logic [CNT_W-1:0]   period,
  input  logic               period_valid,
  input  logic               dyn_en,
  input  logic [DELAY_W-1:0] user_delay,
  output logic [DELAY_W-1:0] delay,
  output logic               pix_valid,
  output dpi_sample_t        pix,
  output logic               miss
);

  logic [CNT_W:0]     sum;
  logic [DELAY_W-1:0] wait_cnt;
  logic               pending;
  logic               fire;

  // Delay in use, registered so that it changes only between pixels.
  always_comb begin
    sum = (CNT_W+1)'((dyn_en && period_valid) ? CNT_W'(period >> 1) : CNT_W'(0))
        + (CNT_W+1)'(user_delay);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) delay <= '0;
    else if (pclk_edge) delay <= (sum > (CNT_W+1)'({DELAY_W{1'b1}})) ? '1 : DELAY_W'(sum);
  end

  // A pending capture fires when the wait counter reaches the delay; a new
  // edge with zero delay fires at once. The delay used for an edge is the
  // value computed in that edge cycle.
  logic [DELAY_W-1:0] delay_now;
  logic               fire_old, fire_new;
  always_comb begin
    delay_now = (sum > (CNT_W+1)'({DELAY_W{1'b1}})) ? '1 : DELAY_W'(sum);
    fire_old  = pending && (wait_cnt == delay);
    fire_new  = pclk_edge && (delay_now == '0);
    fire      = fire_old || fire_new;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending   <= 1'b0;
      wait_cnt  <= '0;
      pix_valid <= 1'b0;
      pix       <= '0;
      miss      <= 1'b0;
    end else begin
      pix_valid <= fire;
      if (fire) pix <= smp;
      // A pixel is lost when an edge cuts a wait short, or when an old and a
      // new capture fall into the same cycle.
      miss <= (pclk_edge && pending && !fire_old) || (fire_old && fire_new);
      if (pclk_edge) begin
        pending  <= (delay_now != '0);
        wait_cnt <= DELAY_W'(1);
      end else if (pending) begin
        if (fire_old) pending  <= 1'b0;
        else          wait_cnt <= wait_cnt + 1'b1;
      end
    end
  end

endmodule
