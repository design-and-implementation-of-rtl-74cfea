// clk_freq_meter: measures the DPI pixel clock against the system clock.
//
// A counter runs between consecutive active pixel clock edges; at each edge
// its value is the period of the pixel clock in system clock cycles. The last
// period is reported, and so is the sum of 2^AVG_LOG2 consecutive periods,
// which is the average period in fixed point with AVG_LOG2 fraction bits
// (frequency = f_sys * 2^AVG_LOG2 / period_sum). The thesis measures the
// display frequency with such a counter and uses it for the dynamic timing
// correction; the averaging window and the loss-of-clock timeout are this
// design's choices.
//
// The first edge after reset or after the clock was lost only restarts the
// counter. If no edge arrives for TIMEOUT cycles the clock is reported absent
// (present = 0, lost pulses once) and the results become invalid.
//
// Interface: pclk_edge is a one-cycle pulse per pixel clock edge. period_*
// update one cycle after an edge; period_valid rises once the first full
// averaging window is done.
module clk_freq_meter #(
  parameter int unsigned CNT_W    = 16,
  parameter int unsigned AVG_LOG2 = 4,
  parameter int unsigned TIMEOUT  = 4096
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      pclk_edge,
  output logic [CNT_W-1:0]          period_last,
  output logic [CNT_W+AVG_LOG2-1:0] period_sum,
  output logic                      period_valid,
  output logic                      present,
  output logic                      lost
);

  localparam logic [CNT_W-1:0] CNT_MAX = '1;

  logic [CNT_W-1:0]          cnt;
  logic [CNT_W+AVG_LOG2-1:0] acc;
  logic [AVG_LOG2:0]         nper;     // periods in the running window
  logic                      seen;     // an edge has started the counter

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt          <= '0;
      acc          <= '0;
      nper         <= '0;
      seen         <= 1'b0;
      period_last  <= '0;
      period_sum   <= '0;
      period_valid <= 1'b0;
      present      <= 1'b0;
      lost         <= 1'b0;
    end else begin
      lost <= 1'b0;
      if (pclk_edge) begin
        cnt  <= CNT_W'(1);
        seen <= 1'b1;
        if (seen) begin
          present     <= 1'b1;
          period_last <= cnt;
          if (nper == (AVG_LOG2+1)'(2**AVG_LOG2 - 1)) begin
            period_sum   <= acc + (CNT_W+AVG_LOG2)'(cnt);
            period_valid <= 1'b1;
            acc          <= '0;
            nper         <= '0;
          end else begin
            acc  <= acc + (CNT_W+AVG_LOG2)'(cnt);
            nper <= nper + 1'b1;
          end
        end
      end else begin
        if (cnt != CNT_MAX) cnt <= cnt + 1'b1;
        if (seen && cnt >= CNT_W'(TIMEOUT)) begin
          seen         <= 1'b0;
          present      <= 1'b0;
          period_valid <= 1'b0;
          acc          <= '0;
          nper         <= '0;
          lost         <= present;
        end
      end
    end
  end

endmodule
