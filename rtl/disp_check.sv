// disp_check: display check block - identifies the connected display and
// reports it, and the health of the capture path, to software.
//
// The thesis describes this block as the one that tells the processing system
// what display is connected, the state of the transfers and the errors that
// do not stop the system, and reads the display resolution from it. What it
// measures and how is this design's choice:
//   * clock: presence, last period and the sum of 2^AVG_LOG2 periods, taken
//     from clk_freq_meter;
//   * resolution: DE pixels per line (H_ACTIVE), lines holding DE per frame
//     (V_ACTIVE), pixel clocks between HSYNC starts (H_TOTAL, active plus
//     porches and sync) and HSYNC starts between VSYNC starts (V_TOTAL);
//     RES_VALID is set once a whole frame has been measured;
//   * frames: VSYNC starts counted;
//   * errors, sticky until written with 1: a capture missed by the timing
//     correction, the stream FIFO overflowing, an active line whose length
//     differs from the one before, the pixel clock stopping.
// It also holds the timing correction controls: dynamic delay enable (reset
// 1) and the user delay (reset 0). The thesis says the user can set such a
// delay; the register layout is this design's own (see dsniff_pkg).
//
// Interface: pix_valid/pix are the corrected samples, one per pixel clock.
// s_axil is the AXI4-Lite register port (offsets DC_* in dsniff_pkg).
// Counters are CNT_W bits and saturate at their maximum.
module disp_check
  import dsniff_pkg::*;
#(
  parameter int unsigned CNT_W    = 16,
  parameter int unsigned AVG_LOG2 = 4,
  parameter int unsigned DELAY_W  = 8
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // corrected DPI samples
  input  logic                      pix_valid,
  input  dpi_sample_t               pix,
  // pixel clock measurement
  input  logic [CNT_W-1:0]          period_last,
  input  logic [CNT_W+AVG_LOG2-1:0] period_sum,
  input  logic                      clk_present,
  input  logic                      clk_lost,
  // events from the capture path
  input  logic                      dtc_miss,
  input  logic                      fifo_overflow,
  input  logic [DELAY_W-1:0]        dtc_delay,
  // timing correction controls
  output logic                      dtc_dyn_en,
  output logic [DELAY_W-1:0]        dtc_user_delay,
  // registers
  input  axil_req_t                 s_axil_req,
  output axil_rsp_t                 s_axil_rsp
);

  localparam logic [CNT_W-1:0] CMAX = '1;

  function automatic logic [CNT_W-1:0] sat_inc(logic [CNT_W-1:0] v);
    return (v == CMAX) ? v : v + 1'b1;
  endfunction

  // ------------------------------------------------------------------
  // Resolution measurement
  // ------------------------------------------------------------------
  logic             de_q, hs_q, vs_q;
  logic [CNT_W-1:0] h_cnt, de_cnt, vline_cnt, vact_cnt;
  logic [CNT_W-1:0] h_total, h_active, v_total, v_active;
  logic             h_active_known;
  logic [1:0]       vs_seen;
  logic [31:0]      frame_cnt;
  logic             line_len_err;

  logic hs_start, vs_start, de_end;
  always_comb begin
    hs_start = pix_valid && pix.hsync && !hs_q;
    vs_start = pix_valid && pix.vsync && !vs_q;
    de_end   = pix_valid && !pix.de && de_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      de_q           <= 1'b0;
      hs_q           <= 1'b0;
      vs_q           <= 1'b0;
      h_cnt          <= '0;
      de_cnt         <= '0;
      vline_cnt      <= '0;
      vact_cnt       <= '0;
      h_total        <= '0;
      h_active       <= '0;
      v_total        <= '0;
      v_active       <= '0;
      h_active_known <= 1'b0;
      vs_seen        <= '0;
      frame_cnt      <= '0;
      line_len_err   <= 1'b0;
    end else begin
      line_len_err <= 1'b0;
      if (clk_lost) begin
        vs_seen        <= '0;
        h_active_known <= 1'b0;
      end
      if (pix_valid) begin
        de_q <= pix.de;
        hs_q <= pix.hsync;
        vs_q <= pix.vsync;

        // horizontal
        if (hs_start) begin
          h_total <= h_cnt;
          h_cnt   <= CNT_W'(1);
        end else begin
          h_cnt <= sat_inc(h_cnt);
        end
        if (pix.de) de_cnt <= sat_inc(de_cnt);
        if (de_end) begin
          h_active       <= de_cnt;
          h_active_known <= 1'b1;
          line_len_err   <= h_active_known && (de_cnt != h_active);
          de_cnt         <= '0;
        end

        // vertical
        if (vs_start) begin
          v_total   <= vline_cnt;
          v_active  <= de_end ? sat_inc(vact_cnt) : vact_cnt;
          vline_cnt <= hs_start ? CNT_W'(1) : '0;
          vact_cnt  <= '0;
          frame_cnt <= frame_cnt + 1'b1;
          if (vs_seen != 2'd2) vs_seen <= vs_seen + 1'b1;
        end else begin
          if (hs_start) vline_cnt <= sat_inc(vline_cnt);
          if (de_end)   vact_cnt  <= sat_inc(vact_cnt);
        end
      end
    end
  end

  // ------------------------------------------------------------------
  // Registers
  // ------------------------------------------------------------------
  logic              wr_en, rd_en;
  logic [11:0]       wr_addr, rd_addr;
  logic [31:0]       wr_data, rd_data;
  logic [3:0]        wr_strb;
  logic [3:0]        errors;

  axil_reg_if #(.ADDR_W(12)) u_regs (
    .clk     (clk),
    .rst_n   (rst_n),
    .req     (s_axil_req),
    .rsp     (s_axil_rsp),
    .wr_en   (wr_en),
    .wr_addr (wr_addr),
    .wr_data (wr_data),
    .wr_strb (wr_strb),
    .rd_en   (rd_en),
    .rd_addr (rd_addr),
    .rd_data (rd_data)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      errors         <= '0;
      dtc_dyn_en     <= 1'b1;
      dtc_user_delay <= '0;
    end else begin
      if (wr_en && wr_addr == DC_ERRORS && wr_strb[0]) errors <= errors & ~wr_data[3:0];
      if (wr_en && wr_addr == DC_DTC_CTRL) begin
        if (wr_strb[0]) dtc_dyn_en     <= wr_data[0];
        if (wr_strb[1]) dtc_user_delay <= DELAY_W'(wr_data[15:8]);
      end
      // new events win over a clear in the same cycle
      if (dtc_miss)      errors[ERR_DTC_MISS] <= 1'b1;
      if (fifo_overflow) errors[ERR_FIFO_OVF] <= 1'b1;
      if (line_len_err)  errors[ERR_LINE_LEN] <= 1'b1;
      if (clk_lost)      errors[ERR_CLK_LOST] <= 1'b1;
    end
  end

  always_comb begin
    rd_data = '0;
    unique case (rd_addr)
      DC_STATUS:     rd_data = {30'd0, vs_seen == 2'd2 && clk_present, clk_present};
      DC_CLK_PERIOD: rd_data = 32'(period_last);
      DC_CLK_AVG:    rd_data = 32'(period_sum);
      DC_H_ACTIVE:   rd_data = 32'(h_active);
      DC_V_ACTIVE:   rd_data = 32'(v_active);
      DC_H_TOTAL:    rd_data = 32'(h_total);
      DC_V_TOTAL:    rd_data = 32'(v_total);
      DC_FRAME_CNT:  rd_data = frame_cnt;
      DC_ERRORS:     rd_data = 32'(errors);
      DC_DTC_CTRL:   rd_data = {16'd0, 8'(dtc_user_delay), 7'd0, dtc_dyn_en};
      DC_DTC_DELAY:  rd_data = 32'(dtc_delay);
      default:       rd_data = '0;
    endcase
  end

endmodule
