// dsniff_top: programmable-logic part of the display sniffer.
//
// The sniffer sits on the display parallel interface (DPI) between a display
// controller and its display, listens without driving anything, and puts each
// frame it sees into system memory for software to fetch. The data path is
// the one of the thesis: DPI capture -> timing adjustment -> DPI to AXI video
// -> AXI video to memory, with a display check block beside it.
//
//   dpi_input_sync    samples the DPI lines, pixel clock included, with the
//                     system clock (at least 5x the pixel clock)
//   clk_freq_meter    measures the pixel clock period
//   dpi_timing_corr   captures each pixel a delay after its clock edge
//                     (dynamic part from the measured period, plus user delay)
//   dpi_to_axis       DE -> tvalid, HSYNC -> tuser, VSYNC -> tlast, FIFO
//   vdma_s2mm         packs pixels into 64-bit words, AXI4 bursts to memory
//   disp_check        resolution, clock, frame count, error flags, DTC control
//   axil_interconnect routes the software port to disp_check (offset 0x0000)
//                     and vdma_s2mm (offset 0x1000)
//
// Ports: one system clock and active-low asynchronous reset; the DPI pins
// (asynchronous inputs); an AXI4-Lite slave for the processing system's
// register accesses; an AXI4 write-only master (64-bit) towards the memory
// port of the processing system; frame_done pulses when a frame is in memory.
// All ports are plain signals or the packed structs of dsniff_pkg.
module dsniff_top
  import dsniff_pkg::*;
#(
  parameter color_fmt_e  COLOR_FMT        = CF_RGB888,
  parameter int unsigned SYNC_STAGES      = 2,
  parameter bit          HSYNC_ACTIVE_LOW = 1'b1,
  parameter bit          VSYNC_ACTIVE_LOW = 1'b1,
  parameter int unsigned CNT_W            = 16,
  parameter int unsigned AVG_LOG2         = 4,
  parameter int unsigned CLK_TIMEOUT      = 4096,
  parameter int unsigned DELAY_W          = 8,
  parameter int unsigned FIFO_DEPTH       = 512,
  parameter int unsigned BURST_MAX        = 16,
  parameter logic [31:0] AXIL_BASE        = 32'h0000_0000
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // DPI pins
  input  logic                  dpi_pclk,
  input  logic                  dpi_de,
  input  logic                  dpi_hsync,
  input  logic                  dpi_vsync,
  input  logic [DPI_DATA_W-1:0] dpi_data,
  // register port from the processing system
  input  axil_req_t             s_axil_req,
  output axil_rsp_t             s_axil_rsp,
  // frame writes to memory
  output axi_wr_req_t           m_axi_req,
  input  axi_wr_rsp_t           m_axi_rsp,
  output logic                  frame_done
);

  // capture front end
  dpi_sample_t smp;
  logic        pclk_edge;

  dpi_input_sync #(
    .SYNC_STAGES      (SYNC_STAGES),
    .HSYNC_ACTIVE_LOW (HSYNC_ACTIVE_LOW),
    .VSYNC_ACTIVE_LOW (VSYNC_ACTIVE_LOW)
  ) u_sync (
    .clk       (clk),
    .rst_n     (rst_n),
    .dpi_pclk  (dpi_pclk),
    .dpi_de    (dpi_de),
    .dpi_hsync (dpi_hsync),
    .dpi_vsync (dpi_vsync),
    .dpi_data  (dpi_data),
    .smp       (smp),
    .pclk_edge (pclk_edge)
  );

  // pixel clock measurement
  logic [CNT_W-1:0]          period_last;
  logic [CNT_W+AVG_LOG2-1:0] period_sum;
  logic                      period_valid, clk_present, clk_lost;

  clk_freq_meter #(
    .CNT_W    (CNT_W),
    .AVG_LOG2 (AVG_LOG2),
    .TIMEOUT  (CLK_TIMEOUT)
  ) u_freq (
    .clk          (clk),
    .rst_n        (rst_n),
    .pclk_edge    (pclk_edge),
    .period_last  (period_last),
    .period_sum   (period_sum),
    .period_valid (period_valid),
    .present      (clk_present),
    .lost         (clk_lost)
  );

  // timing correction; the dynamic part uses the averaged period
  logic               dtc_dyn_en, dtc_miss, pix_valid;
  logic [DELAY_W-1:0] dtc_user_delay, dtc_delay;
  dpi_sample_t        pix;

  dpi_timing_corr #(
    .DELAY_W (DELAY_W),
    .CNT_W   (CNT_W)
  ) u_dtc (
    .clk          (clk),
    .rst_n        (rst_n),
    .smp          (smp),
    .pclk_edge    (pclk_edge),
    .period       (CNT_W'(period_sum >> AVG_LOG2)),
    .period_valid (period_valid),
    .dyn_en       (dtc_dyn_en),
    .user_delay   (dtc_user_delay),
    .delay        (dtc_delay),
    .pix_valid    (pix_valid),
    .pix          (pix),
    .miss         (dtc_miss)
  );

  // DPI to AXI4-Stream video
  logic      vid_tvalid, vid_tready, fifo_overflow;
  vid_beat_t vid_beat;

  dpi_to_axis #(
    .COLOR_FMT  (COLOR_FMT),
    .FIFO_DEPTH (FIFO_DEPTH)
  ) u_d2a (
    .clk       (clk),
    .rst_n     (rst_n),
    .pix_valid (pix_valid),
    .pix       (pix),
    .m_tvalid  (vid_tvalid),
    .m_tready  (vid_tready),
    .m_beat    (vid_beat),
    .overflow  (fifo_overflow)
  );

  // register interconnect
  axil_req_t reg_req [2];
  axil_rsp_t reg_rsp [2];

  axil_interconnect #(
    .N_SLAVES (2),
    .BASE     (AXIL_BASE)
  ) u_xbar (
    .clk   (clk),
    .rst_n (rst_n),
    .s_req (s_axil_req),
    .s_rsp (s_axil_rsp),
    .m_req (reg_req),
    .m_rsp (reg_rsp)
  );

  // display check
  disp_check #(
    .CNT_W    (CNT_W),
    .AVG_LOG2 (AVG_LOG2),
    .DELAY_W  (DELAY_W)
  ) u_check (
    .clk            (clk),
    .rst_n          (rst_n),
    .pix_valid      (pix_valid),
    .pix            (pix),
    .period_last    (period_last),
    .period_sum     (period_sum),
    .clk_present    (clk_present),
    .clk_lost       (clk_lost),
    .dtc_miss       (dtc_miss),
    .fifo_overflow  (fifo_overflow),
    .dtc_delay      (dtc_delay),
    .dtc_dyn_en     (dtc_dyn_en),
    .dtc_user_delay (dtc_user_delay),
    .s_axil_req     (reg_req[0]),
    .s_axil_rsp     (reg_rsp[0])
  );

  // AXI video to memory
  vdma_s2mm #(
    .COLOR_FMT (COLOR_FMT),
    .BURST_MAX (BURST_MAX),
    .CNT_W     (CNT_W)
  ) u_vdma (
    .clk        (clk),
    .rst_n      (rst_n),
    .s_tvalid   (vid_tvalid),
    .s_tready   (vid_tready),
    .s_beat     (vid_beat),
    .m_axi_req  (m_axi_req),
    .m_axi_rsp  (m_axi_rsp),
    .s_axil_req (reg_req[1]),
    .s_axil_rsp (reg_rsp[1]),
    .frame_done (frame_done)
  );

endmodule
