// dpi_input_sync: oversampling front end for the display parallel interface.
//
// The sniffer does not use the DPI pixel clock as a clock. It samples every
// DPI line, the pixel clock included, with the much faster system clock (the
// thesis recommends a system clock at least five times the pixel clock). Each
// line passes through SYNC_STAGES flip-flops to settle metastability, then the
// synchronised pixel clock is compared with its previous value to find its
// active (rising) edge. The synchronised DE, HSYNC, VSYNC and data follow with
// the same latency, so later stages see the lines in their original relation.
//
// HSYNC and VSYNC are converted to active-high here. Their polarity is a
// parameter; the default (active low) is this design's choice, matching the
// low-going pulses drawn in the thesis's DPI timing diagrams. DE is active
// high.
//
// Interface: dpi_* are asynchronous pins. smp is the synchronised sample,
// valid every cycle; pclk_edge pulses in the first cycle in which the
// synchronised pixel clock is high, and smp in that cycle was sampled at the
// same instant as that clock level.
// Timing: SYNC_STAGES cycles from a pin change to smp and pclk_edge.
module dpi_input_sync
  import dsniff_pkg::*;
#(
  parameter int unsigned SYNC_STAGES     = 2,
  parameter bit          HSYNC_ACTIVE_LOW = 1'b1,
  parameter bit          VSYNC_ACTIVE_LOW = 1'b1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  dpi_pclk,
  input  logic                  dpi_de,
  input  logic                  dpi_hsync,
  input  logic                  dpi_vsync,
  input  logic [DPI_DATA_W-1:0] dpi_data,
  output dpi_sample_t           smp,
  output logic                  pclk_edge
);

  localparam int unsigned LW = DPI_DATA_W + 4;

  logic [LW-1:0] sync_q [SYNC_STAGES];
  logic          pclk_prev;
  logic          pclk_lvl;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < SYNC_STAGES; i++) sync_q[i] <= '0;
      pclk_prev <= 1'b0;
    end else begin
      sync_q[0] <= {dpi_pclk, dpi_de, dpi_hsync ^ HSYNC_ACTIVE_LOW,
                    dpi_vsync ^ VSYNC_ACTIVE_LOW, dpi_data};
      for (int i = 1; i < SYNC_STAGES; i++) sync_q[i] <= sync_q[i-1];
      pclk_prev <= sync_q[SYNC_STAGES-1][LW-1];
    end
  end

  always_comb begin
    pclk_lvl  = sync_q[SYNC_STAGES-1][LW-1];
    smp.de    = sync_q[SYNC_STAGES-1][LW-2];
    smp.hsync = sync_q[SYNC_STAGES-1][LW-3];
    smp.vsync = sync_q[SYNC_STAGES-1][LW-4];
    smp.data  = sync_q[SYNC_STAGES-1][DPI_DATA_W-1:0];
    pclk_edge = pclk_lvl & ~pclk_prev;
  end

endmodule
