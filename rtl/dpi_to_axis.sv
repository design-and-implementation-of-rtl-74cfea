// dpi_to_axis: turns corrected DPI pixel samples into an AXI4-Stream video
// stream.
//
// The signal mapping follows the thesis's DPI to AXI table: data enable
// becomes the stream's valid, HSYNC marks the end of a line on tuser and VSYNC
// the end of a frame on tlast, and the colour lines become tdata. Because the
// syncs arrive after the last pixel they close, the converter holds one pixel
// back: a held pixel is sent as an ordinary pixel when the next DE pixel
// arrives in the same line, with tuser set when an HSYNC came in between, and
// with tuser and tlast set when a VSYNC arrives. Using a one-pixel hold for
// this is this design's choice.
//
// The colour format is fixed at build time (the thesis builds one bitstream
// per format). tdata is the pixel packed LSB-aligned: RGB888 {R,G,B} in 24
// bits, RGB666 {R[7:2],G[7:2],B[7:2]} in 18 bits, RGB565 {R[7:3],G[7:2],B[7:3]}
// in 16 bits. That the narrower formats use the upper lines of each colour
// on the 24-line bus is this design's assumption.
//
// The DPI side cannot be stalled, so beats pass through a FIFO of FIFO_DEPTH
// entries (depth chosen here); when it is full the beat is dropped and
// overflow pulses.
//
// Interface: pix_valid/pix from dpi_timing_corr, one sample per pixel clock.
// m_tvalid/m_tready/m_beat is the AXI4-Stream master. Latency: a pixel leaves
// the hold register when the following pixel or sync arrives, and appears on
// the stream one cycle later.
module dpi_to_axis
  import dsniff_pkg::*;
#(
  parameter color_fmt_e  COLOR_FMT  = CF_RGB888,
  parameter int unsigned FIFO_DEPTH = 512
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        pix_valid,
  input  dpi_sample_t pix,
  output logic        m_tvalid,
  input  logic        m_tready,
  output vid_beat_t   m_beat,
  output logic        overflow
);

  logic [PIX_W-1:0] packed_pix;
  always_comb begin
    unique case (COLOR_FMT)
      CF_RGB666: packed_pix = PIX_W'({pix.data[23:18], pix.data[15:10], pix.data[7:2]});
      CF_RGB565: packed_pix = PIX_W'({pix.data[23:19], pix.data[15:10], pix.data[7:3]});
      default:   packed_pix = pix.data;
    endcase
  end

  // One-pixel hold register.
  logic             held_v;
  logic             line_closed;   // an HSYNC came after the held pixel
  logic [PIX_W-1:0] held;
  logic             push;
  vid_beat_t        push_beat;

  always_comb begin
    push      = 1'b0;
    push_beat = '{tdata: held, tuser: 1'b0, tlast: 1'b0};
    if (pix_valid && held_v) begin
      if (pix.vsync) begin
        push      = 1'b1;
        push_beat = '{tdata: held, tuser: 1'b1, tlast: 1'b1};
      end else if (pix.de) begin
        push      = 1'b1;
        push_beat = '{tdata: held, tuser: line_closed, tlast: 1'b0};
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      held_v      <= 1'b0;
      line_closed <= 1'b0;
      held        <= '0;
    end else if (pix_valid) begin
      if (pix.de) begin
        held_v      <= 1'b1;
        held        <= packed_pix;
        line_closed <= 1'b0;
      end else if (pix.vsync) begin
        held_v      <= 1'b0;
        line_closed <= 1'b0;
      end else if (pix.hsync && held_v) begin
        line_closed <= 1'b1;
      end
    end
  end

  logic fifo_empty;
  logic fifo_full;
  logic [$clog2(FIFO_DEPTH):0] fifo_level;

  sync_fifo #(
    .WIDTH($bits(vid_beat_t)),
    .DEPTH(FIFO_DEPTH)
  ) u_fifo (
    .clk      (clk),
    .rst_n    (rst_n),
    .wr_en    (push),
    .wdata    (push_beat),
    .rd_en    (m_tready),
    .rdata    (m_beat),
    .full     (fifo_full),
    .empty    (fifo_empty),
    .level    (fifo_level),
    .overflow (overflow)
  );

  assign m_tvalid = !fifo_empty;

endmodule
