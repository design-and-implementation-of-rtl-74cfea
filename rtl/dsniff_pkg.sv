// dsniff_pkg: types and constants shared by the display sniffer.
//
// The sniffer samples a display parallel interface (DPI: pixel clock, data
// enable, horizontal and vertical sync, 24 colour lines R[7:0] G[7:0] B[7:0])
// with one fast system clock, corrects the sampling instant, turns the pixels
// into an AXI4-Stream video stream and writes whole frames to memory with
// AXI4 bursts. Software reaches the control and status registers through
// AXI4-Lite. Everything runs in the single system clock domain.
//
// The 24-line DPI bus, the colour formats and the 64-bit memory data width
// follow the thesis this design is based on. The register maps, the struct
// layouts of the AXI channels and the 32-bit address width are this design's
// own choices.
package dsniff_pkg;

  // ---------------------------------------------------------------------
  // DPI
  // ---------------------------------------------------------------------
  localparam int unsigned DPI_DATA_W = 24;  // R[7:0], G[7:0], B[7:0]

  // One DPI sample, with syncs already converted to active-high.
  typedef struct packed {
    logic                  de;
    logic                  hsync;
    logic                  vsync;
    logic [DPI_DATA_W-1:0] data;   // {R, G, B}
  } dpi_sample_t;

  // Colour format the sniffer is built for (one bitstream per format).
  typedef enum logic [1:0] {
    CF_RGB888 = 2'd0,
    CF_RGB666 = 2'd1,
    CF_RGB565 = 2'd2
  } color_fmt_e;

  // Bytes a pixel of the given format occupies in memory.
  function automatic int unsigned bytes_per_pixel(color_fmt_e fmt);
    case (fmt)
      CF_RGB565: return 2;
      default:   return 3;
    endcase
  endfunction

  // ---------------------------------------------------------------------
  // AXI4-Stream video (one pixel per beat)
  // tuser marks the last pixel of a line, tlast the last pixel of a frame.
  // ---------------------------------------------------------------------
  localparam int unsigned PIX_W = 24;

  typedef struct packed {
    logic [PIX_W-1:0] tdata;
    logic             tuser;  // end of line
    logic             tlast;  // end of frame
  } vid_beat_t;

  // ---------------------------------------------------------------------
  // AXI4-Lite (32-bit address and data)
  // ---------------------------------------------------------------------
  localparam int unsigned AXIL_AW = 32;
  localparam int unsigned AXIL_DW = 32;

  typedef enum logic [1:0] {
    RESP_OKAY   = 2'b00,
    RESP_EXOKAY = 2'b01,
    RESP_SLVERR = 2'b10,
    RESP_DECERR = 2'b11
  } axi_resp_e;

  typedef struct packed {
    logic               awvalid;
    logic [AXIL_AW-1:0] awaddr;
    logic               wvalid;
    logic [AXIL_DW-1:0] wdata;
    logic [3:0]         wstrb;
    logic               bready;
    logic               arvalid;
    logic [AXIL_AW-1:0] araddr;
    logic               rready;
  } axil_req_t;

  typedef struct packed {
    logic               awready;
    logic               wready;
    logic               bvalid;
    axi_resp_e          bresp;
    logic               arready;
    logic               rvalid;
    logic [AXIL_DW-1:0] rdata;
    axi_resp_e          rresp;
  } axil_rsp_t;

  // ---------------------------------------------------------------------
  // AXI4 write-only master (frame writes), 64-bit data
  // ---------------------------------------------------------------------
  localparam int unsigned MEM_AW = 32;
  localparam int unsigned MEM_DW = 64;

  typedef struct packed {
    logic              awvalid;
    logic [MEM_AW-1:0] awaddr;
    logic [7:0]        awlen;    // beats - 1
    logic [2:0]        awsize;   // log2(bytes per beat)
    logic [1:0]        awburst;  // 2'b01 = INCR
    logic              wvalid;
    logic [MEM_DW-1:0] wdata;
    logic [MEM_DW/8-1:0] wstrb;
    logic              wlast;
    logic              bready;
  } axi_wr_req_t;

  typedef struct packed {
    logic      awready;
    logic      wready;
    logic      bvalid;
    axi_resp_e bresp;
  } axi_wr_rsp_t;

  // ---------------------------------------------------------------------
  // Register maps (byte offsets inside each 4 KiB window)
  // ---------------------------------------------------------------------
  // Display check window (base 0x0000)
  localparam logic [11:0] DC_STATUS      = 12'h000; // [0] clock present [1] resolution valid
  localparam logic [11:0] DC_CLK_PERIOD  = 12'h004; // last DPI clock period, system cycles
  localparam logic [11:0] DC_CLK_AVG     = 12'h008; // sum of 2^AVG_LOG2 periods
  localparam logic [11:0] DC_H_ACTIVE    = 12'h00C; // DE pixels per line
  localparam logic [11:0] DC_V_ACTIVE    = 12'h010; // lines with DE per frame
  localparam logic [11:0] DC_H_TOTAL     = 12'h014; // pixel clocks between HSYNC starts
  localparam logic [11:0] DC_V_TOTAL     = 12'h018; // HSYNC starts between VSYNC starts
  localparam logic [11:0] DC_FRAME_CNT   = 12'h01C; // VSYNC starts seen
  localparam logic [11:0] DC_ERRORS      = 12'h020; // sticky, write 1 to clear
  localparam logic [11:0] DC_DTC_CTRL    = 12'h024; // [0] dynamic enable [15:8] user delay
  localparam logic [11:0] DC_DTC_DELAY   = 12'h028; // delay in use, system cycles

  // Error bits of DC_ERRORS
  localparam int unsigned ERR_DTC_MISS   = 0; // DPI edge came before the delayed capture
  localparam int unsigned ERR_FIFO_OVF   = 1; // stream FIFO full, pixel dropped
  localparam int unsigned ERR_LINE_LEN   = 2; // active line length changed
  localparam int unsigned ERR_CLK_LOST   = 3; // DPI clock stopped

  // VDMA window (base 0x1000)
  localparam logic [11:0] VD_CTRL        = 12'h000; // [0] run
  localparam logic [11:0] VD_STATUS      = 12'h004; // [0] halted [1] busy; [8..11] sticky errors, W1C
  localparam logic [11:0] VD_START_ADDR  = 12'h008;
  localparam logic [11:0] VD_HSIZE       = 12'h00C; // bytes per line
  localparam logic [11:0] VD_VSIZE       = 12'h010; // lines per frame
  localparam logic [11:0] VD_STRIDE      = 12'h014; // bytes between line starts
  localparam logic [11:0] VD_FRAME_CNT   = 12'h018; // frames written
  localparam logic [11:0] VD_NFRAMES     = 12'h01C; // frames per run, 0 = until stopped
  localparam logic [11:0] VD_FRAME_STRIDE = 12'h020; // bytes between frame buffers

  localparam int unsigned VERR_LINE_SHORT  = 8;  // line ended before HSIZE bytes
  localparam int unsigned VERR_LINE_LONG   = 9;  // line longer than HSIZE bytes
  localparam int unsigned VERR_FRAME_SHORT = 10; // frame ended before VSIZE lines
  localparam int unsigned VERR_BRESP       = 11; // memory returned an error response

endpackage
