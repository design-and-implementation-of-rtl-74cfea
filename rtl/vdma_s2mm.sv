// vdma_s2mm: AXI video to memory - writes captured frames into system memory.
//
// This is the stream-to-memory direction of a video DMA. Software sets the
// frame buffer address, the line size in bytes (HSIZE), the number of lines
// (VSIZE) and the line stride, then sets RUN. At the next frame boundary of
// the stream (the beat after one with tlast) the block captures one frame:
//
//   packer  - takes one pixel per beat, keeps the first HSIZE bytes of each
//             line (BPP bytes per pixel, lowest byte first, so an RGB888
//             pixel lands in memory as B, G, R) and packs them into 64-bit
//             words. A line ends at a beat with tuser. A line that ends early
//             is padded with zero bytes, extra pixels of a long line are
//             dropped, a frame that ends early is completed with zero lines
//             and lines beyond VSIZE are dropped. Each case sets a sticky
//             error bit. Every frame thus writes exactly VSIZE lines of
//             ceil(HSIZE/8) words, never outside the configured buffer.
//   writer  - issues AXI4 INCR bursts of up to BURST_MAX 64-bit beats from a
//             word FIFO, one burst in flight, never crossing a 4 KiB
//             boundary, line i starting at START_ADDR + i*STRIDE.
//
// With NFRAMES = 0, frame after frame is written to the same buffer while
// RUN stays set; clearing RUN stops the block after the frame in progress.
// With NFRAMES = N > 0, setting RUN captures N consecutive frames into one
// long buffer, frame k at START_ADDR + k*FRAME_STRIDE, and RUN clears itself
// after the last. A capture starts
// only when the first beat of a frame is present, so the configuration is
// latched with the frame it describes. Between frames
// the stream is drained so the DPI side never backs up. FRAME_CNT counts
// finished frames and frame_done pulses at each.
//
// From the thesis: the block's role (VDMA between the AXI video stream and
// memory, started and stopped by software around each read), the 64-bit
// memory data width, the concern that a badly handled VDMA overruns memory,
// and the capture of a requested number of frames into one long buffer. The
// register map (VD_* in dsniff_pkg), the buffer layout, the padding rules and
// the burst policy are this design's own; start address, stride and frame
// stride are taken as multiples of 8 (low bits ignored).
module vdma_s2mm
  import dsniff_pkg::*;
#(
  parameter color_fmt_e  COLOR_FMT   = CF_RGB888,
  parameter int unsigned BURST_MAX   = 16,
  parameter int unsigned WFIFO_DEPTH = 32,
  parameter int unsigned CNT_W       = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  // AXI4-Stream video in
  input  logic        s_tvalid,
  output logic        s_tready,
  input  vid_beat_t   s_beat,
  // AXI4 write master
  output axi_wr_req_t m_axi_req,
  input  axi_wr_rsp_t m_axi_rsp,
  // registers
  input  axil_req_t   s_axil_req,
  output axil_rsp_t   s_axil_rsp,
  output logic        frame_done
);

  localparam int unsigned BPP = bytes_per_pixel(COLOR_FMT);
  localparam int unsigned BW  = $clog2(BURST_MAX + 1);

  // ------------------------------------------------------------------
  // Registers
  // ------------------------------------------------------------------
  logic              wr_en, rd_en;
  logic [11:0]       wr_addr, rd_addr;
  logic [31:0]       wr_data, rd_data;
  logic [3:0]        wr_strb;

  logic              run;
  logic [31:0]       start_addr_r;
  logic [CNT_W-1:0]  hsize_r, vsize_r, stride_r;
  logic [31:0]       frame_cnt;
  logic [CNT_W-1:0]  nframes_r;  // frames per run, 0: until RUN is cleared
  logic [31:0]       fstride_r;  // bytes between frame buffers
  logic [31:0]       buf_addr;   // buffer of the next frame
  logic [CNT_W-1:0]  frames_left;
  logic              frame_fin;  // a frame is complete this cycle
  logic [3:0]        err;        // line short, line long, frame short, bresp
  logic [3:0]        err_set;

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

  // ------------------------------------------------------------------
  // Frame control
  // ------------------------------------------------------------------
  typedef enum logic [1:0] {F_IDLE, F_CAPTURE, F_FINISH} fstate_e;
  typedef enum logic [2:0] {P_FILL, P_DROP, P_PAD, P_SKIP, P_DONE} pstate_e;
  typedef enum logic [1:0] {W_IDLE, W_AW, W_DATA, W_RESP} wstate_e;

  fstate_e fstate;
  pstate_e pstate;
  wstate_e wstate;

  logic             at_sof;        // next stream beat starts a frame
  logic [CNT_W-1:0] c_hsize, c_vsize, c_stride, c_wpl;   // latched configuration of the frame
  logic             start;         // frame capture begins this cycle
  logic             writer_done;

  logic beat;                       // a stream beat is taken this cycle
  assign beat = s_tvalid && s_tready;

  assign frame_fin = (fstate == F_FINISH) && writer_done;

  always_comb begin
    start = (fstate == F_IDLE) && run && at_sof && s_tvalid
            && (hsize_r != '0) && (vsize_r != '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fstate     <= F_IDLE;
      at_sof     <= 1'b0;
      c_hsize    <= '0;
      c_vsize    <= '0;
      c_stride   <= '0;
      c_wpl      <= '0;
      frame_cnt  <= '0;
      frame_done <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      if (beat) at_sof <= s_beat.tlast;
      unique case (fstate)
        F_IDLE: if (start) begin
          fstate   <= F_CAPTURE;
          c_hsize  <= hsize_r;
          c_vsize  <= vsize_r;
          c_stride <= {stride_r[CNT_W-1:3], 3'b000};
          c_wpl    <= (hsize_r >> 3) + CNT_W'(hsize_r[2:0] != 3'd0);
        end
        F_CAPTURE: if (pstate == P_DONE) fstate <= F_FINISH;
        F_FINISH: if (frame_fin) begin
          fstate     <= F_IDLE;
          frame_cnt  <= frame_cnt + 1'b1;
          frame_done <= 1'b1;
        end
        default: fstate <= F_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------------------
  // Packer
  // ------------------------------------------------------------------
  logic [127:0]     acc;
  logic [3:0]       nbytes;        // valid bytes in acc, below 8 between beats
  logic [CNT_W-1:0] lb;            // bytes of the line taken
  logic [CNT_W-1:0] we;            // words of the line emitted
  logic [CNT_W-1:0] line;          // line being packed
  logic             zero_lines;    // frame ended early: remaining lines are zero

  logic             wf_push, wf_full, wf_empty, wf_pop;
  logic [63:0]      wf_wdata, wf_rdata;
  logic [$clog2(WFIFO_DEPTH):0] wf_level;

  // Bytes of the current beat that still fit in the line.
  logic [CNT_W-1:0] room;
  logic [2:0]       take;
  logic [127:0]     acc_app;
  logic [4:0]       n_app;
  logic [31:0]      pix_bytes;
  logic             last_line;

  always_comb begin
    room      = c_hsize - lb;
    take      = (room >= CNT_W'(BPP)) ? 3'(BPP) : 3'(room);
    pix_bytes = 32'(s_beat.tdata) & ((32'd1 << (8 * take)) - 32'd1);
    acc_app   = acc | (128'(pix_bytes) << (8 * nbytes));
    n_app     = 5'(nbytes) + 5'(take);
    last_line = (line == c_vsize - 1'b1);
  end

  always_comb begin
    s_tready = 1'b0;
    wf_push  = 1'b0;
    wf_wdata = acc[63:0];
    unique case (fstate)
      F_IDLE:    s_tready = !start;  // drain between frames
      F_CAPTURE: begin
        unique case (pstate)
          P_FILL: begin
            s_tready = !wf_full;
            wf_push  = beat && (n_app >= 5'd8);
            wf_wdata = acc_app[63:0];
          end
          P_DROP, P_SKIP: s_tready = 1'b1;
          P_PAD: wf_push = (we != c_wpl) && !wf_full;
          default: ;
        endcase
      end
      default: s_tready = 1'b0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pstate     <= P_FILL;
      acc        <= '0;
      nbytes     <= '0;
      lb         <= '0;
      we         <= '0;
      line       <= '0;
      zero_lines <= 1'b0;
      err_set    <= '0;
    end else begin
      err_set <= '0;
      if (start) begin
        pstate     <= P_FILL;
        acc        <= '0;
        nbytes     <= '0;
        lb         <= '0;
        we         <= '0;
        line       <= '0;
        zero_lines <= 1'b0;
      end else if (fstate == F_CAPTURE) begin
        unique case (pstate)
          P_FILL: if (beat) begin
            lb <= lb + CNT_W'(take);
            if (n_app >= 5'd8) begin
              acc    <= acc_app >> 64;
              nbytes <= 4'(n_app - 5'd8);
              we     <= we + 1'b1;
            end else begin
              acc    <= acc_app;
              nbytes <= 4'(n_app);
            end
            if (s_beat.tuser || s_beat.tlast) begin
              pstate <= P_PAD;
              if (lb + CNT_W'(take) != c_hsize) err_set[0] <= 1'b1;
              if (s_beat.tlast && !last_line) begin
                zero_lines <= 1'b1;
                err_set[2] <= 1'b1;
              end
            end else if (lb + CNT_W'(take) == c_hsize) begin
              pstate <= P_DROP;
            end
          end
          P_DROP: if (beat) begin
            err_set[1] <= 1'b1;
            if (s_beat.tuser || s_beat.tlast) begin
              pstate <= P_PAD;
              if (s_beat.tlast && !last_line) begin
                zero_lines <= 1'b1;
                err_set[2] <= 1'b1;
              end
            end
          end
          P_PAD: begin
            if (we != c_wpl) begin
              if (!wf_full) begin
                acc    <= acc >> 64;
                nbytes <= (nbytes > 4'd8) ? nbytes - 4'd8 : 4'd0;
                we     <= we + 1'b1;
              end
            end else begin
              // line complete
              lb     <= '0;
              we     <= '0;
              acc    <= '0;
              nbytes <= '0;
              if (last_line) begin
                pstate <= (zero_lines || at_sof) ? P_DONE : P_SKIP;
              end else begin
                line   <= line + 1'b1;
                pstate <= zero_lines ? P_PAD : P_FILL;
              end
            end
          end
          P_SKIP: if (beat && s_beat.tlast) pstate <= P_DONE;
          default: ;
        endcase
      end
    end
  end

  // ------------------------------------------------------------------
  // Word FIFO and AXI4 writer
  // ------------------------------------------------------------------
  sync_fifo #(
    .WIDTH(64),
    .DEPTH(WFIFO_DEPTH)
  ) u_wfifo (
    .clk      (clk),
    .rst_n    (rst_n),
    .wr_en    (wf_push),
    .wdata    (wf_wdata),
    .rd_en    (wf_pop),
    .rdata    (wf_rdata),
    .full     (wf_full),
    .empty    (wf_empty),
    .level    (wf_level),
    .overflow ()
  );

  logic [31:0]      line_addr;
  logic [31:0]      w_addr;
  logic [CNT_W-1:0] wword, wline;
  logic [BW-1:0]    blen, bcnt;
  logic [CNT_W-1:0] left;
  logic [9:0]       to_4k;
  logic [BW-1:0]    blen_next;

  always_comb begin
    w_addr    = line_addr + 32'({wword, 3'b000});
    left      = c_wpl - wword;
    to_4k     = 10'((13'd4096 - {1'b0, w_addr[11:0]}) >> 3);
    blen_next = BW'(BURST_MAX);
    if (left < CNT_W'(blen_next)) blen_next = BW'(left);
    if (to_4k < 10'(blen_next))   blen_next = BW'(to_4k);
  end

  always_comb begin
    m_axi_req         = '0;
    m_axi_req.awaddr  = w_addr;
    m_axi_req.awlen   = 8'(blen - 1'b1);
    m_axi_req.awsize  = 3'd3;
    m_axi_req.awburst = 2'b01;
    m_axi_req.awvalid = (wstate == W_AW) && (blen != '0) && (wf_level >= ($clog2(WFIFO_DEPTH)+1)'(blen));
    m_axi_req.wvalid  = (wstate == W_DATA) && !wf_empty;
    m_axi_req.wdata   = wf_rdata;
    m_axi_req.wstrb   = '1;
    m_axi_req.wlast   = (bcnt == blen - 1'b1);
    m_axi_req.bready  = (wstate == W_RESP);
    wf_pop            = m_axi_req.wvalid && m_axi_rsp.wready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wstate      <= W_IDLE;
      line_addr   <= '0;
      wword       <= '0;
      wline       <= '0;
      blen        <= '0;
      bcnt        <= '0;
      writer_done <= 1'b0;
    end else begin
      if (start) begin
        wstate      <= W_AW;
        line_addr   <= {buf_addr[31:3], 3'b000};
        wword       <= '0;
        wline       <= '0;
        writer_done <= 1'b0;
        blen        <= '0;
      end else begin
        unique case (wstate)
          W_AW: begin
            if (blen == '0) blen <= blen_next;      // size the burst first
            else if (m_axi_req.awvalid && m_axi_rsp.awready) begin
              wstate <= W_DATA;
              bcnt   <= '0;
            end
          end
          W_DATA: if (wf_pop) begin
            bcnt <= bcnt + 1'b1;
            if (m_axi_req.wlast) wstate <= W_RESP;
          end
          W_RESP: if (m_axi_rsp.bvalid) begin
            blen <= '0;
            if (wword + CNT_W'(blen) == c_wpl) begin
              wword     <= '0;
              line_addr <= line_addr + 32'(c_stride);
              wline     <= wline + 1'b1;
              if (wline + 1'b1 == c_vsize) begin
                wstate      <= W_IDLE;
                writer_done <= 1'b1;
              end else begin
                wstate <= W_AW;
              end
            end else begin
              wword  <= wword + CNT_W'(blen);
              wstate <= W_AW;
            end
          end
          default: ;
        endcase
      end
    end
  end

  // ------------------------------------------------------------------
  // Register access
  // ------------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run          <= 1'b0;
      start_addr_r <= '0;
      hsize_r      <= '0;
      vsize_r      <= '0;
      stride_r     <= '0;
      err          <= '0;
      nframes_r    <= '0;
      fstride_r    <= '0;
      buf_addr     <= '0;
      frames_left  <= '0;
    end else begin
      // multiple frames: step to the next buffer, stop after the last one
      if (nframes_r == '0) begin
        buf_addr <= start_addr_r;
      end else if (frame_fin) begin
        buf_addr    <= buf_addr + fstride_r;
        frames_left <= frames_left - 1'b1;
        if (frames_left == CNT_W'(1)) run <= 1'b0;
      end
      if (wr_en) begin
        unique case (wr_addr)
          VD_CTRL: begin
            run         <= wr_data[0];
            buf_addr    <= start_addr_r;
            frames_left <= nframes_r;
          end
          VD_START_ADDR: start_addr_r <= wr_data;
          VD_HSIZE:      hsize_r      <= CNT_W'(wr_data);
          VD_VSIZE:      vsize_r      <= CNT_W'(wr_data);
          VD_STRIDE:     stride_r     <= CNT_W'(wr_data);
          VD_NFRAMES:    nframes_r    <= CNT_W'(wr_data);
          VD_FRAME_STRIDE: fstride_r  <= wr_data;
          default: ;
        endcase
      end
      err <= ((wr_en && wr_addr == VD_STATUS) ? (err & ~wr_data[11:8]) : err)
             | err_set
             | {(m_axi_rsp.bvalid && m_axi_req.bready && m_axi_rsp.bresp != RESP_OKAY),
                3'b000};
    end
  end

  always_comb begin
    rd_data = '0;
    unique case (rd_addr)
      VD_CTRL:       rd_data = {31'd0, run};
      VD_STATUS:     rd_data = {20'd0, err, 6'd0, fstate != F_IDLE, fstate == F_IDLE && !run};
      VD_START_ADDR: rd_data = start_addr_r;
      VD_HSIZE:      rd_data = 32'(hsize_r);
      VD_VSIZE:      rd_data = 32'(vsize_r);
      VD_STRIDE:     rd_data = 32'(stride_r);
      VD_FRAME_CNT:  rd_data = frame_cnt;
      VD_NFRAMES:    rd_data = 32'(nframes_r);
      VD_FRAME_STRIDE: rd_data = fstride_r;
      default:       rd_data = '0;
    endcase
  end

  // ------------------------------------------------------------------
  // Protocol checks
  // ------------------------------------------------------------------
  a_aw_stable: assert property (@(posedge clk) disable iff (!rst_n)
    m_axi_req.awvalid && !m_axi_rsp.awready |=> m_axi_req.awvalid && $stable(m_axi_req.awaddr));
  a_w_stable: assert property (@(posedge clk) disable iff (!rst_n)
    m_axi_req.wvalid && !m_axi_rsp.wready |=> m_axi_req.wvalid && $stable(m_axi_req.wdata));
  a_no_4k_cross: assert property (@(posedge clk) disable iff (!rst_n)
    m_axi_req.awvalid |-> (32'(m_axi_req.awaddr[11:0]) + 32'(m_axi_req.awlen) * 8 + 8) <= 32'd4096);

endmodule
