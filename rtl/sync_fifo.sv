// sync_fifo: single-clock first-in first-out buffer.
//
// DEPTH entries of WIDTH bits held in a memory array with read and write
// pointers one bit wider than the address, so full and empty are told apart.
// The read side is show-ahead: rdata holds the oldest entry whenever empty is
// low, and rd_en removes it. A write while full is ignored and reported on
// the registered overflow pulse; a read while empty is ignored. level counts
// the entries held. Used as the pixel FIFO of the DPI to stream converter and
// as the word FIFO of the frame writer; the structure is this design's own.
module sync_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  logic [WIDTH-1:0]         wdata,
  input  logic                     rd_en,
  output logic [WIDTH-1:0]         rdata,
  output logic                     full,
  output logic                     empty,
  output logic [$clog2(DEPTH):0]   level,
  output logic                     overflow
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wptr, rptr;
  logic             do_wr, do_rd;

  always_comb begin
    level = wptr - rptr;
    full  = (level == (AW+1)'(DEPTH));
    empty = (level == '0);
    do_wr = wr_en && !full;
    do_rd = rd_en && !empty;
    rdata = mem[rptr[AW-1:0]];
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr[AW-1:0]] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr     <= '0;
      rptr     <= '0;
      overflow <= 1'b0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
      overflow <= wr_en && full;
    end
  end

  // DEPTH must be a power of two for the pointer arithmetic.
  initial assert (DEPTH == 2**AW) else $error("sync_fifo: DEPTH must be a power of two");

endmodule
