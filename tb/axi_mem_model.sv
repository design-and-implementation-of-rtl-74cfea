// axi_mem_model: behavioural AXI4 write-only memory for testbenches (stands
// in for the processing system's memory port and DDR). It accepts one burst
// at a time, stalls AWREADY and WREADY at random (STALL_PCT percent of
// cycles), stores the bytes selected by WSTRB and answers each burst with
// BRESP. It checks the AXI rules the writer must follow (INCR bursts of
// 8-byte beats, WLAST on the last beat only, no 4 KiB crossing, address
// inside the memory) and counts bursts, beats and stall cycles.
module axi_mem_model
  import dsniff_pkg::*;
#(
  parameter int unsigned MEM_BYTES = 1 << 16,
  parameter int unsigned STALL_PCT = 30
) (
  input  logic        clk,
  input  logic        rst_n,
  input  axi_wr_req_t req,
  output axi_wr_rsp_t rsp,
  input  logic        force_stall,   // hold WREADY low while set
  input  logic        err_resp       // answer bursts with SLVERR while set
);

  logic [7:0] mem [MEM_BYTES];
  int unsigned bursts, beats, stalls, rule_errors;

  logic        in_burst;
  logic [31:0] addr;
  int unsigned beat_i, len;

  initial begin
    for (int i = 0; i < MEM_BYTES; i++) mem[i] = 8'hEE;
    bursts = 0; beats = 0; stalls = 0; rule_errors = 0;
    in_burst = 1'b0;
    rsp = '0;
  end

  always @(negedge clk) begin
    // choose ready for the coming rising edge
    rsp.awready = !in_burst && !rsp.bvalid && ($urandom_range(99) >= STALL_PCT);
    rsp.wready  = in_burst && !force_stall && ($urandom_range(99) >= STALL_PCT);
    if (in_burst && req.wvalid && !rsp.wready) stalls++;
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      in_burst = 1'b0;
      rsp.bvalid <= 1'b0;
    end else begin
      if (rsp.bvalid && req.bready) rsp.bvalid <= 1'b0;
      if (req.wvalid && rsp.wready && in_burst) begin
        for (int b = 0; b < 8; b++)
          if (req.wstrb[b]) mem[(addr + 32'(b)) % MEM_BYTES] = req.wdata[8*b +: 8];
        beats++;
        if (req.wlast != (beat_i == len - 1)) begin
          rule_errors++;
          $display("axi_mem_model: WLAST wrong at beat %0d of %0d", beat_i, len);
        end
        addr   = addr + 8;
        beat_i = beat_i + 1;
        if (beat_i == len) begin
          in_burst   = 1'b0;
          rsp.bvalid <= 1'b1;
          rsp.bresp  <= err_resp ? RESP_SLVERR : RESP_OKAY;
        end
      end
      if (req.awvalid && rsp.awready) begin
        addr     = req.awaddr;
        len      = int'(req.awlen) + 1;
        beat_i   = 0;
        in_burst = 1'b1;
        bursts++;
        if (req.awburst != 2'b01 || req.awsize != 3'd3) begin
          rule_errors++;
          $display("axi_mem_model: burst type/size wrong");
        end
        if ((req.awaddr & 32'hFFF) + 32'(len * 8) > 32'h1000) begin
          rule_errors++;
          $display("axi_mem_model: burst at %h len %0d crosses 4 KiB", req.awaddr, len);
        end
        if (req.awaddr + 32'(len * 8) > 32'(MEM_BYTES)) begin
          rule_errors++;
          $display("axi_mem_model: burst at %h outside memory", req.awaddr);
        end
      end
    end
  end

endmodule
