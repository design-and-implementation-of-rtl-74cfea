// dpi_source_model: behavioural display controller driving a display
// parallel interface (stands in for the external video source). It produces
// frames of H_ACTIVE x V_ACTIVE pixels with front porch, sync and back porch
// in both directions, active-low HSYNC and VSYNC, DE high on active pixels.
// The pixel clock has a period of PCLK_PERIOD time units.
//
// After each rising pixel clock edge the controller changes DE, HSYNC and
// VSYNC at SETTLE time units; the colour lines then carry an unsettled value
// (the inverse of the pixel) until DATA_LAG time units, when the pixel's
// colour appears. This models a controller whose data trail its clock, the
// situation timing correction exists for. SETTLE <= DATA_LAG < PCLK_PERIOD;
// SETTLE == DATA_LAG gives clean transitions.
//
// The colour of pixel (x, y) of frame f is pix_value(f, x, y); blanking
// pixels drive 0. frames_sent counts completed frames. Setting enable low
// stops the clock (held low) at the end of the current frame.
module dpi_source_model #(
  parameter int unsigned H_ACTIVE    = 8,
  parameter int unsigned H_FP        = 2,
  parameter int unsigned H_SYNC      = 2,
  parameter int unsigned H_BP        = 2,
  parameter int unsigned V_ACTIVE    = 4,
  parameter int unsigned V_FP        = 1,
  parameter int unsigned V_SYNC      = 1,
  parameter int unsigned V_BP        = 1,
  parameter int unsigned PCLK_PERIOD = 50,
  parameter int unsigned SETTLE      = 20,
  parameter int unsigned DATA_LAG    = 20
) (
  input  logic        enable,
  output logic        pclk,
  output logic        de,
  output logic        hsync,
  output logic        vsync,
  output logic [23:0] data,
  output int unsigned frames_sent
);

  localparam int unsigned H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;

  function automatic logic [23:0] pix_value(int unsigned f, int unsigned x, int unsigned y);
    return {8'(x * 3 + f), 8'(y * 5 + 1), 8'(x ^ (y << 2))};
  endfunction

  // Lines of pixel (x, y) of frame f, started at its rising clock edge.
  task automatic drive(int unsigned f, int unsigned x, int unsigned y);
    logic [23:0] v;
    #(SETTLE);
    de    = (x < H_ACTIVE) && (y < V_ACTIVE);
    hsync = !((x >= H_ACTIVE + H_FP) && (x < H_ACTIVE + H_FP + H_SYNC));
    vsync = !((y >= V_ACTIVE + V_FP) && (y < V_ACTIVE + V_FP + V_SYNC));
    v     = de ? pix_value(f, x, y) : 24'd0;
    if (DATA_LAG > SETTLE) begin
      data = ~v;
      #(DATA_LAG - SETTLE);
    end
    data = v;
  endtask

  // Layout per line: active, front porch, sync, back porch. The clock stays
  // low between frames while enable is low.
  initial begin
    pclk = 1'b0; de = 1'b0; hsync = 1'b1; vsync = 1'b1; data = '0;
    frames_sent = 0;
    forever begin
      if (!enable) begin
        #(PCLK_PERIOD);
      end else begin
        for (int unsigned y = 0; y < V_TOTAL; y++) begin
          for (int unsigned x = 0; x < H_TOTAL; x++) begin
            automatic int unsigned f = frames_sent, px = x, py = y;
            pclk = 1'b1;
            fork
              drive(f, px, py);
            join_none
            #(PCLK_PERIOD / 2);
            pclk = 1'b0;
            #(PCLK_PERIOD - PCLK_PERIOD / 2);
          end
        end
        frames_sent++;
      end
    end
  end

endmodule
