// gaussian_pyramid: one octave of four Gaussian scales.
//
// A single 5 x 5 line-buffer window of the incoming image feeds four
// gaussian_filter instances in parallel, one per scale, with sigma growing by
// sqrt(2) from scale to scale (0.7, 1.0, 1.4, 2.0). All four blurred images
// leave in step, one sample per window, with the window centre coordinates.
//
// Interface: pix_valid/pix, raster order, at most one pixel per clock, frame
// size WIDTH x HEIGHT. Output: (WIDTH-4) x (HEIGHT-4) samples per frame,
// g_x/g_y being the image coordinates of each sample, g_last on the last one.
// Latency: two clocks (window, filter).
//
// Four scales and one octave follow the paper; the sigmas, the 5 x 5 kernel
// and sharing one line buffer among the scales are this design's choices.
module gaussian_pyramid
  import sift_pkg::*;
#(
  parameter int unsigned WIDTH  = IMG_W,
  parameter int unsigned HEIGHT = IMG_H
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       pix_valid,
  input  pixel_t                     pix,
  output logic                       g_valid,
  output pixel_t                     g_pix [4],
  output logic [$clog2(WIDTH)-1:0]   g_x,
  output logic [$clog2(HEIGHT)-1:0]  g_y,
  output logic                       g_last
);

  logic                       w_valid, w_last;
  logic [4:0][4:0][7:0]       w_win;
  logic [$clog2(WIDTH)-1:0]   w_x;
  logic [$clog2(HEIGHT)-1:0]  w_y;
  logic [3:0]                 f_valid;

  line_window #(.WIDTH(WIDTH), .HEIGHT(HEIGHT), .K(5), .DW(8)) u_win (
    .clk, .rst_n,
    .in_valid (pix_valid),
    .in_data  (pix),
    .out_valid(w_valid),
    .out_win  (w_win),
    .out_x    (w_x),
    .out_y    (w_y),
    .out_last (w_last)
  );

  localparam kern5_t [3:0] KERNS = {KERN_S3, KERN_S2, KERN_S1, KERN_S0};

  for (genvar s = 0; s < 4; s++) begin : g_scale
    gaussian_filter #(.KERN(KERNS[s])) u_filt (
      .clk, .rst_n,
      .in_valid (w_valid),
      .in_win   (w_win),
      .out_valid(f_valid[s]),
      .out_pix  (g_pix[s])
    );
  end

  assign g_valid = &f_valid;   // all four scales run in lock step

  // Coordinates follow the filter stage.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      g_x    <= '0;
      g_y    <= '0;
      g_last <= 1'b0;
    end else begin
      g_last <= w_valid && w_last;
      if (w_valid) begin
        g_x <= w_x;
        g_y <= w_y;
      end
    end
  end

endmodule
