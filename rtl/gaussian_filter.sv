// gaussian_filter: one Gaussian blur scale, L(x,y,sigma) = G(x,y,sigma) * I(x,y).
//
// Takes a 5 x 5 pixel window and convolves it with a separable integer
// Gaussian kernel: KERN holds five 1-D taps summing to 64, the 2-D weight of
// tap (r,c) is KERN[r]*KERN[c] (total 4096). A column pass sums each window
// column with the vertical taps, a row pass sums the five column results with
// the horizontal taps, and the result is rounded and shifted right by 12, so
// a flat image keeps its value exactly.
//
// Interface: in_valid/in_win as produced by line_window (K = 5, DW = 8);
// out_valid/out_pix one clock later. The paper gives the Gaussian
// convolution; the kernel size, integer taps and rounding are this design's.
module gaussian_filter
  import sift_pkg::*;
#(
  parameter kern5_t KERN = KERN_S0
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic [4:0][4:0][7:0]   in_win,
  output logic                   out_valid,
  output pixel_t                 out_pix
);

  logic [13:0] col_sum [5];   // <= 64 * 255
  logic [19:0] acc;           // <= 4096 * 255
  logic [20:0] rounded;

  always_comb begin
    for (int c = 0; c < 5; c++) begin
      col_sum[c] = '0;
      for (int r = 0; r < 5; r++)
        col_sum[c] += 14'(KERN[r]) * 14'(in_win[r][c]);
    end
    acc = '0;
    for (int c = 0; c < 5; c++)
      acc += 20'(KERN[c]) * 20'(col_sum[c]);
    rounded = 21'(acc) + 21'd2048;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_pix   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid)
        out_pix <= (rounded[20:12] > 9'd255) ? 8'd255 : rounded[19:12];
    end
  end

endmodule
