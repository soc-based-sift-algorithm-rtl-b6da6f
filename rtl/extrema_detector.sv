// extrema_detector: scale-space extrema detection over three DoG images.
//
// The three DoG samples of each position travel together (27 bits) through a
// 3 x 3 line-buffer window, so every window holds a 3 x 3 x 3 block of scale
// space. The centre of the middle DoG image is compared with its 26
// neighbours: 8 in its own image and 9 in each adjacent one. It is a maximum
// when it is strictly greater than all 26, a minimum when strictly smaller
// than all 26; either one (a logic OR) makes it a candidate, and a candidate
// whose magnitude reaches THRESH is reported as a featurepoint.
//
// Interface: in_valid/d, a raster stream of WIDTH x HEIGHT DoG positions.
// Output: one result per interior position ((WIDTH-2) x (HEIGHT-2) per frame),
// one clock after its window, i.e. two clocks after the last sample it needs.
// feat_x/feat_y are image coordinates: window centre plus OFFSET.
//
// Comparing with 26 neighbours and OR-ing maxima and minima follows the
// paper; strict comparison and the threshold value are this design's.
module extrema_detector
  import sift_pkg::*;
#(
  parameter int unsigned WIDTH  = IMG_W - 4,
  parameter int unsigned HEIGHT = IMG_H - 4,
  parameter int unsigned OFFSET = 2,
  parameter int unsigned THRESH = 8,
  parameter int unsigned XW     = $clog2(WIDTH + OFFSET),
  parameter int unsigned YW     = $clog2(HEIGHT + OFFSET)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  dog_t           d [3],
  output logic           feat_valid,
  output logic           feat,
  output logic           feat_max,
  output logic           feat_min,
  output logic [XW-1:0]  feat_x,
  output logic [YW-1:0]  feat_y,
  output logic           feat_last
);

  logic                              w_valid, w_last;
  logic [2:0][2:0][26:0]             w_win;
  logic [$clog2(WIDTH)-1:0]          w_x;
  logic [$clog2(HEIGHT)-1:0]         w_y;

  line_window #(.WIDTH(WIDTH), .HEIGHT(HEIGHT), .K(3), .DW(27)) u_win (
    .clk, .rst_n,
    .in_valid (in_valid),
    .in_data  ({d[2], d[1], d[0]}),
    .out_valid(w_valid),
    .out_win  (w_win),
    .out_x    (w_x),
    .out_y    (w_y),
    .out_last (w_last)
  );

  dog_t      centre;
  logic      is_max, is_min;
  logic [8:0] mag;

  always_comb begin
    centre = dog_t'(w_win[1][1][17:9]);
    is_max = 1'b1;
    is_min = 1'b1;
    for (int s = 0; s < 3; s++) begin
      for (int r = 0; r < 3; r++) begin
        for (int c = 0; c < 3; c++) begin
          if (!(s == 1 && r == 1 && c == 1)) begin
            if (!(centre > dog_t'(w_win[r][c][s*9 +: 9]))) is_max = 1'b0;
            if (!(centre < dog_t'(w_win[r][c][s*9 +: 9]))) is_min = 1'b0;
          end
        end
      end
    end
    mag = centre[8] ? 9'(-centre) : 9'(centre);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      feat_valid <= 1'b0;
      feat       <= 1'b0;
      feat_max   <= 1'b0;
      feat_min   <= 1'b0;
      feat_x     <= '0;
      feat_y     <= '0;
      feat_last  <= 1'b0;
    end else begin
      feat_valid <= w_valid;
      feat_last  <= w_valid && w_last;
      if (w_valid) begin
        feat_max <= is_max;
        feat_min <= is_min;
        feat     <= (is_max || is_min) && (mag >= 9'(THRESH));
        feat_x   <= XW'(w_x) + XW'(OFFSET);
        feat_y   <= YW'(w_y) + YW'(OFFSET);
      end
    end
  end

endmodule
