// line_window: line-buffer FIFO that turns a raster-order sample stream into
// a K x K sliding window.
//
// K-1 line memories of WIDTH samples hold the previous K-1 rows. Each accepted
// sample at column x reads column x of every line memory, forms a K-tall
// column with the new sample at the bottom, and shifts that column into a
// K x K register window from the right. The line memories shift down by one
// row at the same column. Column and row counters follow the stream; a window
// is reported only when all K x K samples belong to the current frame, i.e.
// for input positions x >= K-1 and y >= K-1, so a frame of WIDTH x HEIGHT
// samples gives (WIDTH-K+1) x (HEIGHT-K+1) windows and the border is dropped.
//
// Interface: in_valid/in_data one sample per cycle at most, no back-pressure.
// out_win[r][c] is the sample at (cx - K/2 + c, cy - K/2 + r) around the
// centre (out_x, out_y), row 0 being the oldest. out_last marks the window
// built from the last sample of a frame. Latency: one clock from the sample.
//
// The paper stores the preprocessed image in a FIFO before the Gaussian
// blur; the line-buffer form, the border handling and the counters are this
// design's choices.
module line_window #(
  parameter int unsigned WIDTH  = 300,
  parameter int unsigned HEIGHT = 300,
  parameter int unsigned K      = 5,
  parameter int unsigned DW     = 8
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              in_valid,
  input  logic [DW-1:0]                     in_data,
  output logic                              out_valid,
  output logic [K-1:0][K-1:0][DW-1:0]       out_win,
  output logic [$clog2(WIDTH)-1:0]          out_x,
  output logic [$clog2(HEIGHT)-1:0]         out_y,
  output logic                              out_last
);

  localparam int unsigned XW = $clog2(WIDTH);
  localparam int unsigned YW = $clog2(HEIGHT);

  // lines[0] holds the row above the current one, lines[K-2] the oldest row.
  logic [DW-1:0] lines [K-1][WIDTH];

  logic [XW-1:0] x;
  logic [YW-1:0] y;
  logic [K-1:0][DW-1:0] column;   // column[K-1] is the new sample

  always_comb begin
    column[K-1] = in_data;
    for (int r = 0; r < int'(K) - 1; r++)
      column[r] = lines[K-2-r][x];
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      lines[0][x] <= in_data;
      for (int k = 1; k < int'(K) - 1; k++)
        lines[k][x] <= lines[k-1][x];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x         <= '0;
      y         <= '0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_x     <= '0;
      out_y     <= '0;
      out_win   <= '0;
    end else begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      if (in_valid) begin
        for (int r = 0; r < int'(K); r++) begin
          for (int c = 0; c < int'(K) - 1; c++)
            out_win[r][c] <= out_win[r][c+1];
          out_win[r][K-1] <= column[r];
        end
        out_valid <= (x >= XW'(K - 1)) && (y >= YW'(K - 1));
        out_last  <= (x == XW'(WIDTH - 1)) && (y == YW'(HEIGHT - 1));
        out_x     <= x - XW'(K / 2);
        out_y     <= y - YW'(K / 2);
        if (x == XW'(WIDTH - 1)) begin
          x <= '0;
          y <= (y == YW'(HEIGHT - 1)) ? '0 : y + 1'b1;
        end else begin
          x <= x + 1'b1;
        end
      end
    end
  end

endmodule
