// dog: difference-of-Gaussian stage, D(x,y,sigma) = L(x,y,k*sigma) - L(x,y,sigma).
//
// Three subtractors take the four Gaussian scales of one sample and give the
// three DoG values d[i] = g[i+1] - g[i] as signed 9-bit numbers, registered.
// Coordinates and the end-of-frame flag pass along with the data.
//
// Interface: in_valid/g (4 scales), out_valid/d (3 DoG samples) one clock
// later. Subtracting successive scales follows the paper; the sign
// convention (coarser minus finer) and the register are this design's.
module dog
  import sift_pkg::*;
#(
  parameter int unsigned XW = 9,
  parameter int unsigned YW = 9
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  pixel_t         g [4],
  input  logic [XW-1:0]  in_x,
  input  logic [YW-1:0]  in_y,
  input  logic           in_last,
  output logic           out_valid,
  output dog_t           d [3],
  output logic [XW-1:0]  out_x,
  output logic [YW-1:0]  out_y,
  output logic           out_last
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_x     <= '0;
      out_y     <= '0;
      for (int i = 0; i < 3; i++) d[i] <= '0;
    end else begin
      out_valid <= in_valid;
      out_last  <= in_last;
      if (in_valid) begin
        out_x <= in_x;
        out_y <= in_y;
        for (int i = 0; i < 3; i++)
          d[i] <= $signed({1'b0, g[i+1]}) - $signed({1'b0, g[i]});
      end
    end
  end

endmodule
