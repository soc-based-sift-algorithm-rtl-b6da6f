// tb_gaussian_pyramid: self-checking test of the four-scale Gaussian octave.
//
// Streams two random 12 x 10 images (with idle gaps) and compares each of the
// four blurred outputs at every reported position with a reference 5 x 5
// convolution of the stored image. Checks the number of samples per frame,
// the position of g_last, and that the four scales are ordered by blur on a
// step edge (finer scales keep more contrast next to the edge).
module tb_gaussian_pyramid;
  import sift_pkg::*;
  localparam int W = 12, H = 10;

  logic clk = 0, rst_n = 0;
  logic pix_valid = 0;
  pixel_t pix = 0;
  logic g_valid, g_last;
  pixel_t g_pix [4];
  logic [$clog2(W)-1:0] g_x;
  logic [$clog2(H)-1:0] g_y;

  int checks = 0, failures = 0, samples = 0, lasts = 0;
  pixel_t img [H][W];
  kern5_t kerns [4];

  gaussian_pyramid #(.WIDTH(W), .HEIGHT(H)) dut (.*);

  always #5 clk = ~clk;

  function automatic int ref_blur(int s, int cx, int cy);
    int acc = 0;
    for (int r = 0; r < 5; r++)
      for (int c = 0; c < 5; c++)
        acc += int'(kerns[s][r]) * int'(kerns[s][c]) * int'(img[cy - 2 + r][cx - 2 + c]);
    return (acc + 2048) / 4096;
  endfunction

  always @(posedge clk) begin
    if (rst_n && g_valid) begin
      samples++;
      for (int s = 0; s < 4; s++) begin
        checks++;
        if (int'(g_pix[s]) != ref_blur(s, int'(g_x), int'(g_y))) begin
          failures++;
          $display("FAIL scale %0d at (%0d,%0d): %0d exp %0d", s, g_x, g_y, g_pix[s], ref_blur(s, int'(g_x), int'(g_y)));
        end
      end
    end
    if (rst_n && g_last) begin
      lasts++;
      checks++;
      if (g_x != W - 3 || g_y != H - 3) begin failures++; $display("FAIL g_last position"); end
    end
  end

  task automatic send_frame();
    samples = 0;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        while ($urandom_range(4) == 0) begin @(negedge clk); pix_valid = 0; end
        @(negedge clk); pix_valid = 1; pix = img[y][x];
      end
    @(negedge clk); pix_valid = 0;
    repeat (4) @(posedge clk);
    checks++;
    if (samples != (W - 4) * (H - 4)) begin failures++; $display("FAIL %0d samples", samples); end
  endtask

  initial begin
    kerns[0] = KERN_S0; kerns[1] = KERN_S1; kerns[2] = KERN_S2; kerns[3] = KERN_S3;
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (img[y, x]) img[y][x] = 8'($urandom);
    send_frame();
    // vertical step edge at x = 6: 0 left, 200 right
    foreach (img[y, x]) img[y][x] = (x >= 6) ? 8'd200 : 8'd0;
    send_frame();
    checks++;
    if (lasts != 2) begin failures++; $display("FAIL %0d g_last", lasts); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Blur ordering on the step edge, left of the edge (x = 5): more blur, more leak.
  always @(posedge clk) begin
    if (rst_n && g_valid && img[0][0] == 0 && img[0][W-1] == 200 && g_x == 5) begin
      checks++;
      if (!(g_pix[0] < g_pix[1] && g_pix[1] < g_pix[2] && g_pix[2] < g_pix[3])) begin
        failures++;
        $display("FAIL scale order %0d %0d %0d %0d", g_pix[0], g_pix[1], g_pix[2], g_pix[3]);
      end
    end
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
