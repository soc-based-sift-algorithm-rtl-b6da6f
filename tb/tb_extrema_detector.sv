// tb_extrema_detector: self-checking test of 26-neighbour extrema detection.
//
// Streams 11 x 9 frames of three DoG images with random values in a small
// range (so ties occur) and some planted strong and weak maxima and minima.
// A reference computes, for every interior position, whether the middle-image
// sample is strictly above or below all 26 neighbours and whether it clears
// the threshold; every output is compared with it. The test also requires
// that maxima, minima, accepted featurepoints and threshold rejections all
// occur, and checks the number of results per frame and feat_last.
module tb_extrema_detector;
  import sift_pkg::*;
  localparam int W = 11, H = 9, OFF = 2, TH = 8;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  dog_t d [3];
  logic feat_valid, feat, feat_max, feat_min, feat_last;
  logic [3:0] feat_x, feat_y;

  int checks = 0, failures = 0, results = 0, lasts = 0;
  int n_max = 0, n_min = 0, n_feat = 0, n_weak = 0;
  int img [3][H][W];

  extrema_detector #(.WIDTH(W), .HEIGHT(H), .OFFSET(OFF), .THRESH(TH), .XW(4), .YW(4)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (rst_n && feat_valid) begin
      int cx, cy, c;
      logic emax, emin, ef;
      results++;
      cx = int'(feat_x) - OFF;
      cy = int'(feat_y) - OFF;
      c = img[1][cy][cx];
      emax = 1; emin = 1;
      for (int s = 0; s < 3; s++)
        for (int dy = -1; dy <= 1; dy++)
          for (int dx = -1; dx <= 1; dx++)
            if (!(s == 1 && dx == 0 && dy == 0)) begin
              if (!(c > img[s][cy+dy][cx+dx])) emax = 0;
              if (!(c < img[s][cy+dy][cx+dx])) emin = 0;
            end
      ef = (emax || emin) && ((c < 0 ? -c : c) >= TH);
      checks++;
      if (feat_max != emax || feat_min != emin || feat != ef) begin
        failures++;
        $display("FAIL at (%0d,%0d): max %0b/%0b min %0b/%0b feat %0b/%0b", cx, cy,
                 feat_max, emax, feat_min, emin, feat, ef);
      end
      if (emax) n_max++;
      if (emin) n_min++;
      if (ef) n_feat++;
      if ((emax || emin) && !ef) n_weak++;
      if (feat_last) begin
        lasts++;
        checks++;
        if (cx != W - 2 || cy != H - 2) begin failures++; $display("FAIL feat_last position"); end
      end
    end
  end

  initial begin
    for (int i = 0; i < 3; i++) d[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int fr = 0; fr < 6; fr++) begin
      foreach (img[s, y, x]) img[s][y][x] = int'($urandom_range(12)) - 6;
      // planted extrema: strong maximum, strong minimum, weak maximum
      img[1][2][3] = 40;
      img[1][5][7] = -40;
      img[1][4][4] = 7;
      for (int s = 0; s < 3; s++)
        for (int dy = -1; dy <= 1; dy++)
          for (int dx = -1; dx <= 1; dx++)
            if (!(s == 1 && dx == 0 && dy == 0)) img[s][4+dy][4+dx] = int'($urandom_range(6)) - 6;
      results = 0;
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          while ($urandom_range(3) == 0) begin @(negedge clk); in_valid = 0; end
          @(negedge clk);
          in_valid = 1;
          for (int s = 0; s < 3; s++) d[s] = dog_t'(img[s][y][x]);
        end
      @(negedge clk); in_valid = 0;
      repeat (4) @(posedge clk);
      checks++;
      if (results != (W - 2) * (H - 2)) begin failures++; $display("FAIL %0d results", results); end
    end
    checks += 5;
    if (lasts != 6) begin failures++; $display("FAIL %0d feat_last", lasts); end
    if (n_max == 0) begin failures++; $display("FAIL no maximum seen"); end
    if (n_min == 0) begin failures++; $display("FAIL no minimum seen"); end
    if (n_feat == 0) begin failures++; $display("FAIL no featurepoint seen"); end
    if (n_weak == 0) begin failures++; $display("FAIL no threshold rejection seen"); end
    $display("maxima %0d minima %0d features %0d rejected %0d", n_max, n_min, n_feat, n_weak);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
