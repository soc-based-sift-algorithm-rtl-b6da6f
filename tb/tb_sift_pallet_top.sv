// tb_sift_pallet_top: end-to-end test of the whole system at full size.
//
// The top is instantiated with its default parameters (300 x 300 frames).
// Synthetic grayscale objects are generated in the bench: A is a bright
// rectangle tilted by 45 degrees, B a textured disc, defective B the same disc
// with a dark notch cut into it. A software model of the pipeline (5 x 5
// Gaussian blur at the four scales, DoG, 26-neighbour extrema with the
// threshold) gives the featurepoint map of each image; the maps of the three
// clean objects are loaded as references, and every featurepoint the design
// emits is compared with the model.
//
// Frames, in order: A at 50 degrees (OD path), B (PC1), defective B (PC1 and
// PC2), A at 30 degrees (plain stop), A at 70 degrees (error stop), a noisy A
// at 50 degrees with S1 held low so that the next object, a B, arrives while
// the controller is busy and is dropped, then B again. Each frame's class,
// Hamming distances, result latency (7 clocks after the last pixel) and
// actuator outputs are checked. Each mechanism (maxima, minima, threshold
// rejection, the three classes, OD, PC1, PC2, stop, error stop, dropped
// object, idle cycles in the pixel stream) must happen at least once.
module tb_sift_pallet_top;
  import sift_pkg::*;
  localparam int W = IMG_W, H = IMG_H;
  localparam int FW = W - 6, FH = H - 6, NPIX = FW * FH;
  localparam int TH = 8, T1 = 16, T2 = 16, T3 = 16, P1 = 128;

  logic clk = 0, rst_n = 0;
  logic pix_valid = 0;
  pixel_t pix = 0;
  logic [7:0] angle = 0, s1 = 0;
  logic ref_we = 0;
  logic [$clog2(NPIX)-1:0] ref_addr = 0;
  logic [2:0] ref_wdata = 0;
  logic feat_valid, feat, feat_max, feat_min, feat_last;
  logic [$clog2(W)-1:0] feat_x;
  logic [$clog2(H)-1:0] feat_y;
  logic match_valid;
  obj_class_e match_class;
  logic [$clog2(NPIX+1)-1:0] match_dist [3];
  logic od, pc1, pc2, stop, err_stop, busy, dropped;

  sift_pallet_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_max = 0, n_min = 0, n_feat = 0, n_weak = 0, n_gap = 0;
  int n_cls [3] = '{0, 0, 0};
  int n_od = 0, n_pc1 = 0, n_pc2 = 0, n_stop = 0, n_err = 0, n_drop = 0;

  // Loop bounds as variables keep the simulator from unrolling the model.
  int  hh = H, ww = W;
  int  img  [H][W];
  int  lg   [4][H][W];
  int  dg   [3][H][W];
  bit  fmap [H][W];          // model featurepoints of the image being streamed
  bit  emax [H][W], emin [H][W];
  bit  refmap [3][H][W];     // model featurepoints of the three references
  int  kern [4][5];

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // ---------------------------------------------------------------- images
  function automatic int noise(int x, int y, int seed);
    int unsigned h;
    h = 32'(x) * 32'd73856093 ^ 32'(y) * 32'd19349663 ^ 32'(seed) * 32'd83492791;
    h = h ^ (h >> 13);
    h = h * 32'd1274126177;
    return int'((h >> 16) % 32);
  endfunction

  // kind 0 = A, 1 = B, 2 = defective B; seed 0 = clean
  task automatic make_image(int kind, int seed);
    for (int y = 0; y < hh; y++)
      for (int x = 0; x < ww; x++) begin
        int v, u, w, dx, dy, r2;
        v = 50;
        if (kind == 0) begin
          u = x - y; w = x + y - W;
          if (u > -45 && u < 45 && w > -150 && w < 150) v = 190 - (u > 20 ? 40 : 0);
        end else begin
          dx = x - W / 2; dy = y - H / 2; r2 = dx * dx + dy * dy;
          if (r2 < 95 * 95) v = (((dx + 300) / 12 + (dy + 300) / 12) % 2 == 0) ? 200 : 140;
          if (r2 < 30 * 30) v = 90;
          if (kind == 2 && dx > 20 && dx < 70 && dy > -25 && dy < 25) v = 40;
        end
        v += noise(x, y, 1) / 4;                 // fixed texture, part of the object
        if (seed != 0) v += noise(x, y, seed) / 8 - 2;
        if (v < 0) v = 0;
        if (v > 255) v = 255;
        img[y][x] = v;
      end
  endtask

  // ---------------------------------------------------------------- model
  task automatic model();
    for (int s = 0; s < 4; s++)
      for (int y = 2; y < hh - 2; y++)
        for (int x = 2; x < ww - 2; x++) begin
          int acc = 0;
          for (int r = 0; r < 5; r++)
            for (int c = 0; c < 5; c++)
              acc += kern[s][r] * kern[s][c] * img[y - 2 + r][x - 2 + c];
          lg[s][y][x] = (acc + 2048) / 4096;
        end
    for (int s = 0; s < 3; s++)
      for (int y = 2; y < hh - 2; y++)
        for (int x = 2; x < ww - 2; x++)
          dg[s][y][x] = lg[s + 1][y][x] - lg[s][y][x];
    for (int y = 3; y < hh - 3; y++)
      for (int x = 3; x < ww - 3; x++) begin
        int c;
        bit mx, mn;
        c = dg[1][y][x];
        mx = 1; mn = 1;
        for (int s = 0; s < 3; s++)
          for (int dy = -1; dy <= 1; dy++)
            for (int dx = -1; dx <= 1; dx++)
              if (!(s == 1 && dx == 0 && dy == 0)) begin
                if (!(c > dg[s][y + dy][x + dx])) mx = 0;
                if (!(c < dg[s][y + dy][x + dx])) mn = 0;
              end
        emax[y][x] = mx;
        emin[y][x] = mn;
        fmap[y][x] = (mx || mn) && ((c < 0 ? -c : c) >= TH);
      end
  endtask

  // ---------------------------------------------------------------- monitors
  int feats_seen;
  always @(posedge clk) begin
    if (rst_n && feat_valid) begin
      int x, y;
      x = int'(feat_x); y = int'(feat_y);
      feats_seen++;
      if (feat != fmap[y][x] || feat_max != emax[y][x] || feat_min != emin[y][x]) begin
        failures++;
        if (failures < 20)
          $display("FAIL featurepoint at (%0d,%0d): %0b%0b%0b exp %0b%0b%0b", x, y,
                   feat, feat_max, feat_min, fmap[y][x], emax[y][x], emin[y][x]);
      end
      if (feat_max) n_max++;
      if (feat_min) n_min++;
      if (feat) n_feat++;
      if ((feat_max || feat_min) && !feat) n_weak++;
    end
    if (rst_n && dropped) n_drop++;
  end

  // rising edges of the actuators
  logic od_q, pc1_q, pc2_q, stop_q, err_q;
  always @(posedge clk) begin
    od_q <= od; pc1_q <= pc1; pc2_q <= pc2; stop_q <= stop; err_q <= err_stop;
    if (rst_n) begin
      if (od && !od_q) n_od++;
      if (pc1 && !pc1_q) n_pc1++;
      if (pc2 && !pc2_q) n_pc2++;
      if (stop && !stop_q) n_stop++;
      if (err_stop && !err_q) n_err++;
    end
  end

  int cyc = 0, last_pix_cyc = 0, match_cyc = 0, n_match = 0;
  obj_class_e got_class;
  int got_dist [3];
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (pix_valid) last_pix_cyc <= cyc;
    if (rst_n && match_valid) begin
      match_cyc <= cyc;
      n_match   <= n_match + 1;
      got_class <= match_class;
      for (int i = 0; i < 3; i++) got_dist[i] <= int'(match_dist[i]);
    end
  end

  // ---------------------------------------------------------------- stimulus
  task automatic stream(bit gaps);
    feats_seen = 0;
    for (int y = 0; y < hh; y++)
      for (int x = 0; x < ww; x++) begin
        if (gaps && $urandom_range(15) == 0) begin
          @(negedge clk); pix_valid = 0; n_gap++;
        end
        @(negedge clk);
        pix_valid = 1;
        pix = 8'(img[y][x]);
      end
    @(negedge clk); pix_valid = 0;
  endtask

  // Stream the current image, wait for its match, check class and distances.
  task automatic run_frame(int expect_cls, bit gaps, string name);
    int m0, e [3], ec;
    m0 = n_match;
    model();
    stream(gaps);
    repeat (10) @(negedge clk);
    check(n_match == m0 + 1, {name, ": one match result"});
    check(match_cyc - last_pix_cyc == 7, $sformatf("%s: result 7 clocks after last pixel (got %0d)", name, match_cyc - last_pix_cyc));
    check(feats_seen == NPIX, $sformatf("%s: %0d featurepoint results", name, feats_seen));
    for (int k = 0; k < 3; k++) begin
      e[k] = 0;
      for (int y = 3; y < hh - 3; y++)
        for (int x = 3; x < ww - 3; x++)
          if (fmap[y][x] != refmap[k][y][x]) e[k]++;
    end
    ec = (e[0] <= e[1] && e[0] <= e[2]) ? 0 : (e[1] <= e[2]) ? 1 : 2;
    check(got_dist[0] == e[0] && got_dist[1] == e[1] && got_dist[2] == e[2],
          $sformatf("%s: distances %0d %0d %0d exp %0d %0d %0d", name,
                    got_dist[0], got_dist[1], got_dist[2], e[0], e[1], e[2]));
    check(int'(got_class) == ec, $sformatf("%s: class %0d, model %0d", name, got_class, ec));
    check(int'(got_class) == expect_cls, $sformatf("%s: class %0d, object %0d", name, got_class, expect_cls));
    n_cls[int'(got_class)]++;
    $display("%s: class %0d distances %0d %0d %0d", name, got_class, got_dist[0], got_dist[1], got_dist[2]);
  endtask

  task automatic wait_idle(int limit);
    int n = 0;
    while (busy && n < limit) begin @(negedge clk); n++; end
    check(!busy, "controller finished");
  endtask

  initial begin
    int frame_feats;
    kern[0] = '{1, 13, 36, 13, 1};
    kern[1] = '{3, 16, 26, 16, 3};
    kern[2] = '{7, 15, 20, 15, 7};
    kern[3] = '{10, 14, 16, 14, 10};
    repeat (3) @(posedge clk);
    rst_n = 1;

    // references: featurepoints of the clean objects
    for (int k = 0; k < 3; k++) begin
      make_image(k, 0);
      model();
      frame_feats = 0;
      foreach (fmap[y, x]) begin
        refmap[k][y][x] = fmap[y][x];
        if (fmap[y][x]) frame_feats++;
      end
      $display("reference %0d: %0d featurepoints", k, frame_feats);
    end
    for (int y = 3; y < hh - 3; y++)
      for (int x = 3; x < ww - 3; x++) begin
        @(negedge clk);
        ref_we = 1;
        ref_addr = $bits(ref_addr)'((y - 3) * FW + (x - 3));
        ref_wdata = {refmap[2][y][x], refmap[1][y][x], refmap[0][y][x]};
      end
    @(negedge clk); ref_we = 0;

    // 1: A at 50 degrees -> OD until S1 >= P1, then stop
    make_image(0, 0); angle = 8'd50; s1 = 8'd10;
    run_frame(0, 1, "A 50deg");
    repeat (T1) @(negedge clk);
    check(od && busy, "A 50deg: OD on while S1 < P1");
    repeat (20) @(negedge clk);
    check(od && !stop, "A 50deg: OD held");
    s1 = 8'd200;
    wait_idle(100);
    check(!od && stop && !pc1 && !pc2 && !err_stop, "A 50deg: OD off and stop");
    s1 = 8'd0;

    // 2: B -> PC1
    make_image(1, 0); angle = 8'd0;
    run_frame(1, 0, "B");
    wait_idle(100);
    check(pc1 && !pc2 && !od && stop, "B: PC1 and stop");

    // 3: defective B -> PC1 and PC2
    make_image(2, 0);
    run_frame(2, 1, "B defective");
    wait_idle(100);
    check(pc1 && pc2 && !od && stop, "B defective: PC1, PC2 and stop");

    // 4: A at 30 degrees -> stop
    make_image(0, 0); angle = 8'd30;
    run_frame(0, 0, "A 30deg");
    check(stop && !od && !pc1 && !pc2 && !err_stop, "A 30deg: stop only");

    // 5: A at 70 degrees -> error stop
    angle = 8'd70;
    run_frame(0, 0, "A 70deg");
    check(err_stop && !stop && !od, "A 70deg: error stop");

    // 6: noisy A at 50 degrees, S1 stays low; next object arrives while busy
    make_image(0, 7); angle = 8'd50; s1 = 8'd0;
    run_frame(0, 1, "noisy A 50deg");
    make_image(1, 0);
    run_frame(1, 0, "B while busy");
    check(n_drop == 1, "object during OD pass dropped");
    check(od && !pc1, "dropped B did not move the cylinders");
    s1 = 8'd255;
    wait_idle(100);
    check(stop && !od && !pc1, "noisy A ends in stop");

    // 7: B again is handled
    run_frame(1, 1, "B again");
    wait_idle(100);
    check(pc1 && stop, "B again: PC1 and stop");

    $display("mechanisms: maxima %0d minima %0d featurepoints %0d threshold-rejected %0d idle-cycles %0d",
             n_max, n_min, n_feat, n_weak, n_gap);
    $display("mechanisms: class A %0d B %0d Bdef %0d, OD %0d PC1 %0d PC2 %0d stop %0d error %0d dropped %0d",
             n_cls[0], n_cls[1], n_cls[2], n_od, n_pc1, n_pc2, n_stop, n_err, n_drop);
    check(n_max > 0, "maxima occurred");
    check(n_min > 0, "minima occurred");
    check(n_feat > 0, "featurepoints occurred");
    check(n_weak > 0, "threshold rejections occurred");
    check(n_gap > 0, "idle cycles in the stream occurred");
    for (int i = 0; i < 3; i++) check(n_cls[i] > 0, $sformatf("class %0d matched", i));
    check(n_od > 0, "OD activated");
    check(n_pc1 > 0, "PC1 activated");
    check(n_pc2 > 0, "PC2 activated");
    check(n_stop > 0, "stop reached");
    check(n_err > 0, "error stop reached");
    check(n_drop > 0, "busy object dropped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
