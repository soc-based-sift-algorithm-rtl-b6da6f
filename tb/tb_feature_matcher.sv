// tb_feature_matcher: self-checking test of reference featurepoint matching.
//
// Loads random reference maps for A, B and defective B (60 positions), then
// sends frames that are noisy copies of each reference, random frames and an
// exact tie. The Hamming distances and the chosen class are compared with a
// reference model, match_valid must come exactly two clocks after feat_last,
// and each class must be chosen at least once.
module tb_feature_matcher;
  import sift_pkg::*;
  localparam int N = 60;

  logic clk = 0, rst_n = 0;
  logic feat_valid = 0, feat = 0, feat_last = 0;
  logic ref_we = 0;
  logic [5:0] ref_addr = 0;
  logic [2:0] ref_wdata = 0;
  logic match_valid;
  obj_class_e match_class;
  logic [5:0] hdist [3];

  int checks = 0, failures = 0;
  int seen [3] = '{0, 0, 0};
  logic [2:0] refs [N];
  logic frame [N];

  feature_matcher #(.NPIX(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic run_frame();
    int e [3];
    obj_class_e ec;
    for (int i = 0; i < 3; i++) e[i] = 0;
    for (int p = 0; p < N; p++)
      for (int i = 0; i < 3; i++) if (frame[p] != refs[p][i]) e[i]++;
    if (e[0] <= e[1] && e[0] <= e[2]) ec = CLS_A;
    else if (e[1] <= e[2]) ec = CLS_B;
    else ec = CLS_BDEF;
    for (int p = 0; p < N; p++) begin
      while ($urandom_range(3) == 0) begin @(negedge clk); feat_valid = 0; feat_last = 0; end
      @(negedge clk);
      feat_valid = 1; feat = frame[p]; feat_last = (p == N - 1);
    end
    @(negedge clk); feat_valid = 0; feat_last = 0;
    checks++;
    if (match_valid) begin failures++; $display("FAIL match_valid one clock after last"); end
    @(negedge clk);
    checks++;
    if (!match_valid) begin failures++; $display("FAIL no match_valid two clocks after last"); end
    checks++;
    if (match_class != ec || int'(hdist[0]) != e[0] || int'(hdist[1]) != e[1] || int'(hdist[2]) != e[2]) begin
      failures++;
      $display("FAIL class %0d exp %0d, dist %0d %0d %0d exp %0d %0d %0d", match_class, ec,
               hdist[0], hdist[1], hdist[2], e[0], e[1], e[2]);
    end
    seen[int'(match_class)]++;
    @(negedge clk);
    checks++;
    if (match_valid) begin failures++; $display("FAIL match_valid longer than one clock"); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (refs[p]) refs[p] = 3'($urandom);
    for (int p = 0; p < N; p++) begin
      @(negedge clk); ref_we = 1; ref_addr = 6'(p); ref_wdata = refs[p];
    end
    @(negedge clk); ref_we = 0;
    for (int rep = 0; rep < 4; rep++)
      for (int k = 0; k < 3; k++) begin
        foreach (frame[p]) frame[p] = refs[p][k] ^ ($urandom_range(9) == 0);
        run_frame();
      end
    for (int rep = 0; rep < 5; rep++) begin
      foreach (frame[p]) frame[p] = 1'($urandom);
      run_frame();
    end
    // tie between all three: references equal, frame anything
    foreach (refs[p]) refs[p] = {3{1'($urandom)}};
    for (int p = 0; p < N; p++) begin
      @(negedge clk); ref_we = 1; ref_addr = 6'(p); ref_wdata = refs[p];
    end
    @(negedge clk); ref_we = 0;
    foreach (frame[p]) frame[p] = 1'($urandom);
    run_frame();
    checks++;
    if (match_class != CLS_A) begin failures++; $display("FAIL tie not resolved to A"); end
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (seen[i] == 0) begin failures++; $display("FAIL class %0d never chosen", i); end
    end
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
