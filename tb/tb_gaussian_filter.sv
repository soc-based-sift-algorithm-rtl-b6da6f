// tb_gaussian_filter: self-checking test of one Gaussian scale.
//
// Two filter instances (sigma 0.7 and 2.0 kernels) get flat windows, which
// must come out unchanged, a single bright pixel, which must give the
// centre weight, and random windows, compared with a reference that forms
// the full 5 x 5 weighted sum with rounding. Results must appear one clock
// after the window.
module tb_gaussian_filter;
  import sift_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [4:0][4:0][7:0] in_win = '0;
  logic v0, v3;
  pixel_t p0, p3;
  int checks = 0, failures = 0;

  gaussian_filter #(.KERN(KERN_S0)) dut0 (.clk, .rst_n, .in_valid, .in_win, .out_valid(v0), .out_pix(p0));
  gaussian_filter #(.KERN(KERN_S3)) dut3 (.clk, .rst_n, .in_valid, .in_win, .out_valid(v3), .out_pix(p3));

  always #5 clk = ~clk;

  function automatic int ref_blur(kern5_t k, logic [4:0][4:0][7:0] w);
    int acc = 0;
    for (int r = 0; r < 5; r++)
      for (int c = 0; c < 5; c++)
        acc += int'(k[r]) * int'(k[c]) * int'(w[r][c]);
    return (acc + 2048) / 4096;
  endfunction

  task automatic apply(logic [4:0][4:0][7:0] w);
    int e0, e3;
    @(negedge clk);
    in_win = w; in_valid = 1;
    e0 = ref_blur(KERN_S0, w);
    e3 = ref_blur(KERN_S3, w);
    @(negedge clk);
    in_valid = 0;
    checks += 2;
    if (!v0 || p0 != 8'(e0)) begin failures++; $display("FAIL s0 got %0d exp %0d v=%0b", p0, e0, v0); end
    if (!v3 || p3 != 8'(e3)) begin failures++; $display("FAIL s3 got %0d exp %0d v=%0b", p3, e3, v3); end
  endtask

  initial begin
    logic [4:0][4:0][7:0] w;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // flat windows keep their value
    foreach (w[r, c]) w[r][c] = 8'd0;
    apply(w);
    foreach (w[r, c]) w[r][c] = 8'd255;
    apply(w);
    checks += 2;
    if (p0 != 8'd255 || p3 != 8'd255) begin failures++; $display("FAIL flat 255"); end
    foreach (w[r, c]) w[r][c] = 8'd77;
    apply(w);
    if (p0 != 8'd77) failures++;
    // impulse: centre weight 36*36/4096*255 and 16*16/4096*255
    foreach (w[r, c]) w[r][c] = 8'd0;
    w[2][2] = 8'd255;
    apply(w);
    checks += 2;
    if (p0 != 8'd81) begin failures++; $display("FAIL impulse s0 %0d", p0); end
    if (p3 != 8'd16) begin failures++; $display("FAIL impulse s3 %0d", p3); end
    for (int n = 0; n < 500; n++) begin
      foreach (w[r, c]) w[r][c] = 8'($urandom);
      apply(w);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
