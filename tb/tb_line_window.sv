// tb_line_window: self-checking test of the line-buffer window generator.
//
// Streams two 10 x 7 frames of unique values f(x,y) = 16*y + x + 100*frame,
// with random idle cycles, through a 3 x 3 window. Every reported window is
// compared sample by sample with f() around its reported centre, the number
// of windows per frame must be (10-2)*(7-2), the last window must carry
// out_last, and each window must appear exactly one clock after its sample.
module tb_line_window;
  localparam int W = 10, H = 7, K = 3;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [7:0] in_data = 0;
  logic out_valid, out_last;
  logic [K-1:0][K-1:0][7:0] out_win;
  logic [$clog2(W)-1:0] out_x;
  logic [$clog2(H)-1:0] out_y;

  int checks = 0, failures = 0;
  int frame = 0, windows = 0, lasts = 0;
  logic last_in_valid;

  line_window #(.WIDTH(W), .HEIGHT(H), .K(K), .DW(8)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [7:0] f(int x, int y, int fr);
    return 8'(16 * y + x + 100 * fr);
  endfunction

  always @(posedge clk) begin
    last_in_valid <= in_valid;
    if (rst_n && out_valid) begin
      windows++;
      checks++;
      if (!last_in_valid) begin
        failures++;
        $display("FAIL window without a sample one clock before");
      end
      for (int r = 0; r < K; r++)
        for (int c = 0; c < K; c++) begin
          checks++;
          if (out_win[r][c] !== f(int'(out_x) - 1 + c, int'(out_y) - 1 + r, frame)) begin
            failures++;
            $display("FAIL frame %0d centre (%0d,%0d) win[%0d][%0d]=%0d", frame, out_x, out_y, r, c, out_win[r][c]);
          end
        end
      if (out_last) begin
        lasts++;
        checks++;
        if (out_x != W - 2 || out_y != H - 2) begin
          failures++;
          $display("FAIL out_last at (%0d,%0d)", out_x, out_y);
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int fr = 0; fr < 2; fr++) begin
      windows = 0;
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          while ($urandom_range(3) == 0) begin
            @(negedge clk); in_valid = 0;
          end
          @(negedge clk);
          in_valid = 1;
          in_data  = f(x, y, fr);
        end
      @(negedge clk); in_valid = 0;
      repeat (3) @(posedge clk);
      checks++;
      if (windows != (W - 2) * (H - 2)) begin
        failures++;
        $display("FAIL frame %0d: %0d windows", fr, windows);
      end
      frame++;
    end
    checks++;
    if (lasts != 2) begin failures++; $display("FAIL %0d out_last pulses", lasts); end
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
