// tb_dog: self-checking test of the difference-of-Gaussian stage.
//
// Drives random four-scale samples, including the extremes 0 and 255, and
// checks one clock later that each of the three outputs equals the next
// coarser scale minus the finer one as a signed value, and that the
// coordinates and end-of-frame flag travel with the data.
module tb_dog;
  import sift_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_last = 0;
  pixel_t g [4];
  logic [8:0] in_x = 0, in_y = 0;
  logic out_valid, out_last;
  dog_t d [3];
  logic [8:0] out_x, out_y;
  int checks = 0, failures = 0;

  dog dut (.*);

  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < 4; i++) g[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      int e [3];
      logic l;
      @(negedge clk);
      for (int i = 0; i < 4; i++) begin
        case ($urandom_range(5))
          0: g[i] = 8'd0;
          1: g[i] = 8'd255;
          default: g[i] = 8'($urandom);
        endcase
      end
      for (int i = 0; i < 3; i++) e[i] = int'(g[i+1]) - int'(g[i]);
      in_x = 9'($urandom); in_y = 9'($urandom);
      l = ($urandom_range(9) == 0);
      in_last = l; in_valid = 1;
      @(negedge clk);
      in_valid = 0; in_last = 0;
      checks++;
      if (!out_valid || out_last != l || out_x != in_x || out_y != in_y) begin
        failures++;
        $display("FAIL control/coords");
      end
      for (int i = 0; i < 3; i++) begin
        checks++;
        if (int'(d[i]) != e[i]) begin failures++; $display("FAIL d[%0d]=%0d exp %0d", i, d[i], e[i]); end
      end
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
