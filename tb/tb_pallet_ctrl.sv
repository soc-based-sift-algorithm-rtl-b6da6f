// tb_pallet_ctrl: self-checking test of the palletization control flow.
//
// With T1 = 5, T2 = 7, T3 = 4 and P1 = 100, each branch of the control flow
// is exercised and its outputs and delays checked in clock cycles:
// A below 45 degrees (stop at once), A above 55 (error stop), A from 45 to 55
// inclusive (OD on after T1, held while S1 < P1, off T3 clocks after S1 >= P1,
// then stop), B (PC1 and stop after T1), defective B (PC1 after T1, PC2 and
// stop T2 later), and an object arriving while busy (dropped, ignored).
module tb_pallet_ctrl;
  import sift_pkg::*;
  localparam int T1 = 5, T2 = 7, T3 = 4, P1 = 100;

  logic clk = 0, rst_n = 0;
  logic cls_valid = 0;
  obj_class_e cls = CLS_A;
  logic [7:0] angle = 0, s1 = 0;
  logic od, pc1, pc2, stop, err_stop, busy, dropped;
  int checks = 0, failures = 0;

  pallet_ctrl #(.T1(T1), .T2(T2), .T3(T3), .P1(P1)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  task automatic give(obj_class_e c, int a);
    @(negedge clk);
    cls = c; angle = 8'(a); cls_valid = 1;
    @(negedge clk);
    cls_valid = 0;
  endtask

  // Number of clocks (counted from the sampling edge, which is already past)
  // until sig is seen high; gives up after limit.
  task automatic clocks_until(ref logic sig, input int limit, output int n);
    n = 0;
    while (!sig && n < limit) begin @(negedge clk); n++; end
  endtask

  initial begin
    int n;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // A, small angle: stop at once
    give(CLS_A, 30);
    check(stop && !od && !pc1 && !pc2 && !err_stop && !busy, "A 30: stop only");
    give(CLS_A, 44);
    check(stop && !od, "A 44: stop only");

    // A, too steep: error stop
    give(CLS_A, 60);
    check(err_stop && !stop && !od, "A 60: error stop");
    give(CLS_A, 56);
    check(err_stop && !stop && !od, "A 56: error stop");

    // A, 50 degrees: orientation device
    for (int k = 0; k < 3; k++) begin
      int ang;
      ang = (k == 0) ? 50 : (k == 1) ? 45 : 55;
      s1 = 8'd20;
      give(CLS_A, ang);
      check(!stop && !err_stop && busy, "A in range: busy, stop and error cleared");
      clocks_until(od, 50, n);
      check(n == T1, $sformatf("OD on after T1 (got %0d, angle %0d)", n, ang));
      repeat (10) @(negedge clk);
      check(od && !stop, "OD held while S1 < P1");
      s1 = 8'(P1);
      @(negedge clk);           // sampled at this edge
      n = 0;
      while (od && n < 50) begin @(negedge clk); n++; end
      check(n == T3, $sformatf("OD off T3 after S1 >= P1 (got %0d)", n));
      check(stop && !od && !pc1 && !pc2, "A in range ends in stop");
      s1 = 8'd0;
    end

    // B: PC1 after T1, with stop
    give(CLS_B, 0);
    check(!stop && !pc1, "B: outputs cleared at start");
    clocks_until(pc1, 50, n);
    check(n == T1, $sformatf("PC1 after T1 (got %0d)", n));
    check(stop && !pc2 && !od, "B ends with PC1 and stop");

    // defective B: PC1 after T1, PC2 T2 later, stop with PC2
    give(CLS_BDEF, 0);
    clocks_until(pc1, 50, n);
    check(n == T1, $sformatf("defective B: PC1 after T1 (got %0d)", n));
    check(!pc2 && !stop, "defective B: PC2 not yet");
    clocks_until(pc2, 50, n);
    check(n == T2, $sformatf("defective B: PC2 T2 after PC1 (got %0d)", n));
    check(pc1 && pc2 && stop, "defective B ends with PC1, PC2 and stop");

    // an object arriving while busy is dropped
    give(CLS_B, 0);
    @(negedge clk);
    cls = CLS_A; angle = 8'd10; cls_valid = 1;
    @(negedge clk);
    cls_valid = 0;
    check(dropped, "object during busy reported as dropped");
    clocks_until(pc1, 50, n);
    check(pc1 && stop, "busy pass finishes as B");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
