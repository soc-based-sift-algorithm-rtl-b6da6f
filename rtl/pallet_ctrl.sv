// pallet_ctrl: control flow of the palletization cell.
//
// Each matched object (match_valid with its class) starts one pass through
// the control flow; the object's inclination angle is sampled at that moment
// and the pressure sensor S1 is watched live.
//   class A, angle < ANG_LO       : nothing to do, stop.
//   class A, angle > ANG_HI       : error stop.
//   class A, ANG_LO..ANG_HI       : after T1 clocks turn the orientation
//                                   device OD on, keep it on until S1 >= P1,
//                                   then turn it off after T3 clocks, stop.
//   class B                       : after T1 clocks turn pneumatic cylinder
//                                   PC1 on, stop.
//   class defective B             : after T1 clocks PC1 on, after T2 more
//                                   clocks PC2 on, stop.
// stop (or err_stop) and the cylinder outputs then hold until the next
// object arrives, which clears them. An object that arrives while a pass is
// still running is not accepted and is counted by the dropped pulse.
//
// Interface: all outputs registered; one clock from match_valid to the first
// state change. T1, T2, T3 are in clock cycles and must be at least 1.
//
// The branches, OD/PC1/PC2/stop and the 45/55 degree limits follow the
// paper's control flow; the timer values, P1 and the outputs holding at
// stop are this design's choices.
module pallet_ctrl
  import sift_pkg::*;
#(
  parameter int unsigned T1     = 16,
  parameter int unsigned T2     = 16,
  parameter int unsigned T3     = 16,
  parameter int unsigned ANG_LO = 45,
  parameter int unsigned ANG_HI = 55,
  parameter int unsigned P1     = 128
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cls_valid,
  input  obj_class_e  cls,
  input  logic [7:0]  angle,      // degrees
  input  logic [7:0]  s1,         // pressure sensor S1
  output logic        od,
  output logic        pc1,
  output logic        pc2,
  output logic        stop,
  output logic        err_stop,
  output logic        busy,
  output logic        dropped
);

  typedef enum logic [3:0] {
    ST_IDLE,
    ST_A_WAIT_ON,    // waiting T1 before OD on
    ST_A_ORIENT,     // OD on, waiting for S1 >= P1
    ST_A_WAIT_OFF,   // waiting T3 before OD off
    ST_B_WAIT_PC1,   // B: waiting T1 before PC1 on
    ST_D_WAIT_PC1,   // defective B: waiting T1 before PC1 on
    ST_D_WAIT_PC2,   // defective B: waiting T2 before PC2 on
    ST_STOP,
    ST_ERR
  } state_e;

  localparam int unsigned TMAX = (T1 > T2) ? ((T1 > T3) ? T1 : T3) : ((T2 > T3) ? T2 : T3);
  localparam int unsigned TW   = $clog2(TMAX + 1);

  state_e        state;
  logic [TW-1:0] tmr;

  assign busy = !(state inside {ST_IDLE, ST_STOP, ST_ERR});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= ST_IDLE;
      tmr      <= '0;
      od       <= 1'b0;
      pc1      <= 1'b0;
      pc2      <= 1'b0;
      stop     <= 1'b0;
      err_stop <= 1'b0;
      dropped  <= 1'b0;
    end else begin
      dropped <= cls_valid && busy;
      if (tmr != '0) tmr <= tmr - 1'b1;
      unique case (state)
        ST_IDLE, ST_STOP, ST_ERR: begin
          if (cls_valid) begin
            od       <= 1'b0;
            pc1      <= 1'b0;
            pc2      <= 1'b0;
            stop     <= 1'b0;
            err_stop <= 1'b0;
            tmr      <= TW'(T1 - 1);
            unique case (cls)
              CLS_A: begin
                if (angle < 8'(ANG_LO)) begin
                  state <= ST_STOP;
                  stop  <= 1'b1;
                end else if (angle > 8'(ANG_HI)) begin
                  state    <= ST_ERR;
                  err_stop <= 1'b1;
                end else begin
                  state <= ST_A_WAIT_ON;
                end
              end
              CLS_B:   state <= ST_B_WAIT_PC1;
              default: state <= ST_D_WAIT_PC1;
            endcase
          end
        end
        ST_A_WAIT_ON: if (tmr == '0) begin
          od    <= 1'b1;
          state <= ST_A_ORIENT;
        end
        ST_A_ORIENT: if (s1 >= 8'(P1)) begin
          tmr   <= TW'(T3 - 1);
          state <= ST_A_WAIT_OFF;
        end
        ST_A_WAIT_OFF: if (tmr == '0) begin
          od    <= 1'b0;
          stop  <= 1'b1;
          state <= ST_STOP;
        end
        ST_B_WAIT_PC1: if (tmr == '0) begin
          pc1   <= 1'b1;
          stop  <= 1'b1;
          state <= ST_STOP;
        end
        ST_D_WAIT_PC1: if (tmr == '0) begin
          pc1   <= 1'b1;
          tmr   <= TW'(T2 - 1);
          state <= ST_D_WAIT_PC2;
        end
        ST_D_WAIT_PC2: if (tmr == '0) begin
          pc2   <= 1'b1;
          stop  <= 1'b1;
          state <= ST_STOP;
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  // The orientation device and the cylinders serve different objects.
  assert property (@(posedge clk) disable iff (!rst_n) !(od && (pc1 || pc2)));
  // PC2 only ever follows PC1.
  assert property (@(posedge clk) disable iff (!rst_n) pc2 |-> pc1);
  // stop and error stop are exclusive.
  assert property (@(posedge clk) disable iff (!rst_n) !(stop && err_stop));

endmodule
