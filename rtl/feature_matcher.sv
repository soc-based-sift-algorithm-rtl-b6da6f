// feature_matcher: matches the featurepoint map of a frame against stored
// reference maps and names the closest object class.
//
// The reference store holds, for every featurepoint position of the frame,
// one bit per class (A, B, defective B): whether the reference image of that
// class has a featurepoint there. As the featurepoint stream arrives in
// raster order, a position counter addresses the store (synchronous read),
// and one mismatch counter per class counts positions where the frame and
// that reference disagree (a Hamming distance). At the end of the frame the
// class with the smallest distance is reported (ties go to A, then B), with a
// one-clock match_valid pulse, and the counters restart.
//
// Interface: feat_valid/feat/feat_last, NPIX results per frame. ref_we,
// ref_addr, ref_wdata load the store (bit 0 = A, 1 = B, 2 = defective B),
// one position per clock. match_valid follows feat_last by two clocks.
//
// Matching extracted featurepoints against stored ones follows the paper;
// the bitmap store, the Hamming distance and the tie rule are this design's.
module feature_matcher
  import sift_pkg::*;
#(
  parameter int unsigned NPIX = (IMG_W - 6) * (IMG_H - 6),
  parameter int unsigned AW   = $clog2(NPIX),
  parameter int unsigned DW   = $clog2(NPIX + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            feat_valid,
  input  logic            feat,
  input  logic            feat_last,
  input  logic            ref_we,
  input  logic [AW-1:0]   ref_addr,
  input  logic [2:0]      ref_wdata,
  output logic            match_valid,
  output obj_class_e      match_class,
  output logic [DW-1:0]   hdist [3]
);

  logic [2:0]    ref_mem [NPIX];
  logic [AW-1:0] addr;
  logic [2:0]    ref_q;
  logic          s1_valid, s1_feat, s1_last;
  logic [DW-1:0] cnt [3];
  logic [DW-1:0] nxt [3];

  always_ff @(posedge clk) begin
    if (ref_we)
      ref_mem[ref_addr] <= ref_wdata;
    if (feat_valid)
      ref_q <= ref_mem[addr];
  end

  always_comb begin
    for (int i = 0; i < 3; i++)
      nxt[i] = cnt[i] + DW'(s1_feat != ref_q[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr        <= '0;
      s1_valid    <= 1'b0;
      s1_feat     <= 1'b0;
      s1_last     <= 1'b0;
      match_valid <= 1'b0;
      match_class <= CLS_A;
      for (int i = 0; i < 3; i++) begin
        cnt[i]  <= '0;
        hdist[i] <= '0;
      end
    end else begin
      s1_valid    <= feat_valid;
      s1_last     <= feat_valid && feat_last;
      match_valid <= 1'b0;
      if (feat_valid) begin
        s1_feat <= feat;
        addr    <= (feat_last || addr == AW'(NPIX - 1)) ? '0 : addr + 1'b1;
      end
      if (s1_valid) begin
        if (s1_last) begin
          for (int i = 0; i < 3; i++) begin
            cnt[i]  <= '0;
            hdist[i] <= nxt[i];
          end
          match_valid <= 1'b1;
          if (nxt[0] <= nxt[1] && nxt[0] <= nxt[2])
            match_class <= CLS_A;
          else if (nxt[1] <= nxt[2])
            match_class <= CLS_B;
          else
            match_class <= CLS_BDEF;
        end else begin
          for (int i = 0; i < 3; i++)
            cnt[i] <= nxt[i];
        end
      end
    end
  end

endmodule
