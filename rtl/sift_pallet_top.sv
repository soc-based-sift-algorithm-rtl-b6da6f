// sift_pallet_top: SIFT-based quality identification driving a palletizer.
//
// A preprocessed 8-bit grayscale frame streams in raster order. One octave of
// four Gaussian scales is built from it (gaussian_pyramid), three DoG images
// are taken between successive scales (dog), and every position of the middle
// DoG image that is an extremum among its 26 scale-space neighbours and clears
// the contrast threshold becomes a featurepoint (extrema_detector). The
// featurepoint map is compared with the stored maps of objects A, B and
// defective B (feature_matcher), and the chosen class, with the object's
// angle and the pressure sensor S1, drives the orientation device and the
// two pneumatic cylinders (pallet_ctrl).
//
// Interface: pix_valid/pix at most one pixel per clock, no back-pressure,
// WIDTH x HEIGHT pixels per frame, frames back to back. angle is sampled when
// a frame's class is decided; s1 is watched live. ref_we/ref_addr/ref_wdata
// load the reference featurepoint maps ((WIDTH-6) x (HEIGHT-6) positions,
// bit 0 A, bit 1 B, bit 2 defective B). feat_* is the featurepoint stream in
// image coordinates. match_valid comes 7 clocks after the last pixel.
//
// The chain of stages and the three 8-bit inputs (pixel, angle, pressure)
// follow the paper; widths, timing and the reference-map format are this
// design's choices.
module sift_pallet_top
  import sift_pkg::*;
#(
  parameter int unsigned WIDTH  = IMG_W,
  parameter int unsigned HEIGHT = IMG_H,
  parameter int unsigned THRESH = 8,
  parameter int unsigned T1     = 16,
  parameter int unsigned T2     = 16,
  parameter int unsigned T3     = 16,
  parameter int unsigned P1     = 128,
  localparam int unsigned NPIX  = (WIDTH - 6) * (HEIGHT - 6),
  localparam int unsigned AW    = $clog2(NPIX),
  localparam int unsigned XW    = $clog2(WIDTH),
  localparam int unsigned YW    = $clog2(HEIGHT)
) (
  input  logic               clk,
  input  logic               rst_n,
  // image stream
  input  logic               pix_valid,
  input  pixel_t             pix,
  // sensors
  input  logic [7:0]         angle,
  input  logic [7:0]         s1,
  // reference featurepoint store
  input  logic               ref_we,
  input  logic [AW-1:0]      ref_addr,
  input  logic [2:0]         ref_wdata,
  // featurepoints
  output logic               feat_valid,
  output logic               feat,
  output logic               feat_max,
  output logic               feat_min,
  output logic [XW-1:0]      feat_x,
  output logic [YW-1:0]      feat_y,
  output logic               feat_last,
  // matching
  output logic               match_valid,
  output obj_class_e         match_class,
  output logic [$clog2(NPIX+1)-1:0] match_dist [3],
  // actuators
  output logic               od,
  output logic               pc1,
  output logic               pc2,
  output logic               stop,
  output logic               err_stop,
  output logic               busy,
  output logic               dropped
);

  logic           g_valid, g_last;
  pixel_t         g_pix [4];
  logic [XW-1:0]  g_x;
  logic [YW-1:0]  g_y;

  logic           d_valid, d_last;
  dog_t           d [3];
  logic [XW-1:0]  d_x;
  logic [YW-1:0]  d_y;

  gaussian_pyramid #(.WIDTH(WIDTH), .HEIGHT(HEIGHT)) u_pyr (
    .clk, .rst_n,
    .pix_valid, .pix,
    .g_valid, .g_pix, .g_x, .g_y, .g_last
  );

  dog #(.XW(XW), .YW(YW)) u_dog (
    .clk, .rst_n,
    .in_valid (g_valid),
    .g        (g_pix),
    .in_x     (g_x),
    .in_y     (g_y),
    .in_last  (g_last),
    .out_valid(d_valid),
    .d        (d),
    .out_x    (d_x),
    .out_y    (d_y),
    .out_last (d_last)
  );

  extrema_detector #(
    .WIDTH(WIDTH - 4), .HEIGHT(HEIGHT - 4), .OFFSET(2), .THRESH(THRESH),
    .XW(XW), .YW(YW)
  ) u_ext (
    .clk, .rst_n,
    .in_valid (d_valid),
    .d        (d),
    .feat_valid, .feat, .feat_max, .feat_min, .feat_x, .feat_y, .feat_last
  );

  feature_matcher #(.NPIX(NPIX)) u_match (
    .clk, .rst_n,
    .feat_valid, .feat, .feat_last,
    .ref_we, .ref_addr, .ref_wdata,
    .match_valid, .match_class,
    .hdist(match_dist)
  );

  pallet_ctrl #(.T1(T1), .T2(T2), .T3(T3), .P1(P1)) u_ctrl (
    .clk, .rst_n,
    .cls_valid(match_valid),
    .cls      (match_class),
    .angle, .s1,
    .od, .pc1, .pc2, .stop, .err_stop, .busy, .dropped
  );

  // The DoG stage's own coordinates equal the extrema window's input order;
  // a DoG sample must never arrive with a position outside the Gaussian border.
  assert property (@(posedge clk) disable iff (!rst_n)
    d_valid |-> (d_x >= XW'(2) && d_y >= YW'(2)));
  assert property (@(posedge clk) disable iff (!rst_n)
    d_last |-> d_valid);

endmodule
