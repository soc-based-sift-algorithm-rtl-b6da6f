// sift_pkg: types and constants shared by the SIFT featurepoint pipeline and
// the palletization controller.
//
// The image is an 8-bit grayscale frame of IMG_W x IMG_H pixels (300 x 300),
// streamed in raster order. Gaussian images keep 8 bits, DoG samples are
// signed 9-bit differences. The matcher classifies each frame as one of the
// three object types the system is built to sort: A, B and defective B.
package sift_pkg;

  parameter int unsigned IMG_W = 300;   // preprocessed image width
  parameter int unsigned IMG_H = 300;   // preprocessed image height

  typedef logic [7:0]        pixel_t;   // grayscale / Gaussian sample
  typedef logic signed [8:0] dog_t;     // difference of two Gaussian samples

  // Result of feature matching.
  typedef enum logic [1:0] {
    CLS_A    = 2'd0,
    CLS_B    = 2'd1,
    CLS_BDEF = 2'd2
  } obj_class_e;

  // One 1-D Gaussian kernel, five taps summing to 64 (2-D weight = product,
  // total 4096, normalised by a right shift of 12).
  typedef logic [4:0][7:0] kern5_t;   // tap i at index i

  // sigma = 0.7, 1.0, 1.4, 2.0 (ratio sqrt(2) between scales);
  // tap(i) = round(64 * exp(-i^2 / (2 sigma^2)) / sum), i = -2..2.
  parameter kern5_t KERN_S0 = {8'd1, 8'd13, 8'd36, 8'd13, 8'd1};
  parameter kern5_t KERN_S1 = {8'd3, 8'd16, 8'd26, 8'd16, 8'd3};
  parameter kern5_t KERN_S2 = {8'd7, 8'd15, 8'd20, 8'd15, 8'd7};
  parameter kern5_t KERN_S3 = {8'd10, 8'd14, 8'd16, 8'd14, 8'd10};

endpackage
