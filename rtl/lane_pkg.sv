// lane_pkg: types and default sizes shared by the lane detection and
// tracking accelerator.
//
// A lane marking is a straight line across the region of interest (ROI),
// stored only as the x position where it crosses the first ROI row (x_top)
// and the last ROI row (x_bottom); the y values are implied by the ROI height.
// Each coordinate is a 12-bit signed integer so that one line occupies three
// bytes, and a line may start or end outside the ROI (negative or >= width).
//
// Default sizes follow the main configuration of the design: a 72x512 pixel
// ROI out of a 640x480 camera frame, two lane markings, 256 candidate lines
// per marking for detection (half the ROI width), 64 particles per marking for
// tracking and a threshold of 50 on the gradient image. MAX_VAL (255), the
// neighbourhood width and the prediction noise are this design's own choices.
package lane_pkg;

  localparam int COORD_W   = 12;     // bits per line coordinate
  localparam int PIX_W     = 8;      // bits per grayscale / gradient pixel
  localparam int WEIGHT_W  = 24;     // bits of a detection weight sum
  localparam int DIST_W    = 24;     // bits of a tracking distance sum
  localparam int PW_W      = 17;     // importance weight, Q1.16 (1.0 = 65536)
  localparam int Z_W       = 16;     // normal sample, signed Q8.8

  localparam int FRAME_W_D = 640;
  localparam int FRAME_H_D = 480;
  localparam int ROI_W_D   = 512;
  localparam int ROI_H_D   = 72;
  localparam int LANES_D   = 2;
  localparam int NLINES_D  = 256;
  localparam int NPART_D   = 64;
  localparam int THRESH_D  = 50;
  localparam int MAX_VAL_D = 255;

  typedef logic signed [COORD_W-1:0] coord_t;

  typedef struct packed {
    coord_t x_top;
    coord_t x_bottom;
  } line_t;

  typedef struct packed {
    logic [7:0] r;
    logic [7:0] g;
    logic [7:0] b;
  } rgb_t;

  // Fixed-point reciprocal 2^16/n, rounded; used as one_divided_by_row_numbers.
  function automatic int unsigned recip_q16(int unsigned n);
    return (32'd65536 + n / 2) / n;
  endfunction

  // x position of a line in row r: x_top + r * slope, slope = (x_bottom - x_top) / H.
  // inv_h is 2^16/H. The product is rounded to the nearest pixel.
  function automatic logic signed [COORD_W+1:0] line_x(line_t l, int unsigned r,
                                                       int unsigned inv_h);
    logic signed [COORD_W:0]  dx;
    logic signed [47:0]       slope_q16;
    logic signed [47:0]       off_q16;
    dx        = (COORD_W+1)'(l.x_bottom) - (COORD_W+1)'(l.x_top);
    slope_q16 = 48'(dx) * 48'(signed'({1'b0, inv_h}));
    off_q16   = slope_q16 * 48'(signed'({1'b0, r}));
    return (COORD_W+2)'(l.x_top) + (COORD_W+2)'((off_q16 + 48'sd32768) >>> 16);
  endfunction

endpackage
