// preprocess: the pre-processing stage. A camera frame streams in one RGB
// pixel per clock; the region of interest is cropped, converted to grayscale,
// run through the Sobel filter and thresholded, and every pixel of the
// resulting ROI image is presented on a write port for the image buffer.
//
//   roi_select -> grayscale (2 clk) -> sobel_filter (W+1 pixels + 1 clk)
//             -> threshold_unit (combinational) -> out_* write port
//
// The order of the four steps and each step's arithmetic are the design's.
// The stream form (one pixel per clock, line buffers instead of fetching nine
// pixels per output from memory) is this implementation's way of doing the
// per-pixel parallel work in hardware. out_done pulses with the last pixel
// (H-1, W-1) of the ROI image. The threshold is a run-time input.
module preprocess
  import lane_pkg::*;
#(
  parameter int unsigned FRAME_W = FRAME_W_D,
  parameter int unsigned FRAME_H = FRAME_H_D,
  parameter int unsigned ROI_W   = ROI_W_D,
  parameter int unsigned ROI_H   = ROI_H_D,
  parameter int unsigned MAX_VAL = MAX_VAL_D
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [$clog2(FRAME_W)-1:0] roi_x,
  input  logic [$clog2(FRAME_H)-1:0] roi_y,
  input  logic [10:0]                threshold,
  input  logic                       in_valid,
  input  logic                       in_sof,
  input  rgb_t                       in_rgb,
  output logic                       out_valid,
  output logic [$clog2(ROI_H)-1:0]   out_row,
  output logic [$clog2(ROI_W)-1:0]   out_col,
  output logic [7:0]                 out_pix,
  output logic                       out_done
);
  localparam int RW = $clog2(ROI_H);
  localparam int CW = $clog2(ROI_W);

  logic          r_valid, r_last;
  logic [RW-1:0] r_row;
  logic [CW-1:0] r_col;
  rgb_t          r_rgb;
  logic          g_valid;
  logic [7:0]    g_y;
  logic [RW-1:0] d1_row, d2_row;
  logic [CW-1:0] d1_col, d2_col;
  logic          s_valid, s_last;
  logic [RW-1:0] s_row;
  logic [CW-1:0] s_col;
  logic [10:0]   s_grad;

  roi_select #(.FRAME_W(FRAME_W), .FRAME_H(FRAME_H), .ROI_W(ROI_W), .ROI_H(ROI_H)) u_roi (
    .clk, .rst_n, .roi_x, .roi_y, .in_valid, .in_sof, .in_rgb,
    .out_valid(r_valid), .out_last(r_last), .out_row(r_row), .out_col(r_col), .out_rgb(r_rgb)
  );

  grayscale u_gray (
    .clk, .rst_n, .in_valid(r_valid), .in_rgb(r_rgb), .out_valid(g_valid), .out_y(g_y)
  );

  // carry the ROI position alongside the two grayscale pipeline stages
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d1_row <= '0; d1_col <= '0; d2_row <= '0; d2_col <= '0;
    end else begin
      d1_row <= r_row; d1_col <= r_col;
      d2_row <= d1_row; d2_col <= d1_col;
    end
  end

  sobel_filter #(.W(ROI_W), .H(ROI_H)) u_sobel (
    .clk, .rst_n, .in_valid(g_valid), .in_row(d2_row), .in_col(d2_col), .in_pix(g_y),
    .out_valid(s_valid), .out_last(s_last), .out_row(s_row), .out_col(s_col), .out_grad(s_grad)
  );

  threshold_unit #(.GRAD_W(11), .MAX_VAL(MAX_VAL)) u_thr (
    .grad(s_grad), .threshold, .pix(out_pix)
  );

  assign out_valid = s_valid;
  assign out_row   = s_row;
  assign out_col   = s_col;
  assign out_done  = s_last;

  logic unused;
  assign unused = r_last;
endmodule
