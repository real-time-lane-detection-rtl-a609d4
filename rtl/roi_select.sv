// roi_select: crops the region of interest out of a raster-ordered camera
// frame stream.
//
// Pixels arrive one per accepted beat, row by row, starting with the pixel
// flagged by in_sof. The module counts the frame position and forwards only
// pixels with roi_x <= x < roi_x + ROI_W and roi_y <= y < roi_y + ROI_H,
// together with their position inside the ROI. The ROI position is a
// run-time input sampled at in_sof; its size is fixed by parameters (the
// design keeps both adjustable; a fixed size here sizes the line buffers).
// out_last marks the last ROI pixel. No backpressure: one pixel per clock.
module roi_select
  import lane_pkg::*;
#(
  parameter int unsigned FRAME_W = FRAME_W_D,
  parameter int unsigned FRAME_H = FRAME_H_D,
  parameter int unsigned ROI_W   = ROI_W_D,
  parameter int unsigned ROI_H   = ROI_H_D
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [$clog2(FRAME_W)-1:0] roi_x,
  input  logic [$clog2(FRAME_H)-1:0] roi_y,
  input  logic                       in_valid,
  input  logic                       in_sof,
  input  rgb_t                       in_rgb,
  output logic                       out_valid,
  output logic                       out_last,
  output logic [$clog2(ROI_H)-1:0]   out_row,
  output logic [$clog2(ROI_W)-1:0]   out_col,
  output rgb_t                       out_rgb
);
  localparam int XW = $clog2(FRAME_W);
  localparam int YW = $clog2(FRAME_H);

  logic [XW-1:0] x_q, x_cur, rx_q, rx_cur;
  logic [YW-1:0] y_q, y_cur, ry_q, ry_cur;
  logic          in_roi;
  logic [XW:0]   dx;
  logic [YW:0]   dy;

  always_comb begin
    x_cur  = in_sof ? '0    : x_q;
    y_cur  = in_sof ? '0    : y_q;
    rx_cur = in_sof ? roi_x : rx_q;
    ry_cur = in_sof ? roi_y : ry_q;
    dx     = {1'b0, x_cur} - {1'b0, rx_cur};
    dy     = {1'b0, y_cur} - {1'b0, ry_cur};
    in_roi = (x_cur >= rx_cur) && (dx < (XW+1)'(ROI_W)) &&
             (y_cur >= ry_cur) && (dy < (YW+1)'(ROI_H));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q <= '0; y_q <= '0; rx_q <= '0; ry_q <= '0;
      out_valid <= 1'b0; out_last <= 1'b0;
      out_row <= '0; out_col <= '0; out_rgb <= '0;
    end else begin
      out_valid <= in_valid && in_roi;
      out_last  <= in_valid && in_roi && (dx == (XW+1)'(ROI_W-1)) && (dy == (YW+1)'(ROI_H-1));
      out_row   <= ($clog2(ROI_H))'(dy);
      out_col   <= ($clog2(ROI_W))'(dx);
      out_rgb   <= in_rgb;
      if (in_valid) begin
        rx_q <= rx_cur;
        ry_q <= ry_cur;
        if (x_cur == XW'(FRAME_W-1)) begin
          x_q <= '0;
          y_q <= (y_cur == YW'(FRAME_H-1)) ? '0 : y_cur + 1'b1;
        end else begin
          x_q <= x_cur + 1'b1;
          y_q <= y_cur;
        end
      end
    end
  end
endmodule
