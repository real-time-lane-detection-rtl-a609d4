// roi_image_mem: on-chip buffer for the pre-processed ROI (H rows of W
// 8-bit pixels).
//
// The pre-processing writes one pixel per clock (wr_en, wr_row, wr_col,
// wr_data). The line weighting reads a whole row per clock (rd_en, rd_row);
// rd_data holds all W pixels of that row one clock later, pixel c in
// rd_data[c]. Organising the memory by rows, so that a line's neighbourhood
// in one row is available in one access, is this design's choice; the
// content is the image the pre-processing produces.
module roi_image_mem #(
  parameter int unsigned W = lane_pkg::ROI_W_D,
  parameter int unsigned H = lane_pkg::ROI_H_D
) (
  input  logic                 clk,
  input  logic                 wr_en,
  input  logic [$clog2(H)-1:0] wr_row,
  input  logic [$clog2(W)-1:0] wr_col,
  input  logic [7:0]           wr_data,
  input  logic                 rd_en,
  input  logic [$clog2(H)-1:0] rd_row,
  output logic [7:0]           rd_data [W]
);
  logic [7:0] mem [H][W];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_row][wr_col] <= wr_data;
    if (rd_en) rd_data <= mem[rd_row];
  end
endmodule
