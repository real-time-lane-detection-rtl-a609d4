// line_weight: weight of one candidate line in the pre-processed ROI.
//
// For every row R of the ROI the line's x position is
//   x_R = x_top + R * s,   s = (x_bottom - x_top) * (1/H)
// with 1/H held as the fixed-point constant round(2^16/H), so no divider is
// needed. The intensities of the pixels x_R - nbhd ... x_R + nbhd of that row
// that lie inside the ROI are added to the weight; the neighbourhood accounts
// for markings that are several pixels wide. The formula and the
// neighbourhood sum are the design's; the row-per-clock schedule and the
// maximum neighbourhood NB_MAX (run-time nbhd <= NB_MAX) are this
// implementation's.
//
// Interface: start with line and nbhd, one clock. The unit reads one image row
// per clock through (rd_en, rd_row) and gets the row one clock later on
// rd_data. done pulses with weight valid H+2 clocks after start; busy is high
// in between. A start while busy is ignored.
// Also exposes the row index (cur_row) and x position (cur_x) of the row whose
// data is being summed, so that a caller can compute other per-row terms.
module line_weight
  import lane_pkg::*;
#(
  parameter int unsigned W      = ROI_W_D,
  parameter int unsigned H      = ROI_H_D,
  parameter int unsigned NB_MAX = 7
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  line_t                      line,
  input  logic [$clog2(NB_MAX+1)-1:0] nbhd,
  output logic                       rd_en,
  output logic [$clog2(H)-1:0]       rd_row,
  input  logic [7:0]                 rd_data [W],
  output logic                       row_valid,
  output logic [$clog2(H)-1:0]       cur_row,
  output logic signed [COORD_W+1:0]  cur_x,
  output logic                       busy,
  output logic                       done,
  output logic [WEIGHT_W-1:0]        weight
);
  localparam int RW = $clog2(H);
  localparam int unsigned INV_H = recip_q16(H);

  line_t                    l_q;
  logic [$clog2(NB_MAX+1)-1:0] nb_q;
  logic [RW:0]              r_q;        // next row to read
  logic                     issuing;
  logic                     d_valid;    // rd_data belongs to row d_row
  logic [RW-1:0]            d_row;
  logic signed [COORD_W+1:0] d_x;
  logic [WEIGHT_W-1:0]      acc;
  logic [WEIGHT_W-1:0]      row_sum;
  logic signed [COORD_W+2:0] px;

  assign issuing = busy && (r_q < (RW+1)'(H));
  assign rd_en   = issuing;
  assign rd_row  = RW'(r_q);
  assign row_valid = d_valid;
  assign cur_row = d_row;
  assign cur_x   = d_x;

  always_comb begin
    row_sum = '0;
    for (int k = -int'(NB_MAX); k <= int'(NB_MAX); k++) begin
      px = (COORD_W+3)'(d_x) + (COORD_W+3)'(k);
      if ((k < 0 ? -k : k) <= int'(nb_q) && px >= 0 && px < (COORD_W+3)'(W))
        row_sum += WEIGHT_W'(rd_data[$clog2(W)'(px)]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; weight <= '0; acc <= '0;
      l_q <= '0; nb_q <= '0; r_q <= '0;
      d_valid <= 1'b0; d_row <= '0; d_x <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        l_q  <= line;
        nb_q <= nbhd;
        r_q  <= '0;
        acc  <= '0;
      end
      d_valid <= issuing;
      d_row   <= RW'(r_q);
      d_x     <= line_x(l_q, int'(r_q), INV_H);
      if (issuing) r_q <= r_q + 1'b1;
      if (d_valid) begin
        acc <= acc + row_sum;
        if (d_row == RW'(H-1)) begin
          weight <= acc + row_sum;
          done   <= 1'b1;
          busy   <= 1'b0;
        end
      end
    end
  end
endmodule
