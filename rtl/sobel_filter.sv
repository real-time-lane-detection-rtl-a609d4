// sobel_filter: streaming 3x3 Sobel gradient over a W x H grayscale image.
//
// G = |Gx| + |Gy| with
//   Gx = [-1 0 +1; -2 0 +2; -1 0 +1] * I,   Gy = [-1 -2 -1; 0 0 0; +1 +2 +1] * I
// (kernels and the |Gx|+|Gy| combination are the design's). Two line buffers
// of W pixels and a 3x3 window of registers give the nine pixels of a position
// as soon as its lower-right neighbour arrives, so one pixel is consumed and
// one gradient produced per clock. Pixels on the image border, where the
// 3x3 window is incomplete, get G = 0 (this design's choice).
//
// Interface: pixels enter in raster order with their (in_row, in_col). The
// output stream (out_row, out_col, out_grad) lags by W+1 pixels plus one
// clock; the last W+1 outputs (all on the border) are emitted by the module
// itself in W+1 clocks after the last input pixel. out_last marks
// position (H-1, W-1).
module sobel_filter #(
  parameter int unsigned W = lane_pkg::ROI_W_D,
  parameter int unsigned H = lane_pkg::ROI_H_D
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [$clog2(H)-1:0] in_row,
  input  logic [$clog2(W)-1:0] in_col,
  input  logic [7:0]           in_pix,
  output logic                 out_valid,
  output logic                 out_last,
  output logic [$clog2(H)-1:0] out_row,
  output logic [$clog2(W)-1:0] out_col,
  output logic [10:0]          out_grad
);
  localparam int RW = $clog2(H);
  localparam int CW = $clog2(W);

  logic [7:0] lb1 [W];      // previous row
  logic [7:0] lb2 [W];      // row before that
  logic [7:0] w0 [3];       // window column c-2: [0]=top(r-2) [1]=mid [2]=bottom(r)
  logic [7:0] w1 [3];       // window column c-1
  logic [7:0] c2 [3];       // current column c
  logic [CW+RW:0] flush_cnt;
  logic           emit, interior, emit_now;
  logic signed [12:0] gx, gy;
  logic [10:0]        g_abs;
  logic [RW-1:0] o_r;
  logic [CW-1:0] o_c;

  always_comb begin
    c2[0] = lb2[in_col];
    c2[1] = lb1[in_col];
    c2[2] = in_pix;
    gx = (13'(c2[0]) + 13'(2 * c2[1]) + 13'(c2[2]))
       - (13'(w0[0]) + 13'(2 * w0[1]) + 13'(w0[2]));
    gy = (13'(w0[2]) + 13'(2 * w1[2]) + 13'(c2[2]))
       - (13'(w0[0]) + 13'(2 * w1[0]) + 13'(c2[0]));
    g_abs = 11'(gx < 0 ? -gx : gx) + 11'(gy < 0 ? -gy : gy);
    emit     = in_valid && ((in_row >= RW'(2)) || (in_row == RW'(1) && in_col >= CW'(1)));
    interior = (in_row >= RW'(2)) && (in_col >= CW'(2));
    emit_now = emit || (flush_cnt != 0);
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      lb2[in_col] <= lb1[in_col];
      lb1[in_col] <= in_pix;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 3; i++) begin
        w0[i] <= '0;
        w1[i] <= '0;
      end
      flush_cnt <= '0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_row   <= '0;
      out_col   <= '0;
      out_grad  <= '0;
      o_r       <= '0;
      o_c       <= '0;
    end else begin
      if (in_valid) begin
        w0 <= w1;
        w1 <= c2;
      end
      if (in_valid && in_row == RW'(H-1) && in_col == CW'(W-1))
        flush_cnt <= (CW+RW+1)'(W + 1);
      else if (!emit && flush_cnt != 0)
        flush_cnt <= flush_cnt - 1'b1;

      out_valid <= emit_now;
      out_last  <= emit_now && o_r == RW'(H-1) && o_c == CW'(W-1);
      out_row   <= o_r;
      out_col   <= o_c;
      out_grad  <= (emit && interior) ? 11'(g_abs) : 11'd0;
      if (emit_now) begin
        if (o_c == CW'(W-1)) begin
          o_c <= '0;
          o_r <= (o_r == RW'(H-1)) ? '0 : o_r + 1'b1;
        end else begin
          o_c <= o_c + 1'b1;
        end
      end
    end
  end
endmodule
