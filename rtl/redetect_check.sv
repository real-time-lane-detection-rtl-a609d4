// redetect_check: sanity check of the lane markings found in a frame. A
// failed check makes the controller run lane detection again.
//
// Three criteria, all from the design:
//   crossed   - neighbouring markings must not cross: for every pair of
//               neighbouring regions i, i+1 both x_top(i) < x_top(i+1) and
//               x_bottom(i) < x_bottom(i+1);
//   too_close - neighbouring markings keep a minimum distance: both
//               |x_top| and |x_bottom| differences >= min_dist (20% of the ROI
//               width in the design's tuning; run-time input);
//   outside   - every marking lies inside the ROI for at least min_rows of
//               the H rows (30% of the marking in the design's tuning).
// How "distance" and "part of the marking in the ROI" are measured (endpoint
// differences, count of rows with 0 <= x < W) is this design's reading.
//
// Interface: start pulse with lines[] held stable until done. The row count
// takes one clock per row, so done pulses H+2 clocks after start with ok and
// the three flags valid until the next start.
module redetect_check
  import lane_pkg::*;
#(
  parameter int unsigned W     = ROI_W_D,
  parameter int unsigned H     = ROI_H_D,
  parameter int unsigned LANES = LANES_D
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  line_t                 lines [LANES],
  input  logic [11:0]           min_dist,
  input  logic [$clog2(H+1)-1:0] min_rows,
  output logic                  busy,
  output logic                  done,
  output logic                  ok,
  output logic                  crossed,
  output logic                  too_close,
  output logic                  outside
);
  localparam int RW = $clog2(H+1);
  localparam int unsigned INV_H = recip_q16(H);

  logic [RW-1:0] r_q;
  logic [RW-1:0] cnt [LANES];
  logic          cross_c, close_c, out_c;
  logic signed [COORD_W+1:0] xr [LANES];

  function automatic logic [COORD_W:0] absdiff(coord_t a, coord_t b);
    logic signed [COORD_W:0] d;
    d = (COORD_W+1)'(a) - (COORD_W+1)'(b);
    return d < 0 ? -d : d;
  endfunction

  always_comb begin
    cross_c = 1'b0;
    close_c = 1'b0;
    for (int i = 0; i + 1 < int'(LANES); i++) begin
      if (!(lines[i].x_top < lines[i+1].x_top) || !(lines[i].x_bottom < lines[i+1].x_bottom))
        cross_c = 1'b1;
      if (absdiff(lines[i].x_top, lines[i+1].x_top) < (COORD_W+1)'(min_dist) ||
          absdiff(lines[i].x_bottom, lines[i+1].x_bottom) < (COORD_W+1)'(min_dist))
        close_c = 1'b1;
    end
    out_c = 1'b0;
    for (int i = 0; i < int'(LANES); i++) begin
      xr[i] = line_x(lines[i], int'(r_q), INV_H);
      if (cnt[i] < min_rows) out_c = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; ok <= 1'b0;
      crossed <= 1'b0; too_close <= 1'b0; outside <= 1'b0; r_q <= '0;
      for (int i = 0; i < int'(LANES); i++) cnt[i] <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        r_q  <= '0;
        for (int i = 0; i < int'(LANES); i++) cnt[i] <= '0;
      end else if (busy) begin
        if (r_q == RW'(H)) begin
          busy      <= 1'b0;
          done      <= 1'b1;
          crossed   <= cross_c;
          too_close <= close_c;
          outside   <= out_c;
          ok        <= !(cross_c || close_c || out_c);
        end else begin
          for (int i = 0; i < int'(LANES); i++)
            if (xr[i] >= 0 && xr[i] < (COORD_W+2)'(W)) cnt[i] <= cnt[i] + 1'b1;
          r_q <= r_q + 1'b1;
        end
      end
    end
  end
endmodule
