// tb_lane_detect: 64x8 ROI, two regions, 64 candidate lines per region.
// The image holds one bright 3-pixel-wide marking per region. Checks:
// every candidate's weight against a reference sum over the image, the
// candidate order (lane, index) and count, that the reported best line of
// each region is the first candidate of highest weight, that the sampled
// x_top/x_bottom spread around the region centre with about the requested
// deviation, that each best line lies on its marking, and the run time.
module tb_lane_detect;
  import lane_pkg::*;
  localparam int W = 64, H = 8, LANES = 2, NL = 64, NB = 2;
  `include "tb_lane_model.svh"
  logic clk = 0, rst_n = 0;
  logic start = 0;
  logic [11:0] sigma = 12'd16;           // region width / 2
  logic [$clog2(NB+1)-1:0] nbhd = 2'd1;
  logic busy, done;
  line_t best [LANES];
  logic [WEIGHT_W-1:0] best_w [LANES];
  logic cand_valid;
  logic [$clog2(LANES+1)-1:0] cand_lane;
  logic [$clog2(NL+1)-1:0] cand_idx;
  line_t cand_line;
  logic [WEIGHT_W-1:0] cand_weight;
  logic rd_en;
  logic [$clog2(H)-1:0] rd_row;
  logic [7:0] rd_data [W];
  logic wr_en = 0;
  logic [$clog2(H)-1:0] wr_row = '0;
  logic [$clog2(W)-1:0] wr_col = '0;
  logic [7:0] wr_data = '0;
  int checks = 0, failures = 0, count = 0;
  int img [H][W];
  int mx_w [LANES];
  line_t mx_l [LANES];
  real sum_x [LANES], sum_x2 [LANES];
  int mark_t [LANES] = '{12, 50};
  int mark_b [LANES] = '{20, 44};

  logic rng_load = 0;
  logic [63:0] rng_seed = '0;
  logic [$clog2(NL+1)-1:0] n_lines = NL;
  int nl_run = NL;
  always #5 clk = ~clk;

  roi_image_mem #(.W(W), .H(H)) mem (.clk, .wr_en, .wr_row, .wr_col, .wr_data,
                                     .rd_en, .rd_row, .rd_data);
  lane_detect #(.W(W), .H(H), .LANES(LANES), .NLINES(NL), .NB_MAX(NB)) dut (.*);

  function automatic int ref_w(int xt, int xb, int nb);
    int s, x;
    s = 0;
    for (int r = 0; r < H; r++) begin
      x = ref_x(xt, xb, r, H);
      for (int k = x - nb; k <= x + nb; k++)
        if (k >= 0 && k < W) s += img[r][k];
    end
    return s;
  endfunction

  always @(posedge clk) if (rst_n && cand_valid) begin
    int l, xt, xb;
    l = int'(cand_lane); xt = int'(cand_line.x_top); xb = int'(cand_line.x_bottom);
    checks++;
    if (l != count / nl_run || int'(cand_idx) != count % nl_run) begin
      failures++; $display("FAIL order lane %0d idx %0d at %0d", l, cand_idx, count);
    end
    checks++;
    if (int'(cand_weight) != ref_w(xt, xb, int'(nbhd))) begin
      failures++; $display("FAIL weight %0d exp %0d", cand_weight, ref_w(xt, xb, int'(nbhd)));
    end
    if (count % nl_run == 0 || int'(cand_weight) > mx_w[l]) begin
      mx_w[l] = int'(cand_weight); mx_l[l] = cand_line;
    end
    sum_x[l] += real'(xt - (32 * l + 16)) + real'(xb - (32 * l + 16));
    sum_x2[l] += real'((xt - (32 * l + 16)) ** 2) + real'((xb - (32 * l + 16)) ** 2);
    count++;
  end

  initial begin
    int cyc;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        img[r][c] = 0;
        for (int l = 0; l < LANES; l++) begin
          int x;
          x = ref_x(mark_t[l], mark_b[l], r, H);
          if (c >= x - 1 && c <= x + 1) img[r][c] = 255;
        end
        wr_en = 1; wr_row = 3'(r); wr_col = 6'(c); wr_data = 8'(img[r][c]);
        @(negedge clk);
      end
    wr_en = 0;
    for (int l = 0; l < LANES; l++) begin sum_x[l] = 0.0; sum_x2[l] = 0.0; end
    start = 1; @(negedge clk); start = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    @(negedge clk);
    checks++; if (count != LANES * NL) begin failures++; $display("FAIL count %0d", count); end
    // per candidate: two samples (>= 2 clocks), 1 start clock, H+2 weighting
    checks++;
    if (cyc < LANES * NL * (H + 5) || cyc > LANES * NL * (H + 9)) begin
      failures++; $display("FAIL cycles %0d", cyc);
    end
    for (int l = 0; l < LANES; l++) begin
      real m, sd;
      checks++;
      if (best[l] != mx_l[l] || int'(best_w[l]) != mx_w[l]) begin
        failures++; $display("FAIL best lane %0d", l);
      end
      m  = sum_x[l] / (2.0 * NL);
      sd = $sqrt(sum_x2[l] / (2.0 * NL) - m * m);
      $display("lane %0d: best %0d->%0d w=%0d, sample mean %f sd %f", l, int'(best[l].x_top),
               int'(best[l].x_bottom), best_w[l], m, sd);
      checks++;
      if (m < -6.0 || m > 6.0 || sd < 11.0 || sd > 21.0) begin
        failures++; $display("FAIL sampling lane %0d", l);
      end
      checks++;
      if (int'(best[l].x_top) < mark_t[l] - 4 || int'(best[l].x_top) > mark_t[l] + 4 ||
          int'(best[l].x_bottom) < mark_b[l] - 4 || int'(best[l].x_bottom) > mark_b[l] + 4) begin
        failures++; $display("FAIL best line far from marking, lane %0d", l);
      end
    end
    // second run with only 10 candidates per region
    count = 0; nl_run = 10; n_lines = ($clog2(NL+1))'(10);
    start = 1; @(negedge clk); start = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    @(negedge clk);
    checks++; if (count != LANES * 10) begin failures++; $display("FAIL count %0d with 10 lines", count); end
    checks++;
    if (cyc < LANES * 10 * (H + 5) || cyc > LANES * 10 * (H + 9)) begin
      failures++; $display("FAIL cycles %0d with 10 lines", cyc);
    end
    for (int l = 0; l < LANES; l++) begin
      checks++;
      if (best[l] != mx_l[l] || int'(best_w[l]) != mx_w[l]) begin
        failures++; $display("FAIL best lane %0d with 10 lines", l);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
