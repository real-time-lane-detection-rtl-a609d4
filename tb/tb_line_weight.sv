// tb_line_weight: 32x8 random image in a roi_image_mem; random lines
// (including lines leaving the ROI) and random neighbourhood widths. Each
// weight is compared with a reference sum computed here over the same rows,
// and done must come H+2 clocks after start.
module tb_line_weight;
  import lane_pkg::*;
  localparam int W = 32, H = 8, NB = 3;
  `include "tb_lane_model.svh"
  logic clk = 0, rst_n = 0;
  logic start = 0;
  line_t line = '0;
  logic [$clog2(NB+1)-1:0] nbhd = '0;
  logic rd_en, row_valid, busy, done;
  logic [$clog2(H)-1:0] rd_row, cur_row;
  logic [7:0] rd_data [W];
  logic signed [COORD_W+1:0] cur_x;
  logic [WEIGHT_W-1:0] weight;
  logic wr_en = 0;
  logic [$clog2(H)-1:0] wr_row = '0;
  logic [$clog2(W)-1:0] wr_col = '0;
  logic [7:0] wr_data = '0;
  int checks = 0, failures = 0;
  int img [H][W];

  always #5 clk = ~clk;

  roi_image_mem #(.W(W), .H(H)) mem (.clk, .wr_en, .wr_row, .wr_col, .wr_data,
                                     .rd_en, .rd_row, .rd_data);
  line_weight #(.W(W), .H(H), .NB_MAX(NB)) dut (.*);

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

  task automatic one(int xt, int xb, int nb);
    int cyc;
    line = '{coord_t'(xt), coord_t'(xb)}; nbhd = 2'(nb); start = 1;
    @(negedge clk);
    start = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (int'(weight) != ref_w(xt, xb, nb)) begin
      failures++;
      $display("FAIL line %0d->%0d nb %0d: %0d exp %0d", xt, xb, nb, weight, ref_w(xt, xb, nb));
    end
    checks++;
    if (cyc != H + 2) begin failures++; $display("FAIL latency %0d", cyc); end
    @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        img[r][c] = $urandom_range(0, 3) == 0 ? 255 : $urandom_range(0, 20);
        wr_en = 1; wr_row = 3'(r); wr_col = 5'(c); wr_data = 8'(img[r][c]);
        @(negedge clk);
      end
    wr_en = 0;
    one(5, 5, 0); one(0, 31, 1); one(31, 0, 3); one(-10, 40, 2); one(40, 50, 3);
    for (int i = 0; i < 200; i++)
      one($urandom_range(0, 60) - 14, $urandom_range(0, 60) - 14, $urandom_range(0, NB));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
