// tb_sobel_filter: streams two random 12x6 grayscale images (with random
// idle gaps) through sobel_filter and compares every output pixel with a
// reference |Gx|+|Gy| computed here (0 on the border). Also checks that each
// image yields exactly W*H outputs in raster order and one out_last.
module tb_sobel_filter;
  localparam int W = 12, H = 6;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [$clog2(H)-1:0] in_row = '0;
  logic [$clog2(W)-1:0] in_col = '0;
  logic [7:0] in_pix = '0;
  logic out_valid, out_last;
  logic [$clog2(H)-1:0] out_row;
  logic [$clog2(W)-1:0] out_col;
  logic [10:0] out_grad;
  int checks = 0, failures = 0, count = 0, lasts = 0;
  int img [H][W];

  always #5 clk = ~clk;

  sobel_filter #(.W(W), .H(H)) dut (.*);

  function automatic int ref_g(int r, int c);
    int gx, gy;
    if (r == 0 || c == 0 || r == H - 1 || c == W - 1) return 0;
    gx = (img[r-1][c+1] + 2*img[r][c+1] + img[r+1][c+1]) - (img[r-1][c-1] + 2*img[r][c-1] + img[r+1][c-1]);
    gy = (img[r+1][c-1] + 2*img[r+1][c] + img[r+1][c+1]) - (img[r-1][c-1] + 2*img[r-1][c] + img[r-1][c+1]);
    return (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
  endfunction

  always @(posedge clk) if (rst_n && out_valid) begin
    int er, ec;
    er = count / W; ec = count % W;
    checks++;
    if (int'(out_row) != er || int'(out_col) != ec || int'(out_grad) != ref_g(er, ec)) begin
      failures++;
      $display("FAIL out (%0d,%0d)=%0d exp (%0d,%0d)=%0d", out_row, out_col, out_grad, er, ec, ref_g(er, ec));
    end
    if (out_last) begin
      lasts++;
      checks++;
      if (er != H - 1 || ec != W - 1) failures++;
    end
    count++;
  end

  task automatic run_image(int kind);
    count = 0; lasts = 0;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++)
        img[r][c] = (kind == 0) ? $urandom_range(0, 255) : ((c > 4 && c < 8) ? 235 : 16);
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        while ($urandom_range(0, 3) == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1; in_row = 3'(r); in_col = 4'(c); in_pix = 8'(img[r][c]);
        @(negedge clk);
      end
    in_valid = 0;
    repeat (W + 5) @(negedge clk);
    checks++; if (count != W * H) begin failures++; $display("FAIL count %0d", count); end
    checks++; if (lasts != 1) failures++;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_image(0);
    run_image(1);
    run_image(0);
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
