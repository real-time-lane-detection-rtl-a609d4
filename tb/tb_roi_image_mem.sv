// tb_roi_image_mem: writes a random 16x6 image pixel by pixel, then reads
// every row and compares all W pixels with the values written, checking the
// one-clock read latency. Rewrites some pixels and reads again.
module tb_roi_image_mem;
  localparam int W = 16, H = 6;
  logic clk = 0;
  logic wr_en = 0, rd_en = 0;
  logic [$clog2(H)-1:0] wr_row = '0, rd_row = '0;
  logic [$clog2(W)-1:0] wr_col = '0;
  logic [7:0] wr_data = '0;
  logic [7:0] rd_data [W];
  int checks = 0, failures = 0;
  int img [H][W];

  always #5 clk = ~clk;

  roi_image_mem #(.W(W), .H(H)) dut (.*);

  task automatic write_px(int r, int c, int v);
    wr_en = 1; wr_row = 3'(r); wr_col = 4'(c); wr_data = 8'(v);
    img[r][c] = v;
    @(negedge clk);
    wr_en = 0;
  endtask

  task automatic check_rows();
    for (int r = 0; r < H; r++) begin
      rd_en = 1; rd_row = 3'(r);
      @(negedge clk);
      rd_en = 0; rd_row = 3'((r + 1) % H);   // address change after the read must not matter
      for (int c = 0; c < W; c++) begin
        checks++;
        if (int'(rd_data[c]) != img[r][c]) begin
          failures++;
          $display("FAIL (%0d,%0d)=%0d exp %0d", r, c, rd_data[c], img[r][c]);
        end
      end
      @(negedge clk);
    end
  endtask

  initial begin
    @(negedge clk);
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) write_px(r, c, $urandom_range(0, 255));
    check_rows();
    for (int i = 0; i < 20; i++) write_px($urandom_range(0, H - 1), $urandom_range(0, W - 1), $urandom_range(0, 255));
    check_rows();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
