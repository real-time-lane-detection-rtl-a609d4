// tb_roi_select: streams two small frames (FRAME 40x30, ROI 16x8) with random
// gaps and different ROI positions. Each pixel's colour encodes its frame
// coordinates, so every forwarded pixel can be checked for lying inside the
// ROI and for its reported ROI row/column; the number of forwarded pixels and
// the out_last position are checked too.
module tb_roi_select;
  import lane_pkg::*;
  localparam int FW = 40, FH = 30, RWID = 16, RH = 8;
  logic clk = 0, rst_n = 0;
  logic [$clog2(FW)-1:0] roi_x = '0;
  logic [$clog2(FH)-1:0] roi_y = '0;
  logic in_valid = 0, in_sof = 0;
  rgb_t in_rgb = '0;
  logic out_valid, out_last;
  logic [$clog2(RH)-1:0] out_row;
  logic [$clog2(RWID)-1:0] out_col;
  rgb_t out_rgb;
  int checks = 0, failures = 0, count = 0, lasts = 0;
  int cur_rx, cur_ry;

  always #5 clk = ~clk;

  roi_select #(.FRAME_W(FW), .FRAME_H(FH), .ROI_W(RWID), .ROI_H(RH)) dut (.*);

  always @(posedge clk) if (rst_n && out_valid) begin
    int fx, fy;
    fx = int'(out_rgb.r); fy = int'(out_rgb.g);
    count++;
    checks++;
    if (fx != cur_rx + int'(out_col) || fy != cur_ry + int'(out_row) ||
        fx < cur_rx || fx >= cur_rx + RWID || fy < cur_ry || fy >= cur_ry + RH) begin
      failures++;
      $display("FAIL pixel (%0d,%0d) at roi (%0d,%0d)", fx, fy, out_row, out_col);
    end
    if (out_last) begin
      lasts++;
      checks++;
      if (out_row != RH - 1 || out_col != RWID - 1) failures++;
    end
  end

  task automatic frame(int rx, int ry);
    count = 0; lasts = 0;
    cur_rx = rx; cur_ry = ry;
    roi_x = ($clog2(FW))'(rx); roi_y = ($clog2(FH))'(ry);
    for (int y = 0; y < FH; y++)
      for (int x = 0; x < FW; x++) begin
        while ($urandom_range(0, 4) == 0) begin
          in_valid = 0; in_sof = 0; @(negedge clk);
        end
        in_valid = 1; in_sof = (x == 0 && y == 0);
        in_rgb = '{8'(x), 8'(y), 8'(x ^ y)};
        @(negedge clk);
      end
    in_valid = 0; in_sof = 0;
    repeat (3) @(negedge clk);
    checks++; if (count != RWID * RH) begin failures++; $display("FAIL count %0d", count); end
    checks++; if (lasts != 1) failures++;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    frame(5, 12);
    frame(0, 0);
    frame(FW - RWID, FH - RH);
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
