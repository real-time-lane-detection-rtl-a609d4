// tb_preprocess: a 24x16 random RGB frame with a vertical bright stripe is
// streamed into preprocess with a 12x6 ROI at (5,4) and threshold 50. A
// reference model here crops, converts (66R+129G+25B+128)>>8 + 16, applies
// the Sobel operator (0 on the ROI border) and thresholds to 0/255; every
// written ROI pixel is compared, and the count, the done pulse and the
// latency from the last ROI pixel to done are checked. Two frames are run.
module tb_preprocess;
  import lane_pkg::*;
  localparam int FW = 24, FH = 16, RWD = 12, RH = 6, RX = 5, RY = 4;
  logic clk = 0, rst_n = 0;
  logic [$clog2(FW)-1:0] roi_x = RX;
  logic [$clog2(FH)-1:0] roi_y = RY;
  logic [10:0] threshold = 11'd50;
  logic in_valid = 0, in_sof = 0;
  rgb_t in_rgb = '0;
  logic out_valid, out_done;
  logic [$clog2(RH)-1:0] out_row;
  logic [$clog2(RWD)-1:0] out_col;
  logic [7:0] out_pix;
  int checks = 0, failures = 0, count = 0, dones = 0;
  rgb_t frame_px [FH][FW];
  int gray [RH][RWD];
  int ones = 0;
  longint t_done;

  always #5 clk = ~clk;

  preprocess #(.FRAME_W(FW), .FRAME_H(FH), .ROI_W(RWD), .ROI_H(RH)) dut (.*);

  function automatic int ref_pix(int r, int c);
    int gx, gy;
    if (r == 0 || c == 0 || r == RH - 1 || c == RWD - 1) return 0;
    gx = (gray[r-1][c+1] + 2*gray[r][c+1] + gray[r+1][c+1]) - (gray[r-1][c-1] + 2*gray[r][c-1] + gray[r+1][c-1]);
    gy = (gray[r+1][c-1] + 2*gray[r+1][c] + gray[r+1][c+1]) - (gray[r-1][c-1] + 2*gray[r-1][c] + gray[r-1][c+1]);
    return ((gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy)) >= 50 ? 255 : 0;
  endfunction

  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (int'(out_row) != count / RWD || int'(out_col) != count % RWD ||
        int'(out_pix) != ref_pix(count / RWD, count % RWD)) begin
      failures++;
      $display("FAIL (%0d,%0d)=%0d exp %0d", out_row, out_col, out_pix, ref_pix(count / RWD, count % RWD));
    end
    if (out_pix != 0) ones++;
    if (out_done) begin dones++; t_done = $time; end
    count++;
  end

  task automatic run_frame(int seed_kind);
    longint t_last;
    count = 0; dones = 0;
    for (int y = 0; y < FH; y++)
      for (int x = 0; x < FW; x++) begin
        int base;
        base = (x >= 10 && x <= 12) ? 200 : 40;
        frame_px[y][x] = '{8'(base + $urandom_range(0, 30 * seed_kind)),
                           8'(base + $urandom_range(0, 30 * seed_kind)),
                           8'(base + $urandom_range(0, 30 * seed_kind))};
      end
    for (int r = 0; r < RH; r++)
      for (int c = 0; c < RWD; c++) begin
        rgb_t p;
        p = frame_px[RY + r][RX + c];
        gray[r][c] = ((66 * p.r + 129 * p.g + 25 * p.b + 128) >> 8) + 16;
      end
    for (int y = 0; y < FH; y++)
      for (int x = 0; x < FW; x++) begin
        in_valid = 1; in_sof = (x == 0 && y == 0); in_rgb = frame_px[y][x];
        @(negedge clk);
        if (y == RY + RH - 1 && x == RX + RWD - 1) t_last = $time;
      end
    in_valid = 0; in_sof = 0;
    while (dones == 0) @(negedge clk);
    repeat (3) @(negedge clk);
    checks++; if (count != RWD * RH) begin failures++; $display("FAIL count %0d", count); end
    checks++; if (dones != 1) failures++;
    // done is visible W+4 clocks after the clock that takes the last ROI pixel:
    // ROI select 1 + grayscale 2 + Sobel input 1 + W flush outputs; the monitor
    // samples it one clock later
    checks++;
    if ((t_done - t_last + 5) / 10 != RWD + 5) begin
      failures++;
      $display("FAIL latency %0d", (t_done - t_last + 5) / 10);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_frame(1);
    run_frame(3);
    checks++; if (ones == 0) begin failures++; $display("FAIL no edge pixels"); end
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
