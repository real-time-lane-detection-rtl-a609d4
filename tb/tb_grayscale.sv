// tb_grayscale: drives random and corner RGB pixels into grayscale, one per
// clock, and compares every output with 16 + ((66R + 129G + 25B + 128) >> 8)
// computed here, two clocks after the input (the stated latency).
module tb_grayscale;
  import lane_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  rgb_t in_rgb = '0;
  logic out_valid;
  logic [7:0] out_y;
  int checks = 0, failures = 0;
  logic [7:0] exp_q [$];

  always #5 clk = ~clk;

  grayscale dut (.*);

  function automatic logic [7:0] ref_y(rgb_t p);
    int y;
    y = 66 * p.r + 129 * p.g + 25 * p.b;
    y = (y + 128) >> 8;
    return 8'(y + 16);
  endfunction

  // expected values shifted by the two-clock latency
  logic [7:0] e1, e2;
  logic       v1, v2;
  always @(posedge clk) begin
    v1 <= in_valid; e1 <= ref_y(in_rgb);
    v2 <= v1;       e2 <= e1;
    if (rst_n) begin
      if (out_valid !== v2) begin failures++; $display("valid mismatch"); end
      if (v2) begin
        checks++;
        if (out_y !== e2) begin
          failures++;
          $display("FAIL y=%0d exp=%0d", out_y, e2);
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    in_valid = 1; in_rgb = '{8'd0, 8'd0, 8'd0};          @(negedge clk);
    in_rgb = '{8'd255, 8'd255, 8'd255};                  @(negedge clk);
    in_rgb = '{8'd255, 8'd0, 8'd0};                      @(negedge clk);
    for (int i = 0; i < 2000; i++) begin
      in_valid = ($urandom_range(0, 3) != 0);
      in_rgb   = '{8'($urandom), 8'($urandom), 8'($urandom)};
      @(negedge clk);
    end
    in_valid = 0;
    repeat (4) @(negedge clk);
    // range check of the formula itself: black -> 16, white -> 235
    checks++; if (ref_y('0) != 8'd16) failures++;
    checks++; if (ref_y('1) != 8'd235) failures++;
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
