// tb_redetect_check: 64x20 ROI, three lanes, min_dist 13 (20% of 64),
// min_rows 6 (30% of 20). Hand-made cases for each criterion (good lanes,
// crossing, too close, a marking leaving the ROI) and random line sets,
// each compared with a reference evaluation of the three criteria here;
// done must come H+2 clocks after start.
module tb_redetect_check;
  import lane_pkg::*;
  localparam int W = 64, H = 20, LANES = 3;
  `include "tb_lane_model.svh"
  logic clk = 0, rst_n = 0;
  logic start = 0;
  line_t lines [LANES];
  logic [11:0] min_dist = 12'd13;
  logic [$clog2(H+1)-1:0] min_rows = 5'd6;
  logic busy, done, ok, crossed, too_close, outside;
  int checks = 0, failures = 0;
  int n_cross = 0, n_close = 0, n_out = 0, n_ok = 0;

  always #5 clk = ~clk;

  redetect_check #(.W(W), .H(H), .LANES(LANES)) dut (.*);

  function automatic int iabs(int a);
    return a < 0 ? -a : a;
  endfunction

  task automatic check(int t0, int b0, int t1, int b1, int t2, int b2);
    int xt [LANES], xb [LANES];
    bit e_cross, e_close, e_out;
    int cyc;
    xt = '{t0, t1, t2}; xb = '{b0, b1, b2};
    e_cross = 0; e_close = 0; e_out = 0;
    for (int i = 0; i < LANES; i++) lines[i] = '{coord_t'(xt[i]), coord_t'(xb[i])};
    for (int i = 0; i + 1 < LANES; i++) begin
      if (!(xt[i] < xt[i+1]) || !(xb[i] < xb[i+1])) e_cross = 1;
      if (iabs(xt[i] - xt[i+1]) < 13 || iabs(xb[i] - xb[i+1]) < 13) e_close = 1;
    end
    for (int i = 0; i < LANES; i++) begin
      int n, x;
      n = 0;
      for (int r = 0; r < H; r++) begin
        x = ref_x(xt[i], xb[i], r, H);
        if (x >= 0 && x < W) n++;
      end
      if (n < 6) e_out = 1;
    end
    start = 1; @(negedge clk); start = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (crossed != e_cross || too_close != e_close || outside != e_out ||
        ok != !(e_cross || e_close || e_out)) begin
      failures++;
      $display("FAIL %0d/%0d %0d/%0d %0d/%0d: got %b%b%b%b exp %b%b%b", t0, b0, t1, b1, t2, b2,
               crossed, too_close, outside, ok, e_cross, e_close, e_out);
    end
    checks++;
    if (cyc != H + 2) begin failures++; $display("FAIL latency %0d", cyc); end
    n_cross += e_cross; n_close += e_close; n_out += e_out; n_ok += !(e_cross || e_close || e_out);
    @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(5, 10, 30, 32, 55, 60);      // good
    check(5, 40, 30, 32, 55, 60);      // lanes 0 and 1 cross
    check(5, 10, 15, 20, 55, 60);      // too close
    check(-200, -100, 30, 32, 55, 60); // lane 0 outside the ROI
    check(5, 10, 30, 32, 60, 200);     // lane 2 mostly outside
    check(5, 10, 30, 32, 55, 150);     // lane 2 partly inside
    for (int i = 0; i < 300; i++)
      check($urandom_range(0, 200) - 100, $urandom_range(0, 200) - 100,
            $urandom_range(0, 100) - 20, $urandom_range(0, 100) - 20,
            $urandom_range(0, 200) - 50, $urandom_range(0, 200) - 50);
    checks++;
    if (n_cross == 0 || n_close == 0 || n_out == 0 || n_ok == 0) failures++;
    $display("cases: crossed %0d close %0d outside %0d ok %0d", n_cross, n_close, n_out, n_ok);
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
