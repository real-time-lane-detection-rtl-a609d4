// tb_lane_track: 64x8 ROI with one marking per region, 2 lanes x 16
// particles written through the particle port around each marking. Run 1
// uses prediction noise sigma_shift = 2 px, run 2 sigma_shift = 0 with the
// new best lines. For every particle the testbench checks the moved line
// against the stored one (bounded shift; run 2 must read back exactly the
// lines run 1 wrote), the distance to the best line, and the importance
// weight against intensity sum * exp(-(d/H)^2/(2 sigma_f^2)) computed here.
// Per lane it checks the evidence (sum of weights) and the new best line
// (first particle of highest weight), plus the shift statistics and timing.
module tb_lane_track;
  import lane_pkg::*;
  localparam int W = 64, H = 8, LANES = 2, NP = 16, NB = 2;
  `include "tb_lane_model.svh"
  logic clk = 0, rst_n = 0;
  logic pw_en = 0;
  logic [$clog2(LANES*NP)-1:0] pw_addr = '0;
  line_t pw_line = '0;
  logic start = 0;
  line_t best_in [LANES];
  logic [11:0] sigma_shift = 12'd2;
  logic [$clog2(NB+1)-1:0] nbhd = 2'd1;
  logic busy, done;
  line_t best_out [LANES];
  logic [WEIGHT_W+7:0] evidence [LANES];
  logic part_valid;
  logic [$clog2(LANES*NP)-1:0] part_addr;
  line_t part_line;
  logic [DIST_W-1:0] part_dist;
  logic [WEIGHT_W-1:0] part_weight;
  logic rd_en;
  logic [$clog2(H)-1:0] rd_row;
  logic [7:0] rd_data [W];
  logic wr_en = 0;
  logic [$clog2(H)-1:0] wr_row = '0;
  logic [$clog2(W)-1:0] wr_col = '0;
  logic [7:0] wr_data = '0;
  int checks = 0, failures = 0, count = 0, run = 0, moved = 0;
  int img [H][W];
  line_t stored [LANES*NP];
  longint ev [LANES];
  int mx_w [LANES];
  line_t mx_l [LANES];
  real shift_sum = 0.0;
  int mark_t [LANES] = '{12, 50};
  int mark_b [LANES] = '{20, 44};

  logic rng_load = 0;
  logic [63:0] rng_seed = '0;
  logic [$clog2(NP+1)-1:0] n_part = NP;
  int np_run = NP;
  always #5 clk = ~clk;

  roi_image_mem #(.W(W), .H(H)) mem (.clk, .wr_en, .wr_row, .wr_col, .wr_data,
                                     .rd_en, .rd_row, .rd_data);
  lane_track #(.W(W), .H(H), .LANES(LANES), .NPART(NP), .NB_MAX(NB)) dut (.*);

  function automatic int ref_w(line_t l, int nb);
    int s, x;
    s = 0;
    for (int r = 0; r < H; r++) begin
      x = ref_x(int'(l.x_top), int'(l.x_bottom), r, H);
      for (int k = x - nb; k <= x + nb; k++)
        if (k >= 0 && k < W) s += img[r][k];
    end
    return s;
  endfunction

  function automatic int ref_d(line_t a, line_t b);
    int s, d;
    s = 0;
    for (int r = 0; r < H; r++) begin
      d = ref_x(int'(a.x_top), int'(a.x_bottom), r, H) - ref_x(int'(b.x_top), int'(b.x_bottom), r, H);
      s += d < 0 ? -d : d;
    end
    return s;
  endfunction

  always @(posedge clk) if (rst_n && part_valid) begin
    int a, l, d, dt, db;
    real g, wexp, tol;
    a = int'(part_addr); l = a / NP;
    checks++;
    if (a != (count / np_run) * NP + count % np_run) begin
      failures++; $display("FAIL order %0d at %0d", a, count);
    end
    dt = int'(part_line.x_top) - int'(stored[a].x_top);
    db = int'(part_line.x_bottom) - int'(stored[a].x_bottom);
    checks++;
    if (run == 1 ? (dt < -14 || dt > 14 || db < -14 || db > 14) : (dt != 0 || db != 0)) begin
      failures++; $display("FAIL shift %0d %0d (run %0d)", dt, db, run);
    end
    if (dt != 0 || db != 0) moved++;
    shift_sum += real'(dt + db);
    stored[a] = part_line;
    d = ref_d(part_line, best_in[l]);
    checks++;
    if (int'(part_dist) != d) begin failures++; $display("FAIL dist %0d exp %0d", part_dist, d); end
    g    = $exp(-((real'(d) / H) ** 2) / (2.0 * (0.15 * W) ** 2));
    wexp = real'(ref_w(part_line, int'(nbhd))) * g;
    tol  = 2.0 + 0.001 * wexp;
    checks++;
    if (real'(part_weight) < wexp - tol || real'(part_weight) > wexp + tol) begin
      failures++; $display("FAIL weight %0d exp %f", part_weight, wexp);
    end
    ev[l] += longint'(part_weight);
    if (a % NP == 0 || int'(part_weight) > mx_w[l]) begin
      mx_w[l] = int'(part_weight); mx_l[l] = part_line;
    end
    count++;
  end

  task automatic track(int sig, int np);
    int cyc;
    count = 0;
    np_run = np; n_part = ($clog2(NP+1))'(np);
    for (int l = 0; l < LANES; l++) ev[l] = 0;
    sigma_shift = 12'(sig);
    start = 1; @(negedge clk); start = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    @(negedge clk);
    checks++; if (count != LANES * np) begin failures++; $display("FAIL count %0d", count); end
    checks++;
    if (cyc < LANES * np * (H + 6) || cyc > LANES * np * (H + 10)) begin
      failures++; $display("FAIL cycles %0d", cyc);
    end
    for (int l = 0; l < LANES; l++) begin
      checks++;
      if (longint'(evidence[l]) != ev[l]) begin failures++; $display("FAIL evidence lane %0d", l); end
      checks++;
      if (best_out[l] != mx_l[l]) begin failures++; $display("FAIL best lane %0d", l); end
    end
  endtask

  initial begin
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
    for (int a = 0; a < LANES * NP; a++) begin
      int l;
      l = a / NP;
      stored[a] = '{coord_t'(mark_t[l] + $urandom_range(0, 12) - 6),
                    coord_t'(mark_b[l] + $urandom_range(0, 12) - 6)};
      pw_en = 1; pw_addr = 5'(a); pw_line = stored[a];
      @(negedge clk);
    end
    pw_en = 0;
    for (int l = 0; l < LANES; l++) best_in[l] = '{coord_t'(mark_t[l]), coord_t'(mark_b[l])};
    run = 1;
    track(2, NP);
    checks++;
    if (moved < LANES * NP / 2) begin failures++; $display("FAIL only %0d particles moved", moved); end
    checks++;
    if (shift_sum / (2.0 * LANES * NP) < -1.5 || shift_sum / (2.0 * LANES * NP) > 1.5) begin
      failures++; $display("FAIL mean shift %f", shift_sum / (2.0 * LANES * NP));
    end
    best_in = best_out;
    run = 2;
    track(0, NP);
    // run 3: only the first 5 particles of each lane in use
    best_in = best_out;
    run = 3;
    track(0, 5);
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
