// tb_lane_top_full: the lane detection and tracking accelerator at its
// default size, with no parameter override: 640x480 camera frames, a
// 72x512 region of interest, two lanes, 256 candidate lines per lane in
// detection and 64 particles per lane in tracking. This testbench plays the
// host, as in the reduced end-to-end test.
//
// Four synthetic frames, each with two bright 11-pixel markings on a dark,
// slightly noisy road. The first frame runs detection; later frames track
// from the particles the host derived from the previous frame, or detect
// again if the previous result failed the check (with the sampling spread of
// half a region width, a candidate of one region can land on the other
// region's marking). Checks: the candidate and particle counts, that the
// best lines of every frame that passes the check lie on average within 8
// pixels of the drawn markings (the ROI is 512 pixels wide), that the last
// frame passes, that detection and tracking both ran and that the two random
// generators were seeded from two substreams.
module tb_lane_top_full;
  localparam int FW = lane_pkg::FRAME_W_D, FH = lane_pkg::FRAME_H_D;
  localparam int RW = lane_pkg::ROI_W_D, RH = lane_pkg::ROI_H_D;
  localparam int RX = 64, RY = 360;
  localparam int NL = lane_pkg::NLINES_D, NP = lane_pkg::NPART_D, NFRAMES = 4;
  localparam int MH = 5;                  // markings are 2*MH+1 = 11 pixels wide
  import lane_pkg::*;
  localparam int LANES = 2;
  `include "tb_lane_model.svh"

  logic clk = 0, rst_n = 0;
  logic [$clog2(FW)-1:0] roi_x = RX;
  logic [$clog2(FH)-1:0] roi_y = RY;
  logic [10:0] threshold = 11'd50;
  logic [11:0] sigma_sam = 12'(RW / LANES / 2);
  logic [11:0] sigma_shift = 12'd3;
  logic [2:0]  nbhd = 3'd5;
  logic [11:0] min_dist = 12'(RW / 5);
  logic [$clog2(RH+1)-1:0] min_rows = ($clog2(RH+1))'((RH * 3 + 9) / 10);
  logic in_valid = 0, in_sof = 0, in_ready;
  rgb_t in_rgb = '0;
  logic pw_en = 0;
  logic [$clog2(LANES*NP)-1:0] pw_addr = '0;
  line_t pw_line = '0;
  logic busy, frame_done, frame_detect, frame_redetect, frame_ok;
  line_t best_lines [LANES];
  logic cand_valid;
  logic [$clog2(LANES+1)-1:0] cand_lane;
  logic [$clog2(NL+1)-1:0] cand_idx;
  line_t cand_line;
  logic [WEIGHT_W-1:0] cand_weight;
  logic part_valid;
  logic [$clog2(LANES*NP)-1:0] part_addr;
  line_t part_line;
  logic [DIST_W-1:0] part_dist;
  logic [WEIGHT_W-1:0] part_weight;
  logic [WEIGHT_W+7:0] evidence [LANES];

  int checks = 0, failures = 0;
  int n_detect = 0, n_track = 0, n_redetect = 0, n_detfail = 0, n_ok = 0;
  line_t cands [LANES][$];
  int    cand_w [LANES][$];
  line_t parts [LANES][NP];
  int    part_w [LANES][NP];
  int    n_cand = 0, n_parts = 0, n_frames = 0, n_seed = 0;

  logic [$clog2(NL+1)-1:0] n_lines = NL;
  logic [$clog2(NP+1)-1:0] n_part = NP;
  always #5 clk = ~clk;

  lane_top dut (.*);

  always @(posedge clk) if (rst_n) begin
    if (frame_done) n_frames++;
    if (dut.skip_done) n_seed++;
    if (cand_valid) begin
      cands[cand_lane].push_back(cand_line);
      cand_w[cand_lane].push_back(int'(cand_weight));
      n_cand++;
    end
    if (part_valid) begin
      parts[int'(part_addr) / NP][int'(part_addr) % NP] = part_line;
      part_w[int'(part_addr) / NP][int'(part_addr) % NP] = int'(part_weight);
      n_parts++;
    end
  end

  // marking centres (ROI coordinates) per frame; lane 0 leans right at the
  // bottom, lane 1 leans left
  int c0 [10] = '{120, 123, 126, 120, 120, 120, 120, 120, 120, 120};
  int c1 [10] = '{390, 387, 384, 390, 390, 390, 390, 390, 390, 390};

  function automatic int mark_top(int l, int f);
    return l == 0 ? c0[f % 10] - 20 : c1[f % 10] + 20;
  endfunction
  function automatic int mark_bot(int l, int f);
    return l == 0 ? c0[f % 10] + 20 : c1[f % 10] - 20;
  endfunction

  task automatic send_frame(int f);
    for (int y = 0; y < FH; y++)
      for (int x = 0; x < FW; x++) begin
        int v, r;
        v = 50 + $urandom_range(0, 4);
        r = y - RY;
        if (r < 0) r = 0;
        if (r > RH - 1) r = RH - 1;
        for (int l = 0; l < LANES; l++) begin
          int mx;
          mx = ref_x(mark_top(l, f), mark_bot(l, f), r, RH) + RX;
          if (x >= mx - MH && x <= mx + MH) v = 220 + $urandom_range(0, 20);
        end
        in_valid = 1; in_sof = (x == 0 && y == 0);
        in_rgb = '{8'(v), 8'(v), 8'(v)};
        while (!in_ready) @(negedge clk);   // in_ready is stable until the edge
        @(negedge clk);
      end
    in_valid = 0; in_sof = 0;
  endtask

  task automatic write_particles();
    for (int l = 0; l < LANES; l++)
      for (int i = 0; i < NP; i++) begin
        pw_en = 1; pw_addr = ($clog2(LANES*NP))'(l * NP + i); pw_line = parts[l][i];
        @(negedge clk);
      end
    pw_en = 0;
  endtask

  // keep the NP heaviest candidates of each lane
  task automatic select_good_lines();
    for (int l = 0; l < LANES; l++)
      for (int i = 0; i < NP; i++) begin
        int bi;
        bi = 0;
        for (int j = 1; j < cand_w[l].size(); j++) if (cand_w[l][j] > cand_w[l][bi]) bi = j;
        parts[l][i] = cands[l][bi];
        cand_w[l][bi] = -1;
      end
  endtask

  // systematic resampling in proportion to the importance weights
  task automatic resample();
    for (int l = 0; l < LANES; l++) begin
      longint tot, acc, u;
      line_t np_ [NP];
      int j;
      tot = 0;
      for (int i = 0; i < NP; i++) tot += part_w[l][i];
      if (tot == 0) continue;
      u = longint'($urandom_range(0, 999)) * tot / (1000 * NP);
      acc = part_w[l][0]; j = 0;
      for (int i = 0; i < NP; i++) begin
        longint t;
        t = u + longint'(i) * tot / NP;
        while (acc <= t && j < NP - 1) begin j++; acc += part_w[l][j]; end
        np_[i] = parts[l][j];
      end
      for (int i = 0; i < NP; i++) parts[l][i] = np_[i];
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int f = 0; f < NFRAMES; f++) begin
      for (int l = 0; l < LANES; l++) begin cands[l].delete(); cand_w[l].delete(); end
      n_cand = 0; n_parts = 0;
      send_frame(f);
      while (n_frames != f + 1) @(negedge clk);
      $display("frame %0d: detect=%0b redetect=%0b ok=%0b  lane0 %0d->%0d (mark %0d->%0d)  lane1 %0d->%0d (mark %0d->%0d)",
               f, frame_detect, frame_redetect, frame_ok,
               int'(best_lines[0].x_top), int'(best_lines[0].x_bottom), mark_top(0, f), mark_bot(0, f),
               int'(best_lines[1].x_top), int'(best_lines[1].x_bottom), mark_top(1, f), mark_bot(1, f));
      // counts of candidates and particles seen this frame
      checks++;
      if (n_cand != (frame_detect ? LANES * NL : 0) ||
          n_parts != ((frame_redetect || !frame_detect) ? LANES * NP : 0)) begin
        failures++; $display("FAIL frame %0d: %0d candidates, %0d particles", f, n_cand, n_parts);
      end
      if (frame_detect) n_detect++;
      if (!frame_detect || frame_redetect) n_track++;
      if (frame_redetect) n_redetect++;
      if (frame_detect && !frame_ok) n_detfail++;
      if (frame_ok) begin
        n_ok++;
        for (int l = 0; l < LANES; l++) begin
          checks++;
          if (mean_dist(best_lines[l], mark_top(l, f), mark_bot(l, f)) > 8.0) begin
            failures++;
            $display("FAIL frame %0d lane %0d off the marking by %f", f, l,
                     mean_dist(best_lines[l], mark_top(l, f), mark_bot(l, f)));
          end
        end
      end
      // host work between frames
      if (frame_detect) select_good_lines();
      else resample();
      write_particles();
    end
    $display("detection %0d, tracking %0d, passed %0d", n_detect, n_track, n_ok);
    checks += 4;
    if (n_seed != 2)       begin failures++; $display("FAIL %0d substreams seeded, expected 2", n_seed); end
    if (n_detect == 0)     begin failures++; $display("FAIL no detection"); end
    if (n_track == 0)      begin failures++; $display("FAIL no tracking"); end
    if (!frame_ok)         begin failures++; $display("FAIL the last frame failed the lane check"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mean horizontal distance over the ROI rows between a line and a marking
  function automatic real mean_dist(line_t l, int mt, int mb);
    int s;
    s = 0;
    for (int r = 0; r < RH; r++) begin
      int d;
      d = ref_x(int'(l.x_top), int'(l.x_bottom), r, RH) - ref_x(mt, mb, r, RH);
      s += d < 0 ? -d : d;
    end
    return real'(s) / RH;
  endfunction

  initial begin
    repeat (NFRAMES * (FW * FH + 2 * NL * (RH + 10) + 4 * NP * (RH + 12) + 4 * NP + 200)) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
