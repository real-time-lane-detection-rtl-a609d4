// lane_top: lane detection and tracking accelerator for one camera stream.
//
// Each frame is processed in two steps. The pre-processing crops the region
// of interest (ROI), converts it to grayscale, finds edges with a Sobel
// filter and thresholds them into the ROI image buffer. Then either
//   - lane detection: random candidate lines per region, best line by weight;
//     used for the first frame and whenever the last check failed, or
//   - lane tracking: particle filter over the host's good lines of the
//     previous frame, best line by importance weight;
// runs on the buffered ROI. The redetection check then tests the best lines
// (no crossing, minimum distance, enough of each marking inside the ROI).
// If a tracked result fails, detection runs again on the same image in the
// same frame; if a detected result fails, the next frame starts with
// detection again.
//
//   camera -> preprocess -> roi_image_mem -> lane_detect | lane_track
//                                            -> redetect_check -> best_lines
//
// The host (outside this module) collects the candidate lines
// (cand_*) and the updated particles (part_*), chooses the good lines after
// a detection or resamples the particles after tracking, and writes the new
// particle set through pw_* between frames. This split between accelerator
// and host follows the design; the frame controller below is this
// implementation's.
//
// Random numbers: detection and tracking each draw from their own MWC64X
// generator. After reset both are seeded from one stream (base state SEED),
// split by mwc64x_skip into substreams of 2^40 numbers: substream 0 for
// detection, 1 for tracking. This takes about 600 clocks, during which
// in_ready is low.
//
// n_lines and n_part set how many candidates and particles per lane are
// used (run time, up to NLINES and NPART).
//
// Interface and timing: a frame is offered as FRAME_W*FRAME_H beats starting
// with in_sof; beats need not be back to back. in_ready is high while the
// controller is idle and for the rest of a frame once its first beat is
// taken, also while detection or tracking already works on the ROI (the
// pixels below the ROI are consumed and dropped). After the last beat of a
// frame, in_ready stays low until that frame's result is out. A beat offered
// in idle without in_sof is dropped. frame_done pulses once per
// frame with best_lines, frame_detect (detection ran), frame_redetect
// (tracking failed and detection ran again) and frame_ok (the final check
// passed) valid. pw_* is accepted only while busy is low.
module lane_top
  import lane_pkg::*;
#(
  parameter int unsigned FRAME_W = FRAME_W_D,
  parameter int unsigned FRAME_H = FRAME_H_D,
  parameter int unsigned ROI_W   = ROI_W_D,
  parameter int unsigned ROI_H   = ROI_H_D,
  parameter int unsigned LANES   = LANES_D,
  parameter int unsigned NLINES  = NLINES_D,
  parameter int unsigned NPART   = NPART_D,
  parameter int unsigned NB_MAX  = 7,
  parameter int unsigned MAX_VAL = MAX_VAL_D,
  parameter logic [63:0] SEED    = 64'h0000_0001_2345_6789   // {c, x} of the one random stream
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // run-time configuration
  input  logic [$clog2(FRAME_W)-1:0]    roi_x,
  input  logic [$clog2(FRAME_H)-1:0]    roi_y,
  input  logic [10:0]                   threshold,
  input  logic [11:0]                   sigma_sam,
  input  logic [11:0]                   sigma_shift,
  input  logic [$clog2(NLINES+1)-1:0]   n_lines,      // candidates per lane, 1..NLINES
  input  logic [$clog2(NPART+1)-1:0]    n_part,       // particles per lane, 1..NPART
  input  logic [$clog2(NB_MAX+1)-1:0]   nbhd,
  input  logic [11:0]                   min_dist,
  input  logic [$clog2(ROI_H+1)-1:0]    min_rows,
  // camera stream
  input  logic                          in_valid,
  input  logic                          in_sof,
  input  rgb_t                          in_rgb,
  output logic                          in_ready,
  // host: particle memory write
  input  logic                          pw_en,
  input  logic [$clog2(LANES*NPART)-1:0] pw_addr,
  input  line_t                         pw_line,
  // frame result
  output logic                          busy,
  output logic                          frame_done,
  output logic                          frame_detect,
  output logic                          frame_redetect,
  output logic                          frame_ok,
  output line_t                         best_lines [LANES],
  // detection candidates to the host
  output logic                          cand_valid,
  output logic [$clog2(LANES+1)-1:0]    cand_lane,
  output logic [$clog2(NLINES+1)-1:0]   cand_idx,
  output line_t                         cand_line,
  output logic [WEIGHT_W-1:0]           cand_weight,
  // tracked particles to the host
  output logic                          part_valid,
  output logic [$clog2(LANES*NPART)-1:0] part_addr,
  output line_t                         part_line,
  output logic [DIST_W-1:0]             part_dist,
  output logic [WEIGHT_W-1:0]           part_weight,
  output logic [WEIGHT_W+7:0]           evidence [LANES]
);
  localparam int RW = $clog2(ROI_H);
  localparam int CW = $clog2(ROI_W);

  typedef enum logic [3:0] {
    S_SEED_GO, S_SEED_WAIT, S_IDLE, S_PRE, S_DET_GO, S_DET_WAIT, S_TRK_GO, S_TRK_WAIT,
    S_CHK_GO, S_CHK_WAIT, S_FIN
  } state_t;
  state_t state;

  localparam int unsigned NPIX = FRAME_W * FRAME_H;

  logic need_detect, in_detect, det_ran, redet;
  logic frame_open;
  logic [$clog2(NPIX+1)-1:0] pix_cnt;
  line_t best_q [LANES];

  // substream seeding: detection gets substream 0, tracking substream 1
  logic        seed_idx, skip_done;
  logic [63:0] skip_state;
  logic        det_rng_load, trk_rng_load;

  // pre-processing
  logic          px_valid, pp_valid, pp_done;
  logic [RW-1:0] pp_row;
  logic [CW-1:0] pp_col;
  logic [7:0]    pp_pix;

  // image buffer
  logic          rd_en, det_rd_en, trk_rd_en;
  logic [RW-1:0] rd_row, det_rd_row, trk_rd_row;
  logic [7:0]    rd_data [ROI_W];

  // detection / tracking / check
  logic  det_busy, det_done, trk_busy, trk_done;
  line_t det_best [LANES];
  line_t trk_best [LANES];
  logic [WEIGHT_W-1:0] det_best_w [LANES];
  logic  chk_busy, chk_done, chk_ok, chk_cross, chk_close, chk_out;

  assign in_ready = (state == S_IDLE) || frame_open;
  assign px_valid = in_valid && (frame_open || (state == S_IDLE && in_sof));

  // beats of the current frame still to come
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame_open <= 1'b0;
      pix_cnt    <= '0;
    end else if (px_valid) begin
      if (!frame_open) begin
        frame_open <= (NPIX > 1);
        pix_cnt    <= ($clog2(NPIX+1))'(NPIX - 1);
      end else begin
        pix_cnt    <= pix_cnt - 1'b1;
        frame_open <= (pix_cnt != 1);
      end
    end
  end
  assign busy     = (state != S_IDLE);

  preprocess #(.FRAME_W(FRAME_W), .FRAME_H(FRAME_H), .ROI_W(ROI_W), .ROI_H(ROI_H),
               .MAX_VAL(MAX_VAL)) u_pre (
    .clk, .rst_n, .roi_x, .roi_y, .threshold,
    .in_valid(px_valid), .in_sof, .in_rgb,
    .out_valid(pp_valid), .out_row(pp_row), .out_col(pp_col), .out_pix(pp_pix),
    .out_done(pp_done)
  );

  mwc64x_skip #(.KW(2)) u_skip (
    .clk, .rst_n, .start(state == S_SEED_GO), .base(SEED), .k({1'b0, seed_idx}),
    .busy(), .done(skip_done), .state(skip_state)
  );
  assign det_rng_load = (state == S_SEED_WAIT) && skip_done && !seed_idx;
  assign trk_rng_load = (state == S_SEED_WAIT) && skip_done &&  seed_idx;

  assign rd_en  = det_rd_en | trk_rd_en;
  assign rd_row = det_busy ? det_rd_row : trk_rd_row;

  roi_image_mem #(.W(ROI_W), .H(ROI_H)) u_img (
    .clk, .wr_en(pp_valid), .wr_row(pp_row), .wr_col(pp_col), .wr_data(pp_pix),
    .rd_en, .rd_row, .rd_data
  );

  lane_detect #(.W(ROI_W), .H(ROI_H), .LANES(LANES), .NLINES(NLINES), .NB_MAX(NB_MAX)) u_det (
    .clk, .rst_n, .start(state == S_DET_GO),
    .rng_load(det_rng_load), .rng_seed(skip_state), .sigma(sigma_sam), .n_lines, .nbhd,
    .busy(det_busy), .done(det_done), .best(det_best), .best_w(det_best_w),
    .cand_valid, .cand_lane, .cand_idx, .cand_line, .cand_weight,
    .rd_en(det_rd_en), .rd_row(det_rd_row), .rd_data
  );

  lane_track #(.W(ROI_W), .H(ROI_H), .LANES(LANES), .NPART(NPART), .NB_MAX(NB_MAX)) u_trk (
    .clk, .rst_n, .pw_en(pw_en && state == S_IDLE), .pw_addr, .pw_line,
    .start(state == S_TRK_GO),
    .rng_load(trk_rng_load), .rng_seed(skip_state), .best_in(best_q), .sigma_shift, .n_part, .nbhd,
    .busy(trk_busy), .done(trk_done), .best_out(trk_best), .evidence,
    .part_valid, .part_addr, .part_line, .part_dist, .part_weight,
    .rd_en(trk_rd_en), .rd_row(trk_rd_row), .rd_data
  );

  redetect_check #(.W(ROI_W), .H(ROI_H), .LANES(LANES)) u_chk (
    .clk, .rst_n, .start(state == S_CHK_GO), .lines(best_q), .min_dist, .min_rows,
    .busy(chk_busy), .done(chk_done), .ok(chk_ok),
    .crossed(chk_cross), .too_close(chk_close), .outside(chk_out)
  );

  assign best_lines = best_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_SEED_GO; seed_idx <= 1'b0; need_detect <= 1'b1; in_detect <= 1'b0;
      det_ran <= 1'b0; redet <= 1'b0;
      frame_done <= 1'b0; frame_detect <= 1'b0; frame_redetect <= 1'b0; frame_ok <= 1'b0;
      for (int i = 0; i < int'(LANES); i++) best_q[i] <= '0;
    end else begin
      frame_done <= 1'b0;
      unique case (state)
        S_SEED_GO: state <= S_SEED_WAIT;
        S_SEED_WAIT: if (skip_done) begin
          seed_idx <= 1'b1;
          state    <= seed_idx ? S_IDLE : S_SEED_GO;
        end
        S_IDLE: if (px_valid && !frame_open) begin
          det_ran <= 1'b0;
          redet   <= 1'b0;
          state   <= S_PRE;
        end
        S_PRE: if (pp_done) state <= need_detect ? S_DET_GO : S_TRK_GO;
        S_DET_GO: begin
          det_ran   <= 1'b1;
          in_detect <= 1'b1;
          state     <= S_DET_WAIT;
        end
        S_DET_WAIT: if (det_done) begin
          best_q <= det_best;
          state  <= S_CHK_GO;
        end
        S_TRK_GO: begin
          in_detect <= 1'b0;
          state     <= S_TRK_WAIT;
        end
        S_TRK_WAIT: if (trk_done) begin
          best_q <= trk_best;
          state  <= S_CHK_GO;
        end
        S_CHK_GO: state <= S_CHK_WAIT;
        S_CHK_WAIT: if (chk_done) begin
          if (chk_ok) begin
            need_detect <= 1'b0;
            state       <= S_FIN;
          end else if (!in_detect) begin
            redet <= 1'b1;         // tracking lost a marking: detect again now
            state <= S_DET_GO;
          end else begin
            need_detect <= 1'b1;   // detection itself failed: retry next frame
            state       <= S_FIN;
          end
        end
        S_FIN: begin
          frame_done     <= 1'b1;
          frame_detect   <= det_ran;
          frame_redetect <= redet;
          frame_ok       <= chk_ok;
          state          <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  logic unused;
  always_comb begin
    unused = trk_busy ^ chk_busy ^ chk_cross ^ chk_close ^ chk_out;
    for (int i = 0; i < int'(LANES); i++) unused ^= ^det_best_w[i];
  end
endmodule
