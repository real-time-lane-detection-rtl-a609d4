// lane_detect: random-sampling lane detection.
//
// The ROI is split into LANES equally wide regions, one per expected lane
// marking. For each region, NLINES candidate lines are sampled:
//   x_top    = centre + round(z1 * sigma),  x_bottom = centre + round(z2 * sigma)
// with z1, z2 standard normal samples, centre the middle of the region and
// sigma the run-time sampling deviation (region width / 2 in the design's
// tuning). Each candidate is weighted by line_weight (sum of the
// pre-processed intensities on and beside the line) and emitted on the
// candidate port, where a host collects them to choose its set of good
// lines. The candidate with the highest weight per region is kept as that
// region's best line (first one wins on ties).
//
// In the design the best-line selection is host software; doing it here as a
// running maximum, and processing the candidates one after another with a
// single weighting unit, are this implementation's choices.
//
// Interface: start pulse with n_lines, the number of candidates per region
// (run time, 1..NLINES; 0 means NLINES); done pulses when all LANES*n_lines
// candidates are weighted; best[] then holds one line per region. cand_valid pulses once per
// candidate with cand_lane, cand_idx, cand_line and cand_weight (no
// backpressure). The image row port goes to roi_image_mem. rng_load with
// rng_seed reseeds the random source (used between frames only).
// Timing: per candidate two normal samples (1-3 clocks) plus H+2 clocks of
// weighting plus 1 clock, i.e. about H+5 clocks.
module lane_detect
  import lane_pkg::*;
#(
  parameter int unsigned W      = ROI_W_D,
  parameter int unsigned H      = ROI_H_D,
  parameter int unsigned LANES  = LANES_D,
  parameter int unsigned NLINES = NLINES_D,
  parameter int unsigned NB_MAX = 7,
  parameter logic [63:0] SEED   = 64'h0000_0005_1234_5678
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  input  logic                         rng_load,  // reseed the random source
  input  logic [63:0]                  rng_seed,  // MWC64X state {c, x}
  input  logic [11:0]                  sigma,    // pixels
  input  logic [$clog2(NLINES+1)-1:0]  n_lines,  // candidates per region, 1..NLINES
  input  logic [$clog2(NB_MAX+1)-1:0]  nbhd,
  output logic                         busy,
  output logic                         done,
  output line_t                        best [LANES],
  output logic [WEIGHT_W-1:0]          best_w [LANES],
  output logic                         cand_valid,
  output logic [$clog2(LANES+1)-1:0]   cand_lane,
  output logic [$clog2(NLINES+1)-1:0]  cand_idx,
  output line_t                        cand_line,
  output logic [WEIGHT_W-1:0]          cand_weight,
  output logic                         rd_en,
  output logic [$clog2(H)-1:0]         rd_row,
  input  logic [7:0]                   rd_data [W]
);
  localparam int unsigned REGION_W = W / LANES;
  localparam int LW = $clog2(LANES+1);
  localparam int NW = $clog2(NLINES+1);

  typedef enum logic [2:0] {S_IDLE, S_TOP, S_BOT, S_WSTART, S_WAIT} state_t;
  state_t state;

  logic               g_valid, g_ready;
  logic signed [15:0] g_z;
  logic [LW-1:0]      lane_q;
  logic [NW-1:0]      idx_q;
  logic [NW-1:0]      last_q;   // index of the last candidate per region
  line_t              line_q;
  logic               w_start, w_busy, w_done;
  logic [WEIGHT_W-1:0] w_weight;
  logic               unused_rv;
  logic [$clog2(H)-1:0] unused_row;
  logic signed [COORD_W+1:0] unused_x;

  gauss_rng #(.SEED(SEED)) u_gauss (
    .clk, .rst_n, .rng_load, .rng_seed, .out_ready(g_ready), .out_valid(g_valid), .out_z(g_z)
  );

  line_weight #(.W(W), .H(H), .NB_MAX(NB_MAX)) u_weight (
    .clk, .rst_n, .start(w_start), .line(line_q), .nbhd,
    .rd_en, .rd_row, .rd_data,
    .row_valid(unused_rv), .cur_row(unused_row), .cur_x(unused_x),
    .busy(w_busy), .done(w_done), .weight(w_weight)
  );

  // x = centre + round(z * sigma), saturated to the coordinate range
  function automatic coord_t sample_x(logic [LW-1:0] lane, logic signed [15:0] z,
                                      logic [11:0] sig);
    logic signed [31:0] off, x;
    off = (32'(z) * 32'(signed'({1'b0, sig})) + 32'sd128) >>> 8;
    x   = 32'(int'(lane) * int'(REGION_W) + int'(REGION_W / 2)) + off;
    if (x > 32'sd2047)       return coord_t'(12'sd2047);
    else if (x < -32'sd2048) return coord_t'(-12'sd2048);
    else                     return coord_t'(x);
  endfunction

  assign g_ready = (state == S_TOP) || (state == S_BOT);
  assign w_start = (state == S_WSTART);
  assign busy    = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; done <= 1'b0; lane_q <= '0; idx_q <= '0; line_q <= '0; last_q <= '0;
      cand_valid <= 1'b0; cand_lane <= '0; cand_idx <= '0; cand_line <= '0; cand_weight <= '0;
      for (int i = 0; i < int'(LANES); i++) begin
        best[i]   <= '0;
        best_w[i] <= '0;
      end
    end else begin
      done       <= 1'b0;
      cand_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          lane_q <= '0;
          idx_q  <= '0;
          // 0 or more than NLINES means NLINES
          last_q <= (n_lines == '0 || n_lines > NW'(NLINES)) ? NW'(NLINES - 1) : n_lines - 1'b1;
          for (int i = 0; i < int'(LANES); i++) best_w[i] <= '0;
          state  <= S_TOP;
        end
        S_TOP: if (g_valid) begin
          line_q.x_top <= sample_x(lane_q, g_z, sigma);
          state <= S_BOT;
        end
        S_BOT: if (g_valid) begin
          line_q.x_bottom <= sample_x(lane_q, g_z, sigma);
          state <= S_WSTART;
        end
        S_WSTART: state <= S_WAIT;
        S_WAIT: if (w_done) begin
          cand_valid  <= 1'b1;
          cand_lane   <= lane_q;
          cand_idx    <= idx_q;
          cand_line   <= line_q;
          cand_weight <= w_weight;
          if (idx_q == '0 || w_weight > best_w[lane_q]) begin
            best[lane_q]   <= line_q;
            best_w[lane_q] <= w_weight;
          end
          if (idx_q == last_q) begin
            idx_q <= '0;
            if (lane_q == LW'(LANES - 1)) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              lane_q <= lane_q + 1'b1;
              state  <= S_TOP;
            end
          end else begin
            idx_q <= idx_q + 1'b1;
            state <= S_TOP;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  logic unused;
  assign unused = w_busy ^ unused_rv ^ (^unused_row) ^ (^unused_x);
endmodule
