// lane_track: particle-filter lane tracking, prediction and importance
// weight update for every particle of every lane marking.
//
// The particles of lane l are the host-supplied good lines, held in an
// on-chip particle memory (LANES x NPART lines, written through pw_*).
// For each particle:
//   1. Prediction update: x_top and x_bottom each move by round(z * sigma_shift),
//      z standard normal; the moved particle is written back to the memory.
//   2. Importance weight update: in one pass over the ROI rows, line_weight
//      sums the pre-processed intensities on and beside the particle, and the
//      distance d = sum_R |x_particle(R) - x_best(R)| to the lane's best line of
//      the previous frame is accumulated. gauss_fit turns d into the Gaussian
//      likelihood g, and the importance weight is (intensity weight * g) >> 16.
// The lane's evidence P(Y) = sum of the importance weights and the particle of
// highest weight (the new best line) are kept; normalisation by P(Y) and the
// resampling are left to the host, which reads each particle on part_*.
//
// The prediction and distance terms follow the design. Multiplying by the
// intensity weight is this design's reading of a tracking step that "follows
// the outline" of the detection kernel and has the pre-processed ROI at its
// disposal; the sequential schedule (one particle at a time) is this
// implementation's.
//
// Interface: start pulse with best_in[], sigma_shift and n_part, the number
// of particles per lane in use (run time, 1..NPART; 0 means NPART; particle
// i of lane l is at address l*NPART + i); done pulses when all LANES*n_part
// particles are updated. part_valid pulses once per particle
// (no backpressure). rng_load with rng_seed reseeds the random source
// (used between runs only). Timing: about H+6 clocks per particle.
module lane_track
  import lane_pkg::*;
#(
  parameter int unsigned W           = ROI_W_D,
  parameter int unsigned H           = ROI_H_D,
  parameter int unsigned LANES       = LANES_D,
  parameter int unsigned NPART       = NPART_D,
  parameter int unsigned NB_MAX      = 7,
  parameter int unsigned SIGMA_F_PCT = 15,
  parameter logic [63:0] SEED        = 64'h0000_0007_0BAD_CAFE
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // particle memory write port (host)
  input  logic                          pw_en,
  input  logic [$clog2(LANES*NPART)-1:0] pw_addr,  // lane*NPART + index
  input  line_t                         pw_line,
  // control
  input  logic                          start,
  input  logic                          rng_load,  // reseed the random source
  input  logic [63:0]                   rng_seed,  // MWC64X state {c, x}
  input  line_t                         best_in [LANES],
  input  logic [11:0]                   sigma_shift,
  input  logic [$clog2(NPART+1)-1:0]    n_part,   // particles per lane, 1..NPART
  input  logic [$clog2(NB_MAX+1)-1:0]   nbhd,
  output logic                          busy,
  output logic                          done,
  output line_t                         best_out [LANES],
  output logic [WEIGHT_W+7:0]           evidence [LANES],
  // per-particle result
  output logic                          part_valid,
  output logic [$clog2(LANES*NPART)-1:0] part_addr,
  output line_t                         part_line,
  output logic [DIST_W-1:0]             part_dist,
  output logic [WEIGHT_W-1:0]           part_weight,
  // image row port
  output logic                          rd_en,
  output logic [$clog2(H)-1:0]          rd_row,
  input  logic [7:0]                    rd_data [W]
);
  localparam int AW = $clog2(LANES*NPART);
  localparam int LW = $clog2(LANES+1);
  localparam int NW = $clog2(NPART+1);
  localparam int unsigned INV_H = recip_q16(H);

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_TOP, S_BOT, S_WSTART, S_WAIT} state_t;
  state_t state;

  line_t parts [LANES*NPART];

  logic               g_valid, g_ready;
  logic signed [15:0] g_z;
  logic [LW-1:0]      lane_q;
  logic [NW-1:0]      idx_q;
  logic [NW-1:0]      last_q;   // index of the last particle per lane
  logic [AW-1:0]      addr;
  line_t              line_q;
  line_t              best_q [LANES];
  logic [WEIGHT_W-1:0] max_w [LANES];
  line_t              win_q [LANES];
  line_t              win_now;
  logic               is_max;
  logic               w_start, w_busy, w_done, row_valid;
  logic [WEIGHT_W-1:0] w_int;
  logic [$clog2(H)-1:0] cur_row;
  logic signed [COORD_W+1:0] cur_x, best_x;
  logic [DIST_W-1:0]  dist_q;
  logic [16:0]        g_fit;
  logic [WEIGHT_W+16:0] iw_full;
  logic [WEIGHT_W-1:0] iw;

  gauss_rng #(.SEED(SEED)) u_gauss (
    .clk, .rst_n, .rng_load, .rng_seed, .out_ready(g_ready), .out_valid(g_valid), .out_z(g_z)
  );

  line_weight #(.W(W), .H(H), .NB_MAX(NB_MAX)) u_weight (
    .clk, .rst_n, .start(w_start), .line(line_q), .nbhd,
    .rd_en, .rd_row, .rd_data,
    .row_valid, .cur_row, .cur_x,
    .busy(w_busy), .done(w_done), .weight(w_int)
  );

  gauss_fit #(.W(W), .H(H), .SIGMA_F_PCT(SIGMA_F_PCT), .DIST_W(DIST_W)) u_fit (
    .distance(dist_q), .g(g_fit)
  );

  function automatic coord_t shift_x(coord_t x0, logic signed [15:0] z, logic [11:0] sig);
    logic signed [31:0] off, x;
    off = (32'(z) * 32'(signed'({1'b0, sig})) + 32'sd128) >>> 8;
    x   = 32'(x0) + off;
    if (x > 32'sd2047)       return coord_t'(12'sd2047);
    else if (x < -32'sd2048) return coord_t'(-12'sd2048);
    else                     return coord_t'(x);
  endfunction

  assign addr    = AW'(int'(lane_q) * int'(NPART) + int'(idx_q));
  assign g_ready = (state == S_TOP) || (state == S_BOT);
  assign w_start = (state == S_WSTART);
  assign busy    = (state != S_IDLE);
  assign best_x  = line_x(best_q[lane_q], int'(cur_row), INV_H);
  assign iw_full = (WEIGHT_W+17)'(w_int) * (WEIGHT_W+17)'(g_fit);
  assign iw      = WEIGHT_W'(iw_full >> 16);
  assign best_out = best_q;
  assign is_max   = (idx_q == '0) || (iw > max_w[lane_q]);
  assign win_now  = is_max ? line_q : win_q[lane_q];

  always_ff @(posedge clk) begin
    if (pw_en && state == S_IDLE) parts[pw_addr] <= pw_line;
    else if (state == S_WSTART)   parts[addr]    <= line_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; done <= 1'b0; lane_q <= '0; idx_q <= '0; line_q <= '0;
      dist_q <= '0; last_q <= '0;
      part_valid <= 1'b0; part_addr <= '0; part_line <= '0; part_dist <= '0; part_weight <= '0;
      for (int i = 0; i < int'(LANES); i++) begin
        best_q[i]   <= '0;
        win_q[i]    <= '0;
        max_w[i]    <= '0;
        evidence[i] <= '0;
      end
    end else begin
      done       <= 1'b0;
      part_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          lane_q <= '0;
          idx_q  <= '0;
          // 0 or more than NPART means NPART
          last_q <= (n_part == '0 || n_part > NW'(NPART)) ? NW'(NPART - 1) : n_part - 1'b1;
          best_q <= best_in;
          for (int i = 0; i < int'(LANES); i++) begin
            max_w[i]    <= '0;
            evidence[i] <= '0;
          end
          state <= S_LOAD;
        end
        S_LOAD: begin
          line_q <= parts[addr];
          state  <= S_TOP;
        end
        S_TOP: if (g_valid) begin
          line_q.x_top <= shift_x(line_q.x_top, g_z, sigma_shift);
          state <= S_BOT;
        end
        S_BOT: if (g_valid) begin
          line_q.x_bottom <= shift_x(line_q.x_bottom, g_z, sigma_shift);
          state <= S_WSTART;
        end
        S_WSTART: begin
          dist_q <= '0;
          state  <= S_WAIT;
        end
        S_WAIT: begin
          if (row_valid)
            dist_q <= dist_q + DIST_W'(cur_x > best_x ? cur_x - best_x : best_x - cur_x);
          if (w_done) begin
            part_valid  <= 1'b1;
            part_addr   <= addr;
            part_line   <= line_q;
            part_dist   <= dist_q;
            part_weight <= iw;
            evidence[lane_q] <= evidence[lane_q] + (WEIGHT_W+8)'(iw);
            // the stored best line stays that of the previous frame while this
            // lane is processed; the winner replaces it when the lane is done
            if (is_max) begin
              max_w[lane_q] <= iw;
              win_q[lane_q] <= line_q;
            end
            if (idx_q == last_q) begin
              best_q[lane_q] <= win_now;
              idx_q <= '0;
              if (lane_q == LW'(LANES - 1)) begin
                state <= S_IDLE;
                done  <= 1'b1;
              end else begin
                lane_q <= lane_q + 1'b1;
                state  <= S_LOAD;
              end
            end else begin
              idx_q <= idx_q + 1'b1;
              state <= S_LOAD;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
