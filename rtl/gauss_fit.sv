// gauss_fit: fits a particle's distance to the previous best line to a
// Gaussian, giving its measurement likelihood
//   g = exp( -(d/H)^2 / (2 * sigma_f^2) ),   sigma_f = SIGMA_F_PCT% of W.
// d is the sum over the H rows of |x_particle - x_best|, i.e. the area between
// the two lines, so d/H is their mean horizontal distance in pixels.
// Dividing by H to compare the area with a deviation given in pixels, and
// dropping the constant factor 1/(sigma*sqrt(2*pi)), which cancels when the
// weights are normalised, are this design's reading.
//
// The exponential is evaluated as 2^(-e), e = (d/H)^2 * log2(e) / (2 sigma_f^2):
// e is formed in Q16 by one multiplication with a constant computed at
// elaboration, its integer part becomes a right shift and its fraction f goes
// through the cubic least-squares fit of 2^(-f) on [0,1)
//   p(f) = 0.99990 - 0.69108 f + 0.23060 f^2 - 0.03951 f^3   (error < 1.1e-4).
// Purely combinational. g is Q1.16 (65536 = 1.0); g = 0 once e >= 17.
module gauss_fit #(
  parameter int unsigned W           = lane_pkg::ROI_W_D,
  parameter int unsigned H           = lane_pkg::ROI_H_D,
  parameter int unsigned SIGMA_F_PCT = 15,
  parameter int unsigned DIST_W      = lane_pkg::DIST_W
) (
  input  logic [DIST_W-1:0] distance,
  output logic [16:0]       g
);
  localparam real SIGF = real'(SIGMA_F_PCT) * real'(W) / 100.0;
  // 2^(16+40) * log2(e) / (2 sigma_f^2 H^2)
  localparam real KR   = 72057594037927936.0 * 1.4426950408889634 /
                         (2.0 * SIGF * SIGF * real'(H) * real'(H));
  localparam logic [63:0] KQ = 64'(longint'(KR));   // real to integer cast rounds

  localparam logic signed [19:0] C0 = 20'sd65529;
  localparam logic signed [19:0] C1 = -20'sd45291;
  localparam logic signed [19:0] C2 = 20'sd15112;
  localparam logic signed [19:0] C3 = -20'sd2589;

  logic [127:0]       prod;
  logic [87:0]        e_q16;
  logic signed [39:0] f, p;

  always_comb begin
    prod  = 128'(distance) * 128'(distance) * 128'(KQ);
    e_q16 = 88'(prod >> 40);
    f     = 40'({1'b0, e_q16[15:0]});
    p     = ((40'(C3) * f) >>> 16) + 40'(C2);
    p     = ((p * f) >>> 16) + 40'(C1);
    p     = ((p * f) >>> 16) + 40'(C0);
    if (e_q16[87:16] >= 72'd17) g = '0;
    else                        g = 17'(p >>> e_q16[20:16]);
  end
endmodule
