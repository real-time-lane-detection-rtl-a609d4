// gauss_rng: standard normal random numbers by the ratio-of-uniforms method
// with Leva's quadratic bounds, fed by an MWC64X generator.
//
// Every clock one 32-bit uniform word is drawn and split into u (upper 16
// bits) and v (lower 16 bits), all arithmetic in Q16 fixed point:
//   u = (U+1)/2^16 in (0,1],  v = 1.7156*(V/2^16 - 1/2)
//   x = u - 0.449871,  y = |v| + 0.386595
//   q = x^2 + y*(0.19600*y - 0.25472*x)
// A pair with q < 0.27597 is accepted, one with q > 0.27846 rejected, and a
// pair in the thin band between is decided by the exact test
// v^2 <= -4 u^2 ln(u). The sample is z = v/u. The band matters: it holds
// most of the accepted pairs of the distribution's tails (|z| > 3.4).
// ln(u) = ln2 * (e + log2(1+m)) with e, m from the leading one of u and the
// quartic least-squares fit
//   log2(1+m) ~ 0.00020 + 1.43611 m - 0.66954 m^2 + 0.31224 m^3 - 0.07916 m^4
// (error < 2.1e-4). The design names the method and says that floating point
// was removed; the fixed-point formats and the fits are this
// implementation's choice.
//
// Interface: valid/ready output. After reset the generator starts from
// SEED; rng_load for one clock replaces its state with rng_seed = {c, x}
// (a substream start from mwc64x_skip). z is signed Q8.8 (1.0 = 256). About 73% of
// the clocks produce a sample, so a consumer that is always ready gets a new
// value every 1.4 clocks on average.
module gauss_rng #(
  parameter logic [63:0] SEED = 64'h0000_0001_DEAD_BEEF
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               rng_load,   // reseed the uniform generator
  input  logic [63:0]        rng_seed,   // {c, x}
  input  logic               out_ready,
  output logic               out_valid,
  output logic signed [15:0] out_z
);
  localparam longint K_V    = 112434;   // 1.7156  * 2^16
  localparam longint K_S    = 29483;    // 0.449871 * 2^16
  localparam longint K_T    = 25336;    // 0.386595 * 2^16
  localparam longint K_A    = 12845;    // 0.19600 * 2^16
  localparam longint K_B    = 16693;    // 0.25472 * 2^16
  localparam longint Q_LOW  = 18086;    // 0.27597 * 2^16
  localparam longint Q_HIGH = 18249;    // 0.27846 * 2^16
  localparam longint LN2    = 45426;    // ln 2 * 2^16
  localparam longint L0 = 13, L1 = 94117, L2 = -43879, L3 = 20463, L4 = -5188;

  // natural logarithm of u/2^16, u in 1..65536, result Q16 (<= 0)
  function automatic logic signed [39:0] ln_q16(logic signed [39:0] uu);
    int msb;
    logic signed [39:0] m, p;
    msb = 0;
    for (int i = 0; i <= 16; i++) if (uu[i]) msb = i;
    m = ((uu << (16 - msb)) - 40'sd65536);          // mantissa fraction, Q16
    p = ((40'(L4) * m) >>> 16) + 40'(L3);
    p = ((p * m) >>> 16) + 40'(L2);
    p = ((p * m) >>> 16) + 40'(L1);
    p = ((p * m) >>> 16) + 40'(L0);
    p = p + (40'(msb - 16) <<< 16);                  // log2(u), Q16
    return (p * 40'(LN2)) >>> 16;
  endfunction

  logic [31:0] rnd;
  logic signed [39:0] u, v, x, y, t, q, z;
  logic accept;
  logic signed [71:0] lhs, rhs;

  mwc64x_rng #(.SEED_D(SEED)) u_mwc (
    .clk, .rst_n, .load(rng_load), .seed(rng_seed), .next(1'b1), .rnd
  );

  always_comb begin
    u = signed'(40'(rnd[31:16])) + 40'sd1;
    v = ((signed'(40'(rnd[15:0])) - 40'sd32768) * 40'(K_V)) >>> 16;
    x = u - 40'(K_S);
    y = (v < 0 ? -v : v) + 40'(K_T);
    t = (40'(K_A) * y - 40'(K_B) * x) >>> 16;
    q = ((x * x) >>> 16) + ((y * t) >>> 16);
    lhs = 72'(v * v) <<< 16;                                    // v^2, Q48
    rhs = -72'sd4 * 72'(u * u) * 72'(ln_q16(u));               // -4 u^2 ln u, Q48
    accept = (q < 40'(Q_LOW)) || (q <= 40'(Q_HIGH) && lhs <= rhs);
    z = (v <<< 8) / u;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_z     <= '0;
    end else if (!out_valid || out_ready) begin
      out_valid <= accept;
      out_z     <= 16'(z);
    end
  end
endmodule
