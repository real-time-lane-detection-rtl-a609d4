// mwc64x_rng: MWC64X multiply-with-carry uniform random number generator.
//
// State is a 32-bit value x and a 32-bit carry c. Each step forms the 64-bit
// product A*x + c with A = 4294883355 and keeps the low half as the new x and
// the high half as the new c; the output word is x ^ c of the current state.
// The period is about 2^63. The generator is the one the design names; its
// step rule and multiplier are those of the published MWC64X generator.
// Splitting one stream into non-overlapping substreams is done by
// mwc64x_skip, whose result is loaded here through seed/load.
//
// Interface: seed is loaded on reset and whenever load is high; when next is
// high the state advances by one step. rnd is combinational from the state,
// so a value is consumed in the clock where next is high.
module mwc64x_rng #(
  parameter logic [63:0] SEED_D = 64'h0000_0001_DEAD_BEEF
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  logic [63:0] seed,     // {c, x}
  input  logic        next,
  output logic [31:0] rnd
);
  localparam logic [63:0] A = 64'd4294883355;

  logic [31:0] x_q, c_q;
  logic [63:0] prod;

  always_comb begin
    prod = A * {32'd0, x_q} + {32'd0, c_q};
    rnd  = x_q ^ c_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {c_q, x_q} <= SEED_D;
    end else if (load) begin
      {c_q, x_q} <= seed;
    end else if (next) begin
      x_q <= prod[31:0];
      c_q <= prod[63:32];
    end
  end
endmodule
