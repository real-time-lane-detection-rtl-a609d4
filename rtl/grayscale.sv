// grayscale: converts one RGB pixel per clock to an 8-bit intensity.
//
// Integer approximation without floating point:
//   Y = 66*R + 129*G + 25*B ;  Y = (Y + 128) >> 8 ;  Y = Y + 16
// which maps [0,255]^3 onto [16,235]. The weights, rounding and offset are
// those of the design; the two-stage pipeline is this implementation's choice.
// Timing: in_valid/in_rgb accepted every clock, out_valid/out_y two clocks
// later. No backpressure.
module grayscale
  import lane_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  rgb_t       in_rgb,
  output logic       out_valid,
  output logic [7:0] out_y
);
  logic [16:0] sum_q;
  logic        v_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q       <= 1'b0;
      out_valid <= 1'b0;
      sum_q     <= '0;
      out_y     <= '0;
    end else begin
      v_q       <= in_valid;
      sum_q     <= 17'(66 * in_rgb.r) + 17'(129 * in_rgb.g) + 17'(25 * in_rgb.b);
      out_valid <= v_q;
      out_y     <= 8'(((sum_q + 17'd128) >> 8) + 17'd16);
    end
  end
endmodule
