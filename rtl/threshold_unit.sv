// threshold_unit: binarises a gradient pixel.
//   out = 0        if grad <  threshold
//   out = MAX_VAL  if grad >= threshold
// The rule is the design's; the threshold is a run-time input (50 is the
// value the design was tuned with) and MAX_VAL is a parameter (255 chosen
// here). Purely combinational.
module threshold_unit #(
  parameter int unsigned GRAD_W  = 11,
  parameter int unsigned MAX_VAL = lane_pkg::MAX_VAL_D
) (
  input  logic [GRAD_W-1:0] grad,
  input  logic [GRAD_W-1:0] threshold,
  output logic [7:0]        pix
);
  always_comb pix = (grad >= threshold) ? 8'(MAX_VAL) : 8'd0;
endmodule
