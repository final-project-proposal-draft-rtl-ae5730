// threshold: decides that a pixel is a corner when its cornerness c exceeds
// the threshold THRESH, a parameter fixed when the design is built (a larger
// value keeps fewer, stronger corners). Purely combinational, signed compare.
// The default value is this implementation's choice, set so that the corners
// of a high-contrast shape pass and straight edges do not.
module threshold #(
  parameter int unsigned C_W = 52,
  parameter longint THRESH = 64'sd1_000_000_000_000
) (
  input  logic signed [C_W-1:0] c,
  output logic                  is_corner
);
  assign is_corner = longint'(c) > THRESH;
endmodule
