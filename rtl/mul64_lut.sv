// Unsigned multiplier in general logic, using no internal multiplier blocks.
//
// Array multiplier: partial product i is a AND b[i], shifted left by i, and
// the W partial products are summed. Combinational; the caller registers
// around it. The absence of multiplier blocks follows the unit's resource
// figure (zero blocks); the plain partial-product array is this design's
// choice, as the internal structure of the vendor's core is not given.
module mul64_lut #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);
  always_comb begin
    p = '0;
    for (int i = 0; i < W; i++)
      p = p + (({{W{1'b0}}, a} & {(2*W){b[i]}}) << i);
  end
endmodule
