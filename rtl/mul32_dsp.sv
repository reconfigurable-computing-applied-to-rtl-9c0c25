// 32x32 unsigned multiplier built from four 18x18 internal multiplier blocks.
//
// Each operand is split into two 16-bit digits. Every digit pair goes to one
// mult18x18s with both digits zero-extended to 18 bits, so the signed block
// returns the exact unsigned 32-bit digit product. The four digit products
// are added at their weights 2^0, 2^16 (twice) and 2^32. The unit is
// combinational; the caller registers its inputs and outputs.
// The count of four blocks follows the resource figure given for the unit;
// the digit split is this design's choice.
module mul32_dsp
  import mpmul_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [63:0] p
);
  localparam int unsigned ND = 32 / DIGIT_W;  // digits per operand

  logic signed [2*DSP_W-1:0] pp [ND][ND];

  for (genvar i = 0; i < ND; i++) begin : g_i
    for (genvar j = 0; j < ND; j++) begin : g_j
      mult18x18s u_dsp (
        .a({2'b00, a[i*DIGIT_W +: DIGIT_W]}),
        .b({2'b00, b[j*DIGIT_W +: DIGIT_W]}),
        .p(pp[i][j])
      );
    end
  end

  always_comb begin
    p = '0;
    for (int i = 0; i < ND; i++)
      for (int j = 0; j < ND; j++)
        p = p + ({32'd0, pp[i][j][2*DIGIT_W-1:0]} << ((i + j) * DIGIT_W));
  end
endmodule
