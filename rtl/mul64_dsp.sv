// 64x64 unsigned multiplier built from sixteen 18x18 internal multiplier blocks.
//
// Schoolbook product on 16-bit digits: a 4x4 grid of mult18x18s, one per
// digit pair, each fed zero-extended digits so the signed block gives the
// exact unsigned 32-bit digit product. The sixteen products are summed at
// weight 2^(16*(i+j)). Combinational; the caller registers around it.
// The block count (16) follows the resource figure given for the unit; the
// grid arrangement is this design's choice.
module mul64_dsp
  import mpmul_pkg::*;
(
  input  logic [63:0]  a,
  input  logic [63:0]  b,
  output logic [127:0] p
);
  localparam int unsigned ND = 64 / DIGIT_W;  // digits per operand

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
        p = p + ({96'd0, pp[i][j][2*DIGIT_W-1:0]} << ((i + j) * DIGIT_W));
  end
endmodule
