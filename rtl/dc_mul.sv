// Divide-and-conquer unsigned multiplier of width W, from three half-width
// multipliers per level (Karatsuba), recursing down to the 32-bit leaf.
//
// With a = a1*2^H + a0 and b = b1*2^H + b0 (H = W/2) the unit forms
//   z0 = a0*b0,  z2 = a1*b1,  m = |a0-a1| * |b1-b0|
//   z1 = z0 + z2 + s*m        (s = sign of (a0-a1)*(b1-b0))
// and returns z2*2^W + z1*2^H + z0. The middle product works on absolute
// differences, so all three sub-products are exactly H bits wide and each
// level can reuse the same half-width unit. W = 32 is the leaf (mul32_dsp,
// four internal multiplier blocks); W = 64, 128 and 256 then use 12, 36 and
// 108 blocks, the counts given for the 64-, 128- and 256-bit units.
// W must be 32 times a power of two. The unit is combinational; the caller
// registers its inputs and outputs.
// The three-product split and the block counts follow the description of the
// units; the subtractive form of the middle term is this design's choice.
// When this module is linted on its own as the top, Verilator does not
// expand the recursive instances and reports z0, z2 and m undriven and da, db
// unused; inside a parent (bcast_mul, mpmul_top) and in simulation the
// recursion is expanded and they are driven.
module dc_mul
  import mpmul_pkg::*;
#(
  parameter int unsigned W = 256
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);
  if (W <= LEAF_W) begin : g_leaf
    logic [63:0] p_leaf;
    mul32_dsp u_leaf (
      .a({{(LEAF_W-W){1'b0}}, a}),
      .b({{(LEAF_W-W){1'b0}}, b}),
      .p(p_leaf)
    );
    assign p = p_leaf[2*W-1:0];
  end else begin : g_split
    localparam int unsigned H = W / 2;

    logic [H-1:0]   a0, a1, b0, b1, da, db;
    logic           sa, sb;
    logic [W-1:0]   z0, z2, m;
    logic [W+1:0]   z1;

    assign {a1, a0} = a;
    assign {b1, b0} = b;

    // Absolute differences and their signs.
    always_comb begin
      sa = (a0 < a1);
      sb = (b1 < b0);
      da = sa ? (a1 - a0) : (a0 - a1);
      db = sb ? (b0 - b1) : (b1 - b0);
    end

    dc_mul #(.W(H)) u_lo  (.a(a0), .b(b0), .p(z0));
    dc_mul #(.W(H)) u_hi  (.a(a1), .b(b1), .p(z2));
    dc_mul #(.W(H)) u_mid (.a(da), .b(db), .p(m));

    // z1 = a0*b1 + a1*b0, never negative and below 2^(W+1).
    always_comb begin
      if (sa ^ sb) z1 = {2'b00, z0} + {2'b00, z2} - {2'b00, m};
      else         z1 = {2'b00, z0} + {2'b00, z2} + {2'b00, m};
    end

    always_comb
      p = {z2, z0} + ({{(H-2){1'b0}}, z1, {H{1'b0}}});
  end
endmodule
