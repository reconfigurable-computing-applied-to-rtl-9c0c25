// 18x18 signed multiplier: the internal multiplier block of a Virtex-II FPGA.
//
// p = a * b, both operands and the product in two's complement. The block is
// combinational, as the asynchronous form of the FPGA primitive is; the units
// that use it put registers around it. Only the function of the block is
// modelled (the XC2V6000 holds 144 of them); the implementation inside the
// FPGA is the vendor's.
module mult18x18s
  import mpmul_pkg::*;
(
  input  logic signed [DSP_W-1:0]   a,
  input  logic signed [DSP_W-1:0]   b,
  output logic signed [2*DSP_W-1:0] p
);
  always_comb p = a * b;
endmodule
