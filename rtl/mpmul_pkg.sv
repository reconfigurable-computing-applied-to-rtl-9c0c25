// Shared constants of the multiprecision multiplier units.
//
// The units are built for a Virtex-II class FPGA whose internal multiplier
// blocks are 18x18 two's-complement multipliers. An unsigned operand is cut
// into 16-bit digits so that each digit, zero-extended to 18 bits, is a
// non-negative signed number that one block can multiply exactly. The 32-bit
// multiplier is the leaf that all larger units are built from.
package mpmul_pkg;
  // Operand width of one internal multiplier block (signed).
  localparam int unsigned DSP_W   = 18;
  // Unsigned digit fed to one internal multiplier block.
  localparam int unsigned DIGIT_W = 16;
  // Width of the leaf multiplier of the divide-and-conquer and broadcast units.
  localparam int unsigned LEAF_W  = 32;

  // Operand width of the multiplier bank: the 256-bit units and the
  // broadcast unit (eight 32-bit words).
  localparam int unsigned OP_W = 256;

  // Index of each sequential baseline unit in the bank's arrays.
  typedef enum logic [2:0] {
    SEQ_SHIFTADD32 = 3'd0,
    SEQ_SHIFTADD64 = 3'd1,
    SEQ_BOOTH32    = 3'd2,
    SEQ_BOOTH64    = 3'd3,
    SEQ_KNUTH32    = 3'd4,
    SEQ_KNUTH64    = 3'd5
  } seq_unit_e;
  localparam int unsigned NSEQ = 6;
endpackage
