// Bank of multiprecision multiplier units for elliptic-curve arithmetic,
// side by side behind shared operand buses, as they are compared with one
// another: one unit of each kind, each fed the low bits of the same
// operands a and b.
//
// Combinational units (registered here, in then out, two-edge latency):
//   p_a  32-bit unit, four internal multiplier blocks          (mul32_dsp)
//   p_b  64-bit unit, sixteen blocks                           (mul64_dsp)
//   p_c  64-bit unit in general logic, no blocks               (mul64_lut)
//   p_d  64-bit divide-and-conquer unit, 12 blocks             (dc_mul W=64)
//   p_e  128-bit divide-and-conquer unit, 36 blocks            (dc_mul W=128)
//   p_f  256-bit divide-and-conquer unit, 108 blocks           (dc_mul W=256)
// in_valid captures a and b; out_valid is high two edges later with all six
// products. A new pair may be given every cycle.
//
// Broadcast unit (bcast_mul, 256 bits from eight 32-bit units, 32 blocks),
// fed from the 64-bit host stream: h_in carries a then b, least significant
// word first, eight beats per pair (operand_loader); h_out returns each
// 512-bit product in eight beats (result_unloader). An operation starts when
// a pair is complete, the multiplier is ready and a result slot is free, so
// the host stream stalls (h_in_ready low) rather than lose data, and
// h_out_ready low holds the results back. With both streams moving one beat
// per cycle the multiplier takes a new pair every 8 cycles.
//
// Montgomery modular multiplier (montgomery_mul, 256 bits, three products
// on its own broadcast unit): mm_load with mm_modulus (odd) sets the modulus
// and computes its inverse, mm_mod_ready then stays high; mm_start with a
// and b (below the modulus) while mm_ready is high returns
// mm_r = a * b * 2^-256 mod p with an mm_done pulse 40 edges later.
//
// Sequential baseline units, indexed by mpmul_pkg::seq_unit_e: shift-add,
// radix-4 Booth and digit-serial classical (Knuth) multipliers, each at 32
// and 64 bits. seq_start starts every idle one with the low bits of a and b;
// each raises its seq_done bit for one cycle with its product in seq_p
// (zero-extended to 128 bits, so the upper 64 bits of the three 32-bit
// units' entries are constant zero: 192 output bits that never move).
// The choice of units follows the set that is compared; sharing the operand
// buses and the register stages around the combinational units are this
// design's choices.
module mpmul_top
  import mpmul_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [OP_W-1:0]   a,
  input  logic [OP_W-1:0]   b,
  // Combinational units
  input  logic              in_valid,
  output logic              out_valid,
  output logic [63:0]       p_a,
  output logic [127:0]      p_b,
  output logic [127:0]      p_c,
  output logic [127:0]      p_d,
  output logic [255:0]      p_e,
  output logic [511:0]      p_f,
  // Broadcast unit behind the 64-bit host streams
  input  logic [63:0]       h_in_data,
  input  logic              h_in_valid,
  output logic              h_in_ready,
  output logic [63:0]       h_out_data,
  output logic              h_out_valid,
  input  logic              h_out_ready,
  // Montgomery multiplier
  input  logic              mm_load,
  input  logic [OP_W-1:0]   mm_modulus,
  output logic              mm_mod_ready,
  input  logic              mm_start,
  output logic              mm_ready,
  output logic              mm_done,
  output logic [OP_W-1:0]   mm_r,
  // Sequential baseline units
  input  logic              seq_start,
  output logic [NSEQ-1:0]   seq_busy,
  output logic [NSEQ-1:0]   seq_done,
  output logic [127:0]      seq_p [NSEQ]
);
  // ---- combinational units behind input and output registers ----
  logic [OP_W-1:0] a_r, b_r;
  logic            v_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_r <= '0; b_r <= '0; v_r <= 1'b0;
    end else begin
      v_r <= in_valid;
      if (in_valid) begin
        a_r <= a;
        b_r <= b;
      end
    end
  end

  logic [63:0]  q_a;
  logic [127:0] q_b, q_c, q_d;
  logic [255:0] q_e;
  logic [511:0] q_f;

  mul32_dsp u_a (.a(a_r[31:0]), .b(b_r[31:0]), .p(q_a));
  mul64_dsp u_b (.a(a_r[63:0]), .b(b_r[63:0]), .p(q_b));
  mul64_lut #(.W(64))  u_c (.a(a_r[63:0]),  .b(b_r[63:0]),  .p(q_c));
  dc_mul    #(.W(64))  u_d (.a(a_r[63:0]),  .b(b_r[63:0]),  .p(q_d));
  dc_mul    #(.W(128)) u_e (.a(a_r[127:0]), .b(b_r[127:0]), .p(q_e));
  dc_mul    #(.W(256)) u_f (.a(a_r),        .b(b_r),        .p(q_f));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      p_a <= '0; p_b <= '0; p_c <= '0; p_d <= '0; p_e <= '0; p_f <= '0;
    end else begin
      out_valid <= v_r;
      if (v_r) begin
        p_a <= q_a; p_b <= q_b; p_c <= q_c;
        p_d <= q_d; p_e <= q_e; p_f <= q_f;
      end
    end
  end

  // ---- broadcast unit between the host streams ----
  logic [OP_W-1:0]   g_a, g_b;
  logic [2*OP_W-1:0] p_g;
  logic              ld_valid, g_ready, can_reserve, g_start, g_done;

  operand_loader #(.BUS_W(64), .OP_W(OP_W)) u_ld (
    .clk, .rst_n,
    .in_data(h_in_data), .in_valid(h_in_valid), .in_ready(h_in_ready),
    .a(g_a), .b(g_b), .op_valid(ld_valid), .op_ready(g_ready && can_reserve)
  );

  assign g_start = ld_valid && g_ready && can_reserve;

  bcast_mul #(.W(32), .N(8)) u_g (
    .clk, .rst_n,
    .start(g_start), .ready(g_ready),
    .a(g_a), .b(g_b),
    .done(g_done), .p(p_g)
  );

  result_unloader #(.BUS_W(64), .RES_W(2*OP_W), .DEPTH(3)) u_ul (
    .clk, .rst_n,
    .reserve(g_start), .can_reserve,
    .in_data(p_g), .in_valid(g_done),
    .out_data(h_out_data), .out_valid(h_out_valid), .out_ready(h_out_ready)
  );

  // ---- Montgomery multiplier ----
  montgomery_mul #(.W(OP_W)) u_mm (
    .clk, .rst_n,
    .load(mm_load), .modulus(mm_modulus), .mod_ready(mm_mod_ready),
    .start(mm_start), .ready(mm_ready),
    .a, .b,
    .done(mm_done), .r(mm_r)
  );

  // ---- sequential baseline units ----
  logic [63:0]  sp32 [3];
  logic [127:0] sp64 [3];

  shiftadd_mul #(.W(32)) u_sa32 (.clk, .rst_n, .start(seq_start), .a(a[31:0]), .b(b[31:0]),
    .busy(seq_busy[SEQ_SHIFTADD32]), .done(seq_done[SEQ_SHIFTADD32]), .p(sp32[0]));
  shiftadd_mul #(.W(64)) u_sa64 (.clk, .rst_n, .start(seq_start), .a(a[63:0]), .b(b[63:0]),
    .busy(seq_busy[SEQ_SHIFTADD64]), .done(seq_done[SEQ_SHIFTADD64]), .p(sp64[0]));
  booth_mul    #(.W(32)) u_bo32 (.clk, .rst_n, .start(seq_start), .a(a[31:0]), .b(b[31:0]),
    .busy(seq_busy[SEQ_BOOTH32]), .done(seq_done[SEQ_BOOTH32]), .p(sp32[1]));
  booth_mul    #(.W(64)) u_bo64 (.clk, .rst_n, .start(seq_start), .a(a[63:0]), .b(b[63:0]),
    .busy(seq_busy[SEQ_BOOTH64]), .done(seq_done[SEQ_BOOTH64]), .p(sp64[1]));
  knuth_mul    #(.W(32)) u_kn32 (.clk, .rst_n, .start(seq_start), .a(a[31:0]), .b(b[31:0]),
    .busy(seq_busy[SEQ_KNUTH32]), .done(seq_done[SEQ_KNUTH32]), .p(sp32[2]));
  knuth_mul    #(.W(64)) u_kn64 (.clk, .rst_n, .start(seq_start), .a(a[63:0]), .b(b[63:0]),
    .busy(seq_busy[SEQ_KNUTH64]), .done(seq_done[SEQ_KNUTH64]), .p(sp64[2]));

  always_comb begin
    seq_p[SEQ_SHIFTADD32] = {64'd0, sp32[0]};
    seq_p[SEQ_SHIFTADD64] = sp64[0];
    seq_p[SEQ_BOOTH32]    = {64'd0, sp32[1]};
    seq_p[SEQ_BOOTH64]    = sp64[1];
    seq_p[SEQ_KNUTH32]    = {64'd0, sp32[2]};
    seq_p[SEQ_KNUTH64]    = sp64[2];
  end
endmodule
