// Broadcast multiplier: an (N*W)x(N*W) unsigned product from N parallel
// W-bit multipliers, one word of B per step, N steps, four pipeline stages.
//
// Default: W = 32, N = 8, a 256-bit multiplier built from eight 32-bit units
// (32 internal multiplier blocks). In step j word j of B is broadcast to all
// N lane multipliers, lane i holding word i of A. The stages are
//   1 multiply  : lane products A_i * B_j, each 2W bits, registered;
//   2 sum       : P0 (low halves of the lane products, side by side) plus
//                 P1 (high halves, side by side) shifted up by one word;
//   3 accumulate: acc = sum + (acc >> W), or just sum in the first step;
//   4 shift out : the low word of acc is shifted into the result register.
// After the last step acc holds the upper N+1 words, and the product is
// acc above the N-1 words already shifted out.
//
// Interface: pulse start with a and b while ready is high. The operands are
// captured on that edge, the N steps issue on the N following edges and
// done pulses for one cycle, with p valid and held until the next result:
// with start sampled at edge 0, done is high after edge N+3 (11 for N = 8).
// N must be at least 2. ready is
// high again in the cycle the last step issues, so a new operation may start
// every N cycles and the pipelines of two operations overlap.
// The lane structure, the four stages and the step count follow the
// description of the unit; the handshake, the reset and the use of the
// divide-and-conquer unit for lanes wider than 32 bits are this design's
// choices.
module bcast_mul
  import mpmul_pkg::*;
#(
  parameter int unsigned W = 32,
  parameter int unsigned N = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output logic             ready,
  input  logic [N*W-1:0]   a,
  input  logic [N*W-1:0]   b,
  output logic             done,
  output logic [2*N*W-1:0] p
);
  localparam int unsigned CW = (N > 1) ? $clog2(N) : 1;

  // Operand registers and step counter.
  logic [N*W-1:0] a_r, b_r;
  logic [CW-1:0]  step;
  logic           issuing;

  assign ready = !issuing || (step == CW'(N - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_r     <= '0;
      b_r     <= '0;
      step    <= '0;
      issuing <= 1'b0;
    end else if (start && ready) begin
      a_r     <= a;
      b_r     <= b;
      step    <= '0;
      issuing <= 1'b1;
    end else if (issuing) begin
      b_r     <= b_r >> W;
      step    <= step + 1'b1;
      issuing <= (step != CW'(N - 1));
    end
  end

  // Lane multipliers, all fed the same word of B.
  logic [2*W-1:0] lane_p [N];
  for (genvar i = 0; i < N; i++) begin : g_lane
    dc_mul #(.W(W)) u_mul (
      .a(a_r[i*W +: W]),
      .b(b_r[W-1:0]),
      .p(lane_p[i])
    );
  end

  // Stage 1: multiply.
  logic [2*W-1:0] s1_p [N];
  logic           s1_v, s1_first, s1_last;
  // Stage 2: sum of P0 and P1.
  logic [(N+1)*W-1:0] s2_sum;
  logic               s2_v, s2_first, s2_last;
  // Stage 3: accumulator.
  logic [(N+1)*W-1:0] acc;
  logic               s3_v, s3_last;
  // Stage 4: low words shifted out.
  logic [(N-1)*W-1:0] res_lo;

  logic [N*W-1:0]     p0, p1;
  logic [N*W-1:0]     res_cat;
  logic [(N-1)*W-1:0] res_lo_next;
  always_comb begin
    res_cat     = {acc[W-1:0], res_lo} >> W;
    res_lo_next = res_cat[(N-1)*W-1:0];
  end

  always_comb begin
    for (int i = 0; i < N; i++) begin
      p0[i*W +: W] = s1_p[i][W-1:0];
      p1[i*W +: W] = s1_p[i][2*W-1:W];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) s1_p[i] <= '0;
      s1_v <= 1'b0; s1_first <= 1'b0; s1_last <= 1'b0;
      s2_sum <= '0; s2_v <= 1'b0; s2_first <= 1'b0; s2_last <= 1'b0;
      acc <= '0; s3_v <= 1'b0; s3_last <= 1'b0;
      res_lo <= '0; done <= 1'b0; p <= '0;
    end else begin
      // Stage 1
      for (int i = 0; i < N; i++) s1_p[i] <= lane_p[i];
      s1_v     <= issuing;
      s1_first <= issuing && (step == '0);
      s1_last  <= issuing && (step == CW'(N - 1));
      // Stage 2
      s2_sum   <= {{W{1'b0}}, p0} + {p1, {W{1'b0}}};
      s2_v     <= s1_v;
      s2_first <= s1_first;
      s2_last  <= s1_last;
      // Stage 3
      if (s2_v) acc <= s2_sum + (s2_first ? '0 : (acc >> W));
      s3_v    <= s2_v;
      s3_last <= s2_last;
      // Stage 4
      done <= s3_v && s3_last;
      if (s3_v) begin
        if (s3_last) p <= {acc, res_lo};
        else         res_lo <= res_lo_next;
      end
    end
  end

  // A start while a previous operation is still issuing is lost.
  a_start_ready: assert property (@(posedge clk) disable iff (!rst_n) start |-> ready)
    else $error("bcast_mul: start while not ready");
endmodule
