// Montgomery modular multiplier: r = a * b * 2^-W mod p for an odd modulus p,
// built from three full W x W multiplications on one broadcast multiplier.
//
// Montgomery's method replaces the division of a double-length product by p
// with multiplications and shifts. With R = 2^W and n' = -p^-1 mod R:
//   T = a * b                     (multiplication 1, 2W bits)
//   m = (T mod R) * n' mod R      (multiplication 2, low half kept)
//   t = (T + m * p) / R           (multiplication 3, then a W-bit shift)
//   r = t - p if t >= p, else t
// so one modular product costs three unsigned multiplications. The three
// run one after another on a single bcast_mul (W = N*32), whose operand
// inputs are switched between the steps.
//
// n' is computed in the unit when a modulus is loaded, so the host passes
// only a, b and p. Starting from inv = 1 and s = p (s tracks p * inv mod R),
// each of W-1 cycles looks at bit i of s; if it is set, bit i is added to inv
// and p << i to s. Then p * inv = 1 mod R and n' = -inv.
//
// Interface: pulse load with modulus (odd) while idle; with the load edge
// as edge 0, mod_ready is high after edge W-1. Then pulse start with a and b
// (both below p) while ready is high; with the start edge as edge 0, done
// pulses after edge 3*(N+5)+1 (40 for W = 256) and r is held until the next
// result. start while the modulus is not ready is ignored.
// The use of Montgomery multiplication and its cost of three multiplications
// follow the text; the single shared multiplier, the in-unit computation of
// n' and the handshake are this design's choices.
module montgomery_mul
  import mpmul_pkg::*;
#(
  parameter int unsigned W = 256
) (
  input  logic         clk,
  input  logic         rst_n,
  // Modulus set-up
  input  logic         load,
  input  logic [W-1:0] modulus,
  output logic         mod_ready,
  // Modular multiplication
  input  logic         start,
  output logic         ready,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         done,
  output logic [W-1:0] r
);
  localparam int unsigned N  = W / LEAF_W;
  localparam int unsigned IW = $clog2(W);

  typedef enum logic [3:0] {
    S_IDLE, S_INV, S_MUL1, S_WAIT1, S_MUL2, S_WAIT2, S_MUL3, S_WAIT3, S_FINAL
  } state_e;

  state_e         state;
  logic [W-1:0]   p_r, inv, s, np;
  logic [IW-1:0]  bit_i;
  logic [W-1:0]   a_r, b_r, m_r;
  logic [2*W-1:0] t_full;     // T, kept for the final sum
  logic [W:0]     t_sum;      // (T + m*p) / R, below 2p

  // Shared multiplier
  logic           mul_start, mul_ready, mul_done;
  logic [W-1:0]   mul_a, mul_b;
  logic [2*W-1:0] mul_p;

  bcast_mul #(.W(LEAF_W), .N(N)) u_mul (
    .clk, .rst_n,
    .start(mul_start), .ready(mul_ready),
    .a(mul_a), .b(mul_b),
    .done(mul_done), .p(mul_p)
  );

  always_comb begin
    mul_start = (state == S_MUL1) || (state == S_MUL2) || (state == S_MUL3);
    unique case (state)
      S_MUL2:  begin mul_a = t_full[W-1:0]; mul_b = np;  end
      S_MUL3:  begin mul_a = m_r;           mul_b = p_r; end
      default: begin mul_a = a_r;           mul_b = b_r; end
    endcase
  end

  assign ready = (state == S_IDLE) && mod_ready;

  // (T + m*p) / R: the low halves cancel to zero, so only the carry out of
  // them is needed.
  logic [2*W:0] full_sum;
  always_comb full_sum = {1'b0, t_full} + {1'b0, mul_p};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      p_r <= '0; inv <= '0; s <= '0; np <= '0; bit_i <= '0; mod_ready <= 1'b0;
      a_r <= '0; b_r <= '0; m_r <= '0; t_full <= '0; t_sum <= '0;
      done <= 1'b0; r <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (load) begin
            p_r       <= modulus;
            inv       <= W'(1);
            s         <= modulus;
            bit_i     <= IW'(1);
            mod_ready <= 1'b0;
            state     <= S_INV;
          end else if (start && mod_ready) begin
            a_r   <= a;
            b_r   <= b;
            state <= S_MUL1;
          end
        end
        S_INV: begin
          if (s[bit_i]) begin
            inv[bit_i] <= 1'b1;
            s          <= s + (p_r << bit_i);
          end
          bit_i <= bit_i + 1'b1;
          if (bit_i == IW'(W - 1)) begin
            np        <= '0 - (s[bit_i] ? (inv | (W'(1) << bit_i)) : inv);
            mod_ready <= 1'b1;
            state     <= S_IDLE;
          end
        end
        S_MUL1: state <= S_WAIT1;
        S_WAIT1: if (mul_done) begin t_full <= mul_p; state <= S_MUL2; end
        S_MUL2: state <= S_WAIT2;
        S_WAIT2: if (mul_done) begin m_r <= mul_p[W-1:0]; state <= S_MUL3; end
        S_MUL3: state <= S_WAIT3;
        S_WAIT3: if (mul_done) begin t_sum <= full_sum[2*W:W]; state <= S_FINAL; end
        S_FINAL: begin
          r     <= (t_sum >= {1'b0, p_r}) ? W'(t_sum - {1'b0, p_r}) : t_sum[W-1:0];
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_mul_ready: assert property (@(posedge clk) disable iff (!rst_n) mul_start |-> mul_ready)
    else $error("montgomery_mul: multiplier busy at a step start");
endmodule
