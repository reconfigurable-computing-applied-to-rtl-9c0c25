// Sequential classical multiprecision multiplier (Knuth's Algorithm M),
// one digit product per cycle.
//
// The operands are cut into M = W/D digits of D bits. For each digit v_j of
// b, and each digit u_i of a, the unit forms t = u_i*v_j + w_(i+j) + k,
// stores the low digit of t in w_(i+j) and carries the high digit k to the
// next i; after the last i the carry becomes w_(j+M). A zero digit v_j is
// skipped in one cycle (w_(j+M) = 0), as the algorithm prescribes.
// Interface: pulse start with a and b while busy is low; done pulses for one
// cycle when p is valid and p is held until the next start. With start
// sampled at edge 0, done is high after edge 1 + sum over j of
// (v_j == 0 ? 1 : M). W must be a multiple of D.
// Only the name of this baseline unit is given; the digit size, the
// one-product-per-cycle schedule and the handshake are this design's choices.
module knuth_mul #(
  parameter int unsigned W = 32,
  parameter int unsigned D = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic           busy,
  output logic           done,
  output logic [2*W-1:0] p
);
  localparam int unsigned M  = W / D;
  localparam int unsigned IW = (M > 1) ? $clog2(M) : 1;

  logic [D-1:0]   u [M];
  logic [D-1:0]   v [M];
  logic [D-1:0]   w [2*M];
  logic [IW-1:0]  i, j;
  logic [D-1:0]   k;
  logic           fin;       // all digits of b done; publish next cycle
  logic [2*D-1:0] t;
  logic [2*W-1:0] w_flat;

  always_comb begin
    t = u[i] * v[j] + {{D{1'b0}}, w[32'(i) + 32'(j)]} + {{D{1'b0}}, k};
    for (int n = 0; n < 2 * M; n++) w_flat[n*D +: D] = w[n];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int n = 0; n < M; n++) begin u[n] <= '0; v[n] <= '0; end
      for (int n = 0; n < 2 * M; n++) w[n] <= '0;
      i <= '0; j <= '0; k <= '0; fin <= 1'b0;
      busy <= 1'b0; done <= 1'b0; p <= '0;
    end else begin
      done <= 1'b0;
      fin  <= 1'b0;
      if (fin) begin
        p    <= w_flat;
        done <= 1'b1;
        busy <= 1'b0;
      end else if (!busy) begin
        if (start) begin
          for (int n = 0; n < M; n++) begin
            u[n] <= a[n*D +: D];
            v[n] <= b[n*D +: D];
          end
          for (int n = 0; n < 2 * M; n++) w[n] <= '0;
          i <= '0; j <= '0; k <= '0;
          busy <= 1'b1;
        end
      end else begin
        if (i == '0 && v[j] == '0) begin
          // Step M2: zero multiplier digit.
          w[32'(j) + M] <= '0;
          j   <= j + 1'b1;
          fin <= (j == IW'(M - 1));
        end else begin
          w[32'(i) + 32'(j)] <= t[D-1:0];
          if (i == IW'(M - 1)) begin
            w[32'(j) + M] <= t[2*D-1:D];
            k   <= '0;
            i   <= '0;
            j   <= j + 1'b1;
            fin <= (j == IW'(M - 1));
          end else begin
            k <= t[2*D-1:D];
            i <= i + 1'b1;
          end
        end
      end
    end
  end
endmodule
