// Sequential radix-4 Booth unsigned multiplier, two multiplier bits per cycle.
//
// The multiplier b, zero-extended by two bits, is recoded into W/2+1 Booth
// digits in {-2,-1,0,+1,+2}; digit k comes from bits 2k+1, 2k, 2k-1 (bit -1
// is 0). Each cycle adds digit*a, scaled by 4^k, to a signed accumulator;
// the multiplicand register shifts left by two bits per cycle and the
// multiplier register right by two. After W/2+1 cycles the accumulator holds
// a*b. W must be even.
// Interface: pulse start with a and b while busy is low; done pulses for one
// cycle when p is valid: with start sampled at edge 0, done is high after
// edge W/2+1; p is held until the next start.
// Only the name of this baseline unit is given; the radix-4 sequential form
// and the handshake are this design's choices.
module booth_mul #(
  parameter int unsigned W = 32
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
  localparam int unsigned ND = W / 2 + 1;       // Booth digits
  localparam int unsigned AW = 2 * W + 4;       // accumulator width
  localparam int unsigned CW = $clog2(ND + 1);
  localparam int unsigned PW = 2 * W;          // product width

  typedef enum logic [2:0] {D_ZERO, D_P1, D_P2, D_M1, D_M2} digit_e;

  logic signed [AW-1:0] acc, mcand, addend;
  logic [W+2:0]         mplr;     // {b, prev bit}, shifted right by 2
  logic [CW-1:0]        cnt;
  digit_e               dig;

  // Booth recoding of the three low bits {b[2k+1], b[2k], b[2k-1]}.
  always_comb begin
    unique case (mplr[2:0])
      3'b001, 3'b010: dig = D_P1;
      3'b011:         dig = D_P2;
      3'b100:         dig = D_M2;
      3'b101, 3'b110: dig = D_M1;
      default:        dig = D_ZERO;
    endcase
    unique case (dig)
      D_P1:    addend = mcand;
      D_P2:    addend = mcand <<< 1;
      D_M1:    addend = -mcand;
      D_M2:    addend = -(mcand <<< 1);
      default: addend = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0; mcand <= '0; mplr <= '0; cnt <= '0;
      busy <= 1'b0; done <= 1'b0; p <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          acc   <= '0;
          mcand <= AW'(a);
          mplr  <= {2'b00, b, 1'b0};
          cnt   <= '0;
          busy  <= 1'b1;
        end
      end else begin
        acc   <= acc + addend;
        mcand <= mcand <<< 2;
        mplr  <= mplr >> 2;
        cnt   <= cnt + 1'b1;
        if (cnt == CW'(ND - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
      if (busy && cnt == CW'(ND - 1)) p <= PW'(acc + addend);
    end
  end
endmodule
