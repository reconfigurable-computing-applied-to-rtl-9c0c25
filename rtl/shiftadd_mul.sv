// Sequential shift-add unsigned multiplier, one multiplier bit per cycle.
//
// The product register holds {hi, lo}; lo starts as the multiplier b. Each
// cycle adds a to hi when the low bit of lo is set and shifts the W+1-bit
// sum and lo right by one. After W cycles {hi, lo} is a*b.
// Interface: pulse start with a and b while busy is low; done pulses for one
// cycle when p is valid: with start sampled at edge 0, done is high after
// edge W; p is held until the next start.
// Only the name of this baseline unit is given; the one-bit-per-cycle form
// and the handshake are this design's choices.
module shiftadd_mul #(
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
  localparam int unsigned CW = $clog2(W + 1);

  logic [W-1:0]  mcand, hi, lo;
  logic [CW-1:0] cnt;
  logic [W:0]    sum;

  always_comb sum = {1'b0, hi} + (lo[0] ? {1'b0, mcand} : '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mcand <= '0; hi <= '0; lo <= '0; cnt <= '0;
      busy <= 1'b0; done <= 1'b0; p <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          mcand <= a; hi <= '0; lo <= b; cnt <= '0; busy <= 1'b1;
        end
      end else begin
        {hi, lo} <= {sum, lo[W-1:1]};
        cnt      <= cnt + 1'b1;
        if (cnt == CW'(W - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          p    <= {sum, lo[W-1:1]};
        end
      end
    end
  end
endmodule
