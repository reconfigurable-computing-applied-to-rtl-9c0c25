// Operand loader: assembles an operand pair for the broadcast multiplier from
// the 64-bit host data stream.
//
// The host bus moves 64 bits per clock, so a 256-bit operand takes four
// beats and an operand pair eight, the same eight cycles the broadcast unit
// needs per product. Beats arrive least significant word first: the words of
// a, then the words of b. When the pair is complete op_valid rises; the pair
// leaves on a cycle with op_valid && op_ready, and the first beat of the next
// pair may be taken in that same cycle, so back-to-back pairs need exactly
// eight cycles each. While a complete pair waits, in_ready is low and the
// host stream stalls. Beats are taken on in_valid && in_ready.
// The 64-bit bus width and the four beats per 256-bit operand follow the
// platform description; the valid/ready handshake and the word order are this
// design's choices.
module operand_loader #(
  parameter int unsigned BUS_W = 64,
  parameter int unsigned OP_W  = 256
) (
  input  logic            clk,
  input  logic            rst_n,
  // Host stream
  input  logic [BUS_W-1:0] in_data,
  input  logic             in_valid,
  output logic             in_ready,
  // Operand pair
  output logic [OP_W-1:0]  a,
  output logic [OP_W-1:0]  b,
  output logic             op_valid,
  input  logic             op_ready
);
  localparam int unsigned BEATS = 2 * OP_W / BUS_W;
  localparam int unsigned CW    = $clog2(BEATS + 1);

  logic [2*OP_W-1:0] buf_q;   // {b, a}, filled from the top down
  logic [CW-1:0]     cnt;

  assign op_valid = (cnt == CW'(BEATS));
  assign in_ready = !op_valid || op_ready;
  assign a        = buf_q[OP_W-1:0];
  assign b        = buf_q[2*OP_W-1:OP_W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q <= '0;
      cnt   <= '0;
    end else if (op_valid && !op_ready) begin
      // Hold the complete pair.
    end else if (in_valid) begin
      // First beat of the next pair may arrive as the pair leaves.
      buf_q <= {in_data, buf_q[2*OP_W-1:BUS_W]};
      cnt   <= op_valid ? CW'(1) : cnt + 1'b1;
    end else if (op_valid) begin
      cnt <= '0;
    end
  end
endmodule
