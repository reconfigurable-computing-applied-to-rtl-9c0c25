// Result unloader: queues products of the broadcast multiplier and sends
// them to the host as a stream of 64-bit beats, least significant word first.
//
// A 512-bit product leaves in eight beats, again matching the broadcast
// unit's eight cycles per product. The multiplier cannot be stalled, so a
// product must have room when it arrives: an operation reserves a slot when
// it starts (reserve, allowed while can_reserve is high) and the slot is
// freed when the last beat of its product has left. An operation holds its
// slot for about 20 cycles (11 in the multiplier, then 8 beats), so with a
// new operation every 8 cycles DEPTH = 3 slots keep the multiplier busy when
// the host takes one beat per cycle. out_ready low holds
// the stream (back-pressure); beats leave on out_valid && out_ready.
// The 64-bit width follows the platform description; the slot reservation,
// the depth and the word order are this design's choices.
module result_unloader #(
  parameter int unsigned BUS_W = 64,
  parameter int unsigned RES_W = 512,
  parameter int unsigned DEPTH = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  // Slot reservation by the operation about to start
  input  logic             reserve,
  output logic             can_reserve,
  // Product from the multiplier
  input  logic [RES_W-1:0] in_data,
  input  logic             in_valid,
  // Host stream
  output logic [BUS_W-1:0] out_data,
  output logic             out_valid,
  input  logic             out_ready
);
  localparam int unsigned BEATS = RES_W / BUS_W;
  localparam int unsigned PW    = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned NW    = $clog2(DEPTH + 1);
  localparam int unsigned BW    = (BEATS > 1) ? $clog2(BEATS) : 1;

  logic [RES_W-1:0] mem [DEPTH];
  logic [PW-1:0]    wr_ptr, rd_ptr;
  logic [NW-1:0]    count;     // products stored
  logic [NW-1:0]    resv;      // slots reserved (running or stored)
  logic [BW-1:0]    beat;
  logic             last_beat;

  assign can_reserve = (resv < NW'(DEPTH));
  assign out_valid   = (count != '0);
  assign out_data    = mem[rd_ptr][32'(beat) * BUS_W +: BUS_W];
  assign last_beat   = out_valid && out_ready && (beat == BW'(BEATS - 1));

  function automatic logic [PW-1:0] next_ptr(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (in_valid) mem[wr_ptr] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0; rd_ptr <= '0; count <= '0; resv <= '0; beat <= '0;
    end else begin
      if (in_valid) wr_ptr <= next_ptr(wr_ptr);
      if (out_valid && out_ready) begin
        beat <= last_beat ? '0 : beat + 1'b1;
        if (last_beat) rd_ptr <= next_ptr(rd_ptr);
      end
      count <= count + NW'(in_valid) - NW'(last_beat);
      resv  <= resv + NW'(reserve && can_reserve) - NW'(last_beat);
    end
  end

  // A product must arrive into a reserved, free slot.
  a_room: assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> count < resv)
    else $error("result_unloader: product without a reserved slot");
  a_reserve: assert property (@(posedge clk) disable iff (!rst_n) reserve |-> can_reserve)
    else $error("result_unloader: reserve while no slot is free");
endmodule
