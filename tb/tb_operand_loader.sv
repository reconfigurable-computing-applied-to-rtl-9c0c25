// Self-checking testbench for operand_loader (64-bit beats, 256-bit
// operands). A host model sends random operand pairs as eight beats each,
// with random gaps; the consumer takes pairs with random op_ready. Every pair
// is compared with what was sent. A first phase runs both sides at full
// speed and checks that a pair leaves every eight cycles; the second phase
// checks that a waiting pair stalls the stream without losing beats.
module tb_operand_loader;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [63:0]  in_data;
  logic         in_valid, in_ready, op_valid, op_ready;
  logic [255:0] a, b;

  operand_loader dut (.clk, .rst_n, .in_data, .in_valid, .in_ready, .a, .b, .op_valid, .op_ready);

  int checks = 0, failures = 0;
  int n_stall = 0, n_pairs_fast = 0;
  logic [63:0]  beats [$];
  logic [511:0] pairs [$];

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_data = '0; op_ready = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 4000; c++) begin
      @(negedge clk);
      if (c < 3800 && beats.size() < 8) begin
        logic [511:0] pr;
        for (int w = 0; w < 16; w++) pr[w*32 +: 32] = $urandom;
        pairs.push_back(pr);
        for (int w = 0; w < 8; w++) beats.push_back(pr[w*64 +: 64]);
      end
      in_valid = (beats.size() > 0) && (c < 800 || $urandom_range(0, 2) != 0);
      in_data  = (beats.size() > 0) ? beats[0] : '0;
      op_ready = (c < 800) || ($urandom_range(0, 3) == 0);
      #1;  // let in_ready follow op_ready
      // Handshakes that happen at the coming edge.
      if (op_valid && op_ready) begin
        logic [511:0] e;
        e = pairs.pop_front();
        checks++;
        if ({b, a} !== e) begin failures++; $display("FAIL pair %0d", checks); end
        if (c >= 100 && c < 800) n_pairs_fast++;
      end
      if (in_valid && in_ready) void'(beats.pop_front());
      if (in_valid && !in_ready) n_stall++;
    end
    checks += 3;
    // 700 full-speed cycles carry 87.5 pairs.
    if (n_pairs_fast < 87 || n_pairs_fast > 88) begin
      failures++; $display("FAIL full-speed pairs %0d", n_pairs_fast);
    end
    if (n_stall == 0) begin failures++; $display("FAIL stream never stalled"); end
    if (pairs.size() != 0) begin failures++; $display("FAIL %0d pairs not delivered", pairs.size()); end
    $display("full-speed pairs %0d, stalled beats %0d", n_pairs_fast, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
