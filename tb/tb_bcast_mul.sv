// Self-checking testbench for bcast_mul in two shapes: the default 256-bit
// unit from eight 32-bit lanes, and a 512-bit unit from four 128-bit lanes.
// Checks every product, the latency from start to done (N+3 edges) and that
// back-to-back operations issued every N cycles all complete, in order.
// Two more shapes hold the longer NIST operands as longer broadcast
// schedules on the same 32-bit lanes: 384 bits (N = 12) and 544 bits
// (N = 17, room for 521-bit operands).
module tb_bcast_mul;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---- default shape: W = 32, N = 8 ----
  localparam int OW = 256;
  logic            start, ready, done;
  logic [OW-1:0]   a, b;
  logic [2*OW-1:0] p;
  bcast_mul dut (.clk, .rst_n, .start, .ready, .a, .b, .done, .p);

  // ---- 512-bit shape: W = 128, N = 4 ----
  localparam int OW2 = 512;
  logic             start2, ready2, done2;
  logic [OW2-1:0]   a2, b2;
  logic [2*OW2-1:0] p2;
  bcast_mul #(.W(128), .N(4)) dut2 (.clk, .rst_n, .start(start2), .ready(ready2),
    .a(a2), .b(b2), .done(done2), .p(p2));

  // ---- 384- and 544-bit shapes, each with its own driver ----
  int  chk12, fail12, chk17, fail17;
  logic fin12, fin17;
  bcast_mul_driver #(.W(32), .N(12)) drv12 (.clk, .rst_n, .checks(chk12), .failures(fail12), .finished(fin12));
  bcast_mul_driver #(.W(32), .N(17)) drv17 (.clk, .rst_n, .checks(chk17), .failures(fail17), .finished(fin17));

  // Expected results, queued at start, matched at done. done rises N+3
  // edges after the start edge and is sampled here one edge later.
  logic [2*OW-1:0]  exp_q [$];
  int               t_q [$];
  logic [2*OW2-1:0] exp2_q [$];
  int               t2_q [$];
  int cyc = 0;
  int n_overlap = 0;
  always @(posedge clk) cyc++;

  function automatic logic [OW2-1:0] rnd();
    logic [OW2-1:0] r;
    for (int i = 0; i < OW2 / 32; i++) r[i*32 +: 32] = $urandom;
    for (int i = 0; i < OW2 / 32; i++)
      case ($urandom_range(0, 6))
        0: r[i*32 +: 32] = '0;
        1: r[i*32 +: 32] = '1;
        default: ;
      endcase
    return r;
  endfunction

  always @(posedge clk) begin
    if (rst_n && done) begin
      checks += 2;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL done with nothing outstanding");
      end else begin
        logic [2*OW-1:0] e;
        int t0;
        e  = exp_q.pop_front();
        t0 = t_q.pop_front();
        if (p !== e) begin failures++; $display("FAIL product %h expected %h", p, e); end
        if (cyc - t0 != 8 + 3 + 1) begin failures++; $display("FAIL latency %0d", cyc - t0); end
      end
    end
    if (rst_n && done2) begin
      checks += 2;
      if (exp2_q.size() == 0) begin
        failures++;
        $display("FAIL done2 with nothing outstanding");
      end else begin
        logic [2*OW2-1:0] e;
        int t0;
        e  = exp2_q.pop_front();
        t0 = t2_q.pop_front();
        if (p2 !== e) begin failures++; $display("FAIL 512-bit product"); end
        if (cyc - t0 != 4 + 3 + 1) begin failures++; $display("FAIL 512 latency %0d", cyc - t0); end
      end
    end
  end

  // Issue on the falling edge so the rising edge samples stable inputs.
  task automatic issue(input logic [OW-1:0] x, input logic [OW-1:0] y);
    @(negedge clk);
    while (!ready) @(negedge clk);
    if (exp_q.size() > 0) n_overlap++;
    start = 1'b1; a = x; b = y;
    exp_q.push_back((2*OW)'(x) * (2*OW)'(y));
    t_q.push_back(cyc + 1);
    @(negedge clk);
    start = 1'b0;
  endtask

  task automatic issue2(input logic [OW2-1:0] x, input logic [OW2-1:0] y);
    @(negedge clk);
    while (!ready2) @(negedge clk);
    start2 = 1'b1; a2 = x; b2 = y;
    exp2_q.push_back((2*OW2)'(x) * (2*OW2)'(y));
    t2_q.push_back(cyc + 1);
    @(negedge clk);
    start2 = 1'b0;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [OW2-1:0] x, y;
    start = 0; start2 = 0; a = '0; b = '0; a2 = '0; b2 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // Isolated operations, then back-to-back ones.
    issue('1, '1);
    repeat (15) @(negedge clk);
    issue('0, '1);
    repeat (15) @(negedge clk);
    for (int k = 0; k < 200; k++) begin
      x = rnd(); y = rnd();
      issue(x[OW-1:0], y[OW-1:0]);
      if (k % 50 == 49) repeat (20) @(negedge clk);
    end
    issue2('1, '1);
    for (int k = 0; k < 40; k++) issue2(rnd(), rnd());
    repeat (30) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || exp2_q.size() != 0) begin
      failures++;
      $display("FAIL results missing: %0d %0d", exp_q.size(), exp2_q.size());
    end
    checks++;
    if (n_overlap == 0) begin failures++; $display("FAIL no overlapped operations"); end
    wait (fin12 && fin17);
    checks   += chk12 + chk17;
    failures += fail12 + fail17;
    $display("overlapped starts: %0d; 384-bit checks %0d, 544-bit checks %0d", n_overlap, chk12, chk17);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
