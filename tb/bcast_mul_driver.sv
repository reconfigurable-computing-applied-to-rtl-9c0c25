// Test driver for one bcast_mul of any shape: issues random operation pairs
// back to back (and some isolated), checks each product against wide
// multiplication and each latency against N+3 edges, and reports its counts.
// Used by tb_bcast_mul for the shapes that hold the longer NIST operands.
module bcast_mul_driver #(
  parameter int unsigned W    = 32,
  parameter int unsigned N    = 12,
  parameter int unsigned NOPS = 30
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic finished
);
  localparam int unsigned OW = W * N;

  logic            start, ready, done;
  logic [OW-1:0]   a, b;
  logic [2*OW-1:0] p;

  bcast_mul #(.W(W), .N(N)) dut (.clk, .rst_n, .start, .ready, .a, .b, .done, .p);

  logic [2*OW-1:0] exp_q [$];
  int              t_q [$];
  int              cyc = 0;

  function automatic logic [OW-1:0] rnd();
    logic [OW-1:0] r;
    for (int i = 0; i < N; i++) begin
      r[i*W +: W] = W'({$urandom, $urandom, $urandom, $urandom});
      if ($urandom_range(0, 6) == 0) r[i*W +: W] = '1;
    end
    return r;
  endfunction

  always @(negedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && done) begin
      checks += 2;
      if (exp_q.size() == 0) failures++;
      else begin
        if (p !== exp_q.pop_front()) begin failures++; $display("FAIL N=%0d product", N); end
        // done rises N+3 edges after the start edge, seen at the next negedge.
        if (cyc - t_q.pop_front() != int'(N) + 3 + 1) begin failures++; $display("FAIL N=%0d latency", N); end
      end
    end
  end

  initial begin
    logic [OW-1:0] x, y;
    checks = 0; failures = 0; finished = 0;
    start = 0; a = '0; b = '0;
    @(posedge rst_n);
    for (int k = 0; k < NOPS; k++) begin
      @(negedge clk);
      while (!ready) @(negedge clk);
      x = (k == 0) ? '1 : rnd();
      y = (k == 0) ? '1 : rnd();
      start = 1; a = x; b = y;
      exp_q.push_back((2*OW)'(x) * (2*OW)'(y));
      t_q.push_back(cyc);
      @(negedge clk);
      start = 0;
      if (k % 10 == 9) repeat (2 * N) @(negedge clk);
    end
    repeat (2 * N + 8) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL N=%0d results missing", N); end
    finished = 1;
  end
endmodule
