// Self-checking testbench for booth_mul at 32 bits (default) and 64 bits.
// Radix-4 Booth digits, two multiplier bits per cycle: W/2+1 edges; all-ones and alternating-bit multipliers produce the negative digits.
// Each product is compared with one computed by the testbench, and the
// number of edges from the start edge to done with the expected latency.
module tb_booth_mul;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         start32, busy32, done32;
  logic [31:0]  a32, b32;
  logic [63:0]  p32;
  logic         start64, busy64, done64;
  logic [63:0]  a64, b64;
  logic [127:0] p64;

  booth_mul dut32 (.clk, .rst_n, .start(start32), .a(a32), .b(b32), .busy(busy32), .done(done32), .p(p32));
  booth_mul #(.W(64)) dut64 (.clk, .rst_n, .start(start64), .a(a64), .b(b64), .busy(busy64), .done(done64), .p(p64));

  // Expected latency in edges, start edge to the edge after which done is high.
  function automatic int latency(input int W, input logic [63:0] y);
    int M;
    int n;
    M = W / 8;
    n = 0;
    n = W / 2 + 1; return n;
  endfunction

  function automatic logic [63:0] rnd();
    logic [63:0] r;
    r = {$urandom, $urandom};
    for (int i = 0; i < 8; i++)
      if ($urandom_range(0, 4) == 0) r[i*8 +: 8] = '0;
    if ($urandom_range(0, 9) == 0) r = '1;
    return r;
  endfunction

  task automatic run32(input logic [31:0] x, input logic [31:0] y);
    int n;
    @(negedge clk);
    start32 = 1'b1; a32 = x; b32 = y;
    @(negedge clk);
    start32 = 1'b0;
    n = 0;  // edges after the start edge
    while (!done32 && n < 1000) begin @(negedge clk); n++; end
    checks += 2;
    if (p32 !== 64'(x) * 64'(y)) begin failures++; $display("FAIL 32: %h * %h = %h", x, y, p32); end
    if (n != latency(32, 64'(y))) begin failures++; $display("FAIL 32 latency %0d expected %0d", n, latency(32, 64'(y))); end
  endtask

  task automatic run64(input logic [63:0] x, input logic [63:0] y);
    int n;
    @(negedge clk);
    start64 = 1'b1; a64 = x; b64 = y;
    @(negedge clk);
    start64 = 1'b0;
    n = 0;  // edges after the start edge
    while (!done64 && n < 1000) begin @(negedge clk); n++; end
    checks += 2;
    if (p64 !== 128'(x) * 128'(y)) begin failures++; $display("FAIL 64: %h * %h = %h", x, y, p64); end
    if (n != latency(64, y)) begin failures++; $display("FAIL 64 latency %0d expected %0d", n, latency(64, y)); end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] x, y;
    start32 = 0; start64 = 0; a32 = '0; b32 = '0; a64 = '0; b64 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run32('1, '1); run32('0, '1); run32('1, 0); run32(32'h8000_0001, 32'hAAAA_5555);
    run64('1, '1); run64('0, '1); run64('1, 0); run64(64'h8000_0000_0000_0001, 64'h5555_AAAA_3333_CCCC);
    repeat (300) begin
      x = rnd(); y = rnd();
      run32(x[31:0], y[31:0]);
      run64(x, y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
