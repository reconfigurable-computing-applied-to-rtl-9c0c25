// Self-checking testbench for montgomery_mul at W = 256. It loads the
// NIST P-256 prime p = 2^256 - 2^224 + 2^192 + 2^96 - 1 and then random odd
// moduli, and checks each result r against the defining property
// r < p and r * 2^256 = a * b (mod p), using wide arithmetic. It also checks
// the set-up time (W-1 edges), the multiplication latency (40 edges), that a
// start before the modulus is ready is ignored, and that both outcomes of
// the final conditional subtraction occur.
module tb_montgomery_mul;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         load, mod_ready, start, ready, done;
  logic [255:0] modulus, a, b, r;

  montgomery_mul dut (.clk, .rst_n, .load, .modulus, .mod_ready, .start, .ready, .a, .b, .done, .r);

  int checks = 0, failures = 0;
  int n_sub = 0, n_nosub = 0;

  localparam logic [255:0] P256 =
    256'hffffffff_00000001_00000000_00000000_00000000_ffffffff_ffffffff_ffffffff;

  function automatic logic [255:0] rnd256();
    logic [255:0] x;
    for (int i = 0; i < 8; i++) x[i*32 +: 32] = $urandom;
    return x;
  endfunction

  task automatic load_mod(input logic [255:0] p);
    int n;
    @(negedge clk);
    load = 1; modulus = p;
    @(negedge clk);
    load = 0;
    n = 0;
    while (!mod_ready && n < 1000) begin @(negedge clk); n++; end
    checks++;
    if (n != 255) begin failures++; $display("FAIL set-up took %0d edges", n); end
  endtask

  task automatic mont(input logic [255:0] p, input logic [255:0] x, input logic [255:0] y);
    int n;
    logic [511:0] lhs, rhs;
    @(negedge clk);
    start = 1; a = x; b = y;
    @(negedge clk);
    start = 0;
    n = 0;
    while (!done && n < 1000) begin @(negedge clk); n++; end
    lhs = {r, 256'd0} % {256'd0, p};
    rhs = (512'(x) * 512'(y)) % {256'd0, p};
    checks += 3;
    if (r >= p)      begin failures++; $display("FAIL r not reduced"); end
    if (lhs != rhs)  begin failures++; $display("FAIL r*R != a*b mod p: a=%h b=%h r=%h", x, y, r); end
    if (n != 40)     begin failures++; $display("FAIL latency %0d", n); end
    // Did the method need its final subtraction? Recompute t = (T + m p)/R.
    begin
      logic [255:0] inv, m;
      logic [511:0] t;
      inv = p;                                // p * p = 1 mod 8 for odd p
      repeat (8) inv = inv * (256'd2 - p * inv);  // Newton: 3, 6, ... 768 bits
      m = (x * y) * (256'd0 - inv);           // (T mod R) * n' mod R
      t = (512'(x) * 512'(y) + 512'(m) * 512'(p)) >> 256;
      if (t >= 512'(p)) n_sub++; else n_nosub++;
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [255:0] p, x, y;
    load = 0; start = 0; modulus = '0; a = '0; b = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // A start with no modulus loaded is ignored.
    @(negedge clk);
    start = 1; a = 256'd5; b = 256'd7;
    @(negedge clk);
    start = 0;
    checks++;
    for (int k = 0; k < 50; k++) begin
      @(negedge clk);
      if (done) failures++;
    end
    if (done || ready || mod_ready) begin failures++; $display("FAIL start accepted without modulus"); end
    load_mod(P256);
    mont(P256, 256'd0, 256'd12345);
    mont(P256, P256 - 1, P256 - 1);
    mont(P256, 256'd1, 256'd1);
    repeat (60) begin
      x = rnd256() % P256; y = rnd256() % P256;
      mont(P256, x, y);
    end
    repeat (6) begin
      p = rnd256() | 256'd1;
      p[255] = 1'b1 ^ ($urandom_range(0, 2) == 0);
      load_mod(p);
      repeat (15) begin
        x = rnd256() % p; y = rnd256() % p;
        mont(p, x, y);
      end
      mont(p, p - 1, p - 1);
    end
    checks++;
    if (n_sub == 0 || n_nosub == 0) begin
      failures++; $display("FAIL final subtraction taken %0d, skipped %0d", n_sub, n_nosub);
    end
    $display("final subtraction taken %0d, skipped %0d", n_sub, n_nosub);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
