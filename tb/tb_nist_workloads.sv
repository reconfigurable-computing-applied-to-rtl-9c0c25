// Workload testbench: the NIST prime-field operand sizes that the 256-bit
// design holds (192, 224 and 256 bits), run through mpmul_top at its only
// size. For each size it multiplies random operands below 2^size on the
// 256-bit divide-and-conquer unit (p_f) and on the broadcast unit through
// the 64-bit host streams, and runs Montgomery products modulo that size's
// NIST prime:
//   P-192 = 2^192 - 2^64 - 1
//   P-224 = 2^224 - 2^96 + 1
//   P-256 = 2^256 - 2^224 + 2^192 + 2^96 - 1
// Shorter operands are zero-extended to 256 bits. The 384- and 521-bit sizes
// do not fit the 256-bit units and are not run.
module tb_nist_workloads;
  import mpmul_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [255:0] a, b;
  logic         in_valid, out_valid;
  logic [63:0]  p_a;
  logic [127:0] p_b, p_c, p_d;
  logic [255:0] p_e;
  logic [511:0] p_f;
  logic [63:0]  h_in_data, h_out_data;
  logic         h_in_valid, h_in_ready, h_out_valid, h_out_ready;
  logic         mm_load, mm_mod_ready, mm_start, mm_ready, mm_done;
  logic [255:0] mm_modulus, mm_r;
  logic         seq_start;
  logic [NSEQ-1:0] seq_busy, seq_done;
  logic [127:0] seq_p [NSEQ];

  mpmul_top dut (.*);

  int checks = 0, failures = 0;

  localparam logic [255:0] P192 = (256'd1 << 192) - (256'd1 << 64) - 256'd1;
  localparam logic [255:0] P224 = (256'd1 << 224) - (256'd1 << 96) + 256'd1;
  localparam logic [255:0] P256 = (256'd1 << 256) - (256'd1 << 224) + (256'd1 << 192)
                                  + (256'd1 << 96) - 256'd1;

  function automatic logic [255:0] rnd(input int bits);
    logic [255:0] x;
    for (int i = 0; i < 8; i++) x[i*32 +: 32] = $urandom;
    return (bits == 256) ? x : (x & ((256'd1 << bits) - 256'd1));
  endfunction

  // Bank: one pair in, product on p_f two edges later.
  task automatic bank_mul(input logic [255:0] x, input logic [255:0] y, input int bits);
    @(negedge clk);
    in_valid = 1; a = x; b = y;
    @(negedge clk);
    in_valid = 0;
    @(negedge clk);
    checks++;
    if (!out_valid || p_f !== 512'(x) * 512'(y)) begin
      failures++; $display("FAIL %0d-bit divide-and-conquer product", bits);
    end
  endtask

  // Broadcast unit through the host streams.
  task automatic stream_mul(input logic [255:0] x, input logic [255:0] y, input int bits);
    logic [511:0] pr;
    int k, n;
    k = 0;
    while (k < 8) begin
      @(negedge clk);
      h_in_valid = 1;
      h_in_data  = (k < 4) ? x[k*64 +: 64] : y[(k-4)*64 +: 64];
      if (h_in_ready) k++;
    end
    @(negedge clk);
    h_in_valid = 0;
    h_out_ready = 1;
    k = 0; n = 0;
    while (k < 8 && n < 100) begin
      if (h_out_valid) begin pr[k*64 +: 64] = h_out_data; k++; end
      @(negedge clk);
      n++;
    end
    h_out_ready = 0;
    checks++;
    if (k != 8 || pr !== 512'(x) * 512'(y)) begin
      failures++; $display("FAIL %0d-bit broadcast product", bits);
    end
  endtask

  task automatic mont(input logic [255:0] p, input logic [255:0] x, input logic [255:0] y, input int bits);
    int n;
    @(negedge clk);
    mm_start = 1; a = x; b = y;
    @(negedge clk);
    mm_start = 0;
    n = 0;
    while (!mm_done && n < 100) begin @(negedge clk); n++; end
    checks++;
    if (!mm_done || mm_r >= p || ({mm_r, 256'd0} % {256'd0, p}) != (512'(x) * 512'(y)) % {256'd0, p}) begin
      failures++; $display("FAIL %0d-bit Montgomery product", bits);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [255:0] primes [3];
    int sizes [3];
    primes = '{P192, P224, P256};
    sizes  = '{192, 224, 256};
    in_valid = 0; a = '0; b = '0; h_in_valid = 0; h_in_data = '0; h_out_ready = 0;
    mm_load = 0; mm_start = 0; mm_modulus = '0; seq_start = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    foreach (sizes[s]) begin
      bank_mul(primes[s] - 1, primes[s] - 1, sizes[s]);
      stream_mul(primes[s] - 1, primes[s] - 1, sizes[s]);
      repeat (20) begin
        logic [255:0] x, y;
        x = rnd(sizes[s]); y = rnd(sizes[s]);
        bank_mul(x, y, sizes[s]);
        stream_mul(x, y, sizes[s]);
      end
      // Montgomery arithmetic modulo this size's prime.
      @(negedge clk);
      mm_load = 1; mm_modulus = primes[s];
      @(negedge clk);
      mm_load = 0;
      while (!mm_mod_ready) @(negedge clk);
      mont(primes[s], primes[s] - 1, primes[s] - 1, sizes[s]);
      repeat (20) mont(primes[s], rnd(256) % primes[s], rnd(256) % primes[s], sizes[s]);
      $display("%0d-bit workload done, failures so far %0d", sizes[s], failures);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
