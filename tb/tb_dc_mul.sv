// Self-checking testbench for dc_mul at the three sizes it is used at:
// 64 bits (three 32-bit leaves), 128 bits and 256 bits (default), plus the
// 512-bit unit (three 256-bit units, 324 blocks) that the design sizes but
// that does not fit one chip; its operands are two random 256-bit halves. Operands
// are random with whole halves forced equal, zero or all ones, so that the
// middle term of the top split is seen positive, negative and zero.
module tb_dc_mul;
  logic [255:0] a, b;
  logic [127:0] p64;
  logic [255:0] p128;
  logic [511:0] p256;
  logic [511:0] a2, b2;
  logic [1023:0] p512;
  int checks = 0, failures = 0;
  int n_neg = 0, n_pos = 0, n_zero = 0;

  dc_mul #(.W(64))  d64  (.a(a[63:0]),  .b(b[63:0]),  .p(p64));
  dc_mul #(.W(128)) d128 (.a(a[127:0]), .b(b[127:0]), .p(p128));
  dc_mul            d256 (.a(a),        .b(b),        .p(p256));
  dc_mul #(.W(512)) d512 (.a(a2),       .b(b2),       .p(p512));

  function automatic logic [255:0] rnd();
    logic [255:0] r;
    for (int i = 0; i < 8; i++) r[i*32 +: 32] = $urandom;
    for (int i = 0; i < 8; i++)
      case ($urandom_range(0, 7))
        0: r[i*32 +: 32] = '0;
        1: r[i*32 +: 32] = '1;
        default: ;
      endcase
    case ($urandom_range(0, 5))
      0: r[255:128] = r[127:0];
      1: r[63:32]   = r[31:0];
      default: ;
    endcase
    return r;
  endfunction

  task automatic check(input logic [255:0] x, input logic [255:0] y);
    logic [1023:0] e512;
    logic [511:0] e256;
    logic [255:0] e128;
    logic [127:0] e64;
    a = x; b = y;
    a2 = {rnd(), x}; b2 = {y, rnd()};
    if ($urandom_range(0, 5) == 0) a2[511:256] = a2[255:0];
    #1;
    e512 = 1024'(a2) * 1024'(b2);
    e64  = 128'(x[63:0])  * 128'(y[63:0]);
    e128 = 256'(x[127:0]) * 256'(y[127:0]);
    e256 = 512'(x) * 512'(y);
    checks += 4;
    if (p512 !== e512) begin failures++; $display("FAIL 512: %h * %h", a2, b2); end
    if (p64 !== e64)   begin failures++; $display("FAIL 64: %h * %h", x[63:0], y[63:0]); end
    if (p128 !== e128) begin failures++; $display("FAIL 128: %h * %h", x[127:0], y[127:0]); end
    if (p256 !== e256) begin failures++; $display("FAIL 256: %h * %h", x, y); end
    // Sign of the 256-bit unit's middle term (a0-a1)*(b1-b0).
    if (x[127:0] == x[255:128] || y[127:0] == y[255:128]) n_zero++;
    else if ((x[127:0] < x[255:128]) ^ (y[255:128] < y[127:0])) n_neg++;
    else n_pos++;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('0, '0);
    check('1, '1);
    check({128'd0, {128{1'b1}}}, {{128{1'b1}}, 128'd0});
    check({{128{1'b1}}, 128'd0}, {{128{1'b1}}, 128'd0});
    repeat (2000) check(rnd(), rnd());
    checks++;
    if (n_neg == 0 || n_pos == 0 || n_zero == 0) begin
      failures++;
      $display("FAIL middle-term cases not all seen: neg %0d pos %0d zero %0d", n_neg, n_pos, n_zero);
    end
    $display("middle term: negative %0d, positive %0d, zero %0d", n_neg, n_pos, n_zero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
