// Self-checking testbench for mul32_dsp: all-ones, digit-boundary and random
// operands against a wide product computed by the testbench.
module tb_mul32_dsp;
  localparam int W = 32;
  logic [W-1:0]   a, b;
  logic [2*W-1:0] p;
  int checks = 0, failures = 0;

  mul32_dsp dut (.a, .b, .p);

  function automatic logic [W-1:0] rnd();
    logic [W-1:0] r;
    for (int i = 0; i < W / 32; i++) r[i*32 +: 32] = $urandom;
    // Sometimes force whole 16-bit digits to 0 or all ones.
    for (int i = 0; i < W / 16; i++)
      case ($urandom_range(0, 5))
        0: r[i*16 +: 16] = '0;
        1: r[i*16 +: 16] = '1;
        default: ;
      endcase
    return r;
  endfunction

  task automatic check(input logic [W-1:0] x, input logic [W-1:0] y);
    logic [2*W-1:0] exp;
    a = x; b = y;
    #1;
    exp = (2*W)'(x) * (2*W)'(y);
    checks++;
    if (p !== exp) begin
      failures++;
      $display("FAIL %h * %h = %h, expected %h", x, y, p, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('0, '0);
    check('1, '1);
    check('1, 1);
    check({W{1'b1}} << (W / 2), {W{1'b1}} >> (W / 2));
    repeat (3000) check(rnd(), rnd());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
