// Self-checking testbench for mult18x18s: corner operands (most negative,
// most positive, -1, 0) and random signed pairs against a 64-bit product.
module tb_mult18x18s;
  logic signed [17:0] a, b;
  logic signed [35:0] p;
  int checks = 0, failures = 0;

  mult18x18s dut (.a, .b, .p);

  task automatic check(input logic signed [17:0] x, input logic signed [17:0] y);
    longint exp;
    a = x; b = y;
    #1;
    exp = longint'(x) * longint'(y);
    checks++;
    if (longint'(p) != exp) begin
      failures++;
      $display("FAIL %0d * %0d = %0d, expected %0d", x, y, p, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [17:0] corner [5] = '{18'sh20000, 18'sh1ffff, -18'sd1, 18'sd0, 18'sd1};
    foreach (corner[i]) foreach (corner[j]) check(corner[i], corner[j]);
    repeat (2000) check(18'($urandom), 18'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
