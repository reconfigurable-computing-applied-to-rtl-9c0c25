// Self-checking testbench for result_unloader (512-bit results, 64-bit
// beats, three slots). A producer model reserves a slot whenever
// can_reserve allows and delivers the product 11 to 20 cycles later, in
// order, as the multiplier would; a host model takes beats with random
// back-pressure. Every beat is compared with the product it belongs to. It
// checks that reservations stop at three outstanding, and that at full
// speed a result leaves every eight cycles.
module tb_result_unloader;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         reserve, can_reserve, in_valid, out_valid, out_ready;
  logic [511:0] in_data;
  logic [63:0]  out_data;

  result_unloader dut (.clk, .rst_n, .reserve, .can_reserve, .in_data, .in_valid,
                       .out_data, .out_valid, .out_ready);

  int checks = 0, failures = 0;
  int n_full = 0, n_hold = 0, n_beats_fast = 0;
  int due [$];                 // delivery cycle of each reserved operation
  logic [63:0] words [$];      // expected beats
  int outstanding = 0;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last_due;
    reserve = 0; in_valid = 0; in_data = '0; out_ready = 0;
    last_due = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 4000; c++) begin
      @(negedge clk);
      // Producer: deliver a due product, then maybe reserve a new slot.
      in_valid = 0;
      if (due.size() > 0 && due[0] <= c) begin
        void'(due.pop_front());
        for (int w = 0; w < 16; w++) in_data[w*32 +: 32] = $urandom;
        for (int w = 0; w < 8; w++) words.push_back(in_data[w*64 +: 64]);
        in_valid = 1;
      end
      reserve = can_reserve && c < 3700 && (c < 1000 || $urandom_range(0, 2) == 0);
      if (reserve) begin
        int d;
        d = (c < 1000) ? c + 11 : c + 11 + $urandom_range(0, 9);
        if (d <= last_due) d = last_due + 1;
        last_due = d;
        due.push_back(d);
        outstanding++;
      end
      if (!can_reserve) n_full++;
      // Host.
      out_ready = (c < 1000) || ($urandom_range(0, 3) != 0);
      if (out_valid && out_ready) begin
        logic [63:0] e;
        e = words.pop_front();
        checks++;
        if (out_data !== e) begin failures++; $display("FAIL beat %h expected %h", out_data, e); end
        if (c >= 200 && c < 1000) n_beats_fast++;
        if (words.size() % 8 == 0) outstanding--;
      end
      if (out_valid && !out_ready) n_hold++;
      checks++;
      if (outstanding > 3 || (outstanding < 3) != can_reserve && !reserve && !(out_valid && out_ready)) begin
        failures++; $display("FAIL slot count: outstanding %0d can_reserve %0b", outstanding, can_reserve);
      end
    end
    checks += 3;
    // 800 full-speed cycles: one beat per cycle.
    if (n_beats_fast < 790) begin failures++; $display("FAIL full-speed beats %0d", n_beats_fast); end
    if (n_full == 0 || n_hold == 0) begin failures++; $display("FAIL full %0d hold %0d", n_full, n_hold); end
    if (words.size() != 0 || due.size() != 0) begin failures++; $display("FAIL results left over"); end
    $display("full-speed beats %0d, cycles with no free slot %0d, held beats %0d", n_beats_fast, n_full, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
