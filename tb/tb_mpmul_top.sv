// End-to-end testbench for mpmul_top at its only size (256-bit operands).
//
// Every cycle it may present a new operand pair to the combinational bank
// and start the sequential baseline units, while a host model streams
// operand pairs into the broadcast unit in 64-bit beats and takes the
// products back in 64-bit beats. Every product that comes out is compared
// with one computed by the testbench; the bank's two-edge latency, the
// Montgomery unit's 40-edge latency and the broadcast unit's rate of one
// product per eight cycles with both streams at full speed are checked.
// It also counts how often each mechanism of the design was exercised and
// fails if one never was:
//   streaming   : operand pairs on consecutive cycles into the bank
//   overlap     : operand pairs completed less than 11 cycles apart, so
//                 two are in the broadcast pipeline at once
//   in_stall    : host input beat held: a complete pair waits for the
//                 multiplier or for a free result slot
//   out_hold    : a result beat held by the host (back-pressure)
//   mid_neg/pos/zero : sign of the middle term of the 256-bit
//                 divide-and-conquer split
//   booth_neg   : a 64-bit multiplier with a negative Booth digit
//   knuth_skip  : a 64-bit multiplier with a zero digit (skipped step)
//   seq_ignored : a baseline start that a busy unit ignored
//   mm_switch   : a change of Montgomery modulus (NIST P-256, then random)
//   mm_sub      : a Montgomery result that needed the final subtraction
module tb_mpmul_top;
  import mpmul_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [255:0] a, b;
  logic         in_valid, out_valid;
  logic [63:0]  p_a;
  logic [127:0] p_b, p_c, p_d;
  logic [255:0] p_e;
  logic [511:0] p_f, p_g;
  logic [63:0]  h_in_data, h_out_data;
  logic         h_in_valid, h_in_ready, h_out_valid, h_out_ready;
  logic         seq_start;
  logic [NSEQ-1:0] seq_busy, seq_done;
  logic [127:0] seq_p [NSEQ];
  logic         mm_load, mm_mod_ready, mm_start, mm_ready, mm_done;
  logic [255:0] mm_modulus, mm_r;

  mpmul_top dut (.*);

  int checks = 0, failures = 0;
  int n_stream = 0, n_overlap = 0, n_mid_neg = 0, n_mid_pos = 0, n_mid_zero = 0;
  int n_booth_neg = 0, n_knuth_skip = 0, n_seq_ignored = 0;
  int n_mm = 0, n_mm_switch = 0, n_mm_sub = 0;
  logic [255:0] mm_x, mm_y, mm_p;
  int           mm_t;
  bit           mm_pend = 0, mm_want_load = 0;
  localparam logic [255:0] P256 =
    256'hffffffff_00000001_00000000_00000000_00000000_ffffffff_ffffffff_ffffffff;
  int n_in_stall = 0, n_out_hold = 0;
  int n_bank = 0, n_g = 0, n_seq = 0;

  typedef struct {
    logic [255:0] x, y;
    int           t;
  } op_t;

  op_t          bank_q [$];
  int           in_count = 0, last_pair = 0, n_fast_beats = 0;
  logic [63:0]  in_beats [$];     // host beats still to send
  logic [63:0]  out_words [$];    // expected result beats
  logic [127:0] seq_exp [NSEQ];
  logic         seq_pend [NSEQ];
  int cyc = 0;

  function automatic logic [255:0] rnd();
    logic [255:0] r;
    for (int i = 0; i < 8; i++) r[i*32 +: 32] = $urandom;
    for (int i = 0; i < 32; i++)
      if ($urandom_range(0, 15) == 0) r[i*8 +: 8] = '0;
    case ($urandom_range(0, 9))
      0: r[255:128] = r[127:0];
      1: r = '1;
      default: ;
    endcase
    return r;
  endfunction

  function automatic bit booth_has_neg(input logic [63:0] y);
    logic [66:0] e;
    e = {2'b00, y, 1'b0};
    for (int k = 0; k < 33; k++)
      if (e[2*k+2] && !(e[2*k+1] && e[2*k])) return 1'b1;
    return 1'b0;
  endfunction

  function automatic logic [127:0] seq_ref(input int k, input logic [255:0] x, input logic [255:0] y);
    if (k % 2 == 0) return 128'(64'(x[31:0]) * 64'(y[31:0]));
    return 128'(x[63:0]) * 128'(y[63:0]);
  endfunction

  initial begin
    #600000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit prev_valid;
    in_valid = 0; seq_start = 0; a = '0; b = '0;
    mm_load = 0; mm_start = 0; mm_modulus = '0;
    h_in_valid = 0; h_in_data = '0; h_out_ready = 0;
    for (int k = 0; k < NSEQ; k++) seq_pend[k] = 1'b0;
    prev_valid = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 3400; c++) begin
      @(negedge clk);
      cyc++;
      // ---- outputs of the edge just passed ----
      if (out_valid) begin
        op_t o;
        logic [511:0] e;
        o = bank_q.pop_front();
        n_bank++;
        e = 512'(o.x) * 512'(o.y);
        checks += 7;
        if (p_a !== 64'(o.x[31:0]) * 64'(o.y[31:0])) begin failures++; $display("FAIL p_a"); end
        if (p_b !== 128'(o.x[63:0]) * 128'(o.y[63:0])) begin failures++; $display("FAIL p_b"); end
        if (p_c !== 128'(o.x[63:0]) * 128'(o.y[63:0])) begin failures++; $display("FAIL p_c"); end
        if (p_d !== 128'(o.x[63:0]) * 128'(o.y[63:0])) begin failures++; $display("FAIL p_d"); end
        if (p_e !== 256'(o.x[127:0]) * 256'(o.y[127:0])) begin failures++; $display("FAIL p_e"); end
        if (p_f !== e) begin failures++; $display("FAIL p_f"); end
        if (cyc - o.t != 2) begin failures++; $display("FAIL bank latency %0d", cyc - o.t); end
      end
      // Montgomery unit: r * 2^256 = a * b (mod p), r < p.
      if (mm_done) begin
        logic [511:0] lhs, rhs, t;
        logic [255:0] inv, m;
        n_mm++;
        checks += 3;
        lhs = {mm_r, 256'd0} % {256'd0, mm_p};
        rhs = (512'(mm_x) * 512'(mm_y)) % {256'd0, mm_p};
        if (!mm_pend || mm_r >= mm_p || lhs != rhs) begin failures++; $display("FAIL Montgomery result"); end
        if (cyc - mm_t != 1 + 40) begin failures++; $display("FAIL Montgomery latency %0d", cyc - mm_t); end
        mm_pend = 0;
        inv = mm_p;
        repeat (8) inv = inv * (256'd2 - mm_p * inv);
        m = (mm_x * mm_y) * (256'd0 - inv);
        t = (512'(mm_x) * 512'(mm_y) + 512'(m) * 512'(mm_p)) >> 256;
        if (t >= 512'(mm_p)) n_mm_sub++;
      end
      for (int k = 0; k < NSEQ; k++)
        if (seq_done[k]) begin
          n_seq++;
          checks++;
          if (!seq_pend[k] || seq_p[k] !== seq_exp[k]) begin
            failures++;
            $display("FAIL baseline unit %0d", k);
          end
          seq_pend[k] = 1'b0;
        end
      // ---- inputs for the next edge; the last 200 cycles drain ----
      // Host model: keep the beat queue topped up; cycles 0..999 run both
      // streams at full speed, later cycles throttle them at random.
      if (c < 3000 && in_beats.size() < 8) begin
        logic [255:0] x, y;
        logic [511:0] pr;
        x = rnd(); y = rnd();
        pr = 512'(x) * 512'(y);
        for (int w = 0; w < 4; w++) in_beats.push_back(x[w*64 +: 64]);
        for (int w = 0; w < 4; w++) in_beats.push_back(y[w*64 +: 64]);
        for (int w = 0; w < 8; w++) out_words.push_back(pr[w*64 +: 64]);
      end
      h_in_valid  = (in_beats.size() > 0) && (c < 1000 || $urandom_range(0, 3) != 0);
      h_in_data   = (in_beats.size() > 0) ? in_beats[0] : '0;
      h_out_ready = (c < 1000) || ((c / 64) % 4 != 3 && $urandom_range(0, 4) != 0);
      // Host streams: a beat moves at the coming edge when valid and
      // ready, as now driven, are both high.
      if (h_out_valid && h_out_ready) begin
        logic [63:0] e;
        e = out_words.pop_front();
        checks++;
        if (out_words.size() % 8 == 0) n_g++;
        if (c >= 200 && c < 1000) n_fast_beats++;
        if (h_out_data !== e) begin failures++; $display("FAIL result beat %h expected %h", h_out_data, e); end
      end
      if (h_out_valid && !h_out_ready) n_out_hold++;
      if (h_in_valid && h_in_ready) begin
        void'(in_beats.pop_front());
        in_count++;
        if (in_count % 8 == 0) begin
          // A pair is complete; if the previous one completed less than
          // eleven cycles ago, both are in the multiplier at once.
          if (in_count > 8 && cyc - last_pair < 11) n_overlap++;
          last_pair = cyc;
        end
      end
      if (h_in_valid && !h_in_ready) n_in_stall++;
      if (c >= 3000) begin
        in_valid = 0; seq_start = 0; prev_valid = 0; mm_load = 0; mm_start = 0;
        continue;
      end
      a = rnd(); b = rnd();
      // Montgomery: P-256 first, a new random modulus every 700 cycles.
      mm_load = 0; mm_start = 0;
      if (c % 700 == 5) mm_want_load = 1;
      if (mm_want_load && !mm_pend) begin
        mm_load = 1;
        mm_want_load = 0;
        mm_modulus = (c < 700) ? P256
                   : (({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom}
                       >> ($urandom_range(0, 3) == 0 ? 8 : 0)) | {1'b1, 254'd0, 1'b1});
        mm_p = mm_modulus;
        n_mm_switch++;
      end else if (mm_ready && !mm_pend && !mm_want_load && $urandom_range(0, 3) == 0) begin
        a = a % mm_p; b = b % mm_p;
        if ($urandom_range(0, 9) == 0) begin a = mm_p - 1; b = mm_p - 1; end
        mm_start = 1; mm_x = a; mm_y = b; mm_t = cyc; mm_pend = 1;
      end
      in_valid  = ($urandom_range(0, 4) != 0);
      seq_start = ($urandom_range(0, 7) == 0);
      if (in_valid) begin
        bank_q.push_back('{x: a, y: b, t: cyc});
        if (prev_valid) n_stream++;
        if (a[127:0] == a[255:128] || b[127:0] == b[255:128]) n_mid_zero++;
        else if ((a[127:0] < a[255:128]) ^ (b[255:128] < b[127:0])) n_mid_neg++;
        else n_mid_pos++;
      end
      prev_valid = in_valid;
      if (seq_start) begin
        for (int k = 0; k < NSEQ; k++)
          if (!seq_busy[k]) begin
            seq_exp[k]  = seq_ref(k, a, b);
            seq_pend[k] = 1'b1;
            if (k == int'(SEQ_BOOTH64) && booth_has_neg(b[63:0])) n_booth_neg++;
            if (k == int'(SEQ_KNUTH64)) begin
              for (int j = 0; j < 8; j++)
                if (b[j*8 +: 8] == 0) begin n_knuth_skip++; break; end
            end
          end else n_seq_ignored++;
      end
    end
    checks++;
    if (bank_q.size() != 0 || out_words.size() != 0 || in_beats.size() != 0) begin failures++; $display("FAIL results missing"); end
    for (int k = 0; k < NSEQ; k++) begin
      checks++;
      if (seq_pend[k]) begin failures++; $display("FAIL baseline unit %0d never finished", k); end
    end
    $display("bank products %0d, broadcast products %0d, baseline products %0d", n_bank, n_g, n_seq);
    $display("streaming %0d, overlap %0d, mid_neg %0d, mid_pos %0d, mid_zero %0d",
             n_stream, n_overlap, n_mid_neg, n_mid_pos, n_mid_zero);
    $display("booth_neg %0d, knuth_skip %0d, seq_ignored %0d", n_booth_neg, n_knuth_skip, n_seq_ignored);
    $display("in_stall %0d, out_hold %0d, result beats in 800 full-speed cycles %0d",
             n_in_stall, n_out_hold, n_fast_beats);
    $display("Montgomery products %0d, modulus changes %0d, final subtractions %0d", n_mm, n_mm_switch, n_mm_sub);
    checks += 14;
    if (n_mm < 20)        begin failures++; $display("FAIL too few Montgomery products"); end
    if (n_mm_switch < 2)  begin failures++; $display("FAIL no modulus change"); end
    if (n_mm_sub == 0)    begin failures++; $display("FAIL no final subtraction"); end
    if (mm_pend)          begin failures++; $display("FAIL Montgomery result missing"); end
    if (n_in_stall == 0)    begin failures++; $display("FAIL no input stall"); end
    if (n_out_hold == 0)    begin failures++; $display("FAIL no output back-pressure"); end
    // Full speed: one product per 8 cycles, so 800 result beats in 800 cycles.
    if (n_fast_beats < 800) begin failures++; $display("FAIL broadcast rate too low"); end
    if (n_stream == 0)      begin failures++; $display("FAIL never streamed"); end
    if (n_overlap == 0)     begin failures++; $display("FAIL no broadcast overlap"); end
    if (n_mid_neg == 0)     begin failures++; $display("FAIL no negative middle term"); end
    if (n_mid_pos == 0)     begin failures++; $display("FAIL no positive middle term"); end
    if (n_mid_zero == 0)    begin failures++; $display("FAIL no zero middle term"); end
    if (n_booth_neg == 0)   begin failures++; $display("FAIL no negative Booth digit"); end
    if (n_knuth_skip == 0)  begin failures++; $display("FAIL no zero Knuth digit"); end
    if (n_seq_ignored == 0) begin failures++; $display("FAIL no ignored baseline start"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
