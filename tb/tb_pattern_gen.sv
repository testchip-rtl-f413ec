// tb_pattern_gen: self-checking test of the weighted pattern generator.
//
// Both polynomials of the design are tested (two instances). A reference
// LFSR written stage by stage (stage i takes stage i-1, XORed with the
// output stage where the polynomial has a term x^i) predicts the state; the
// expected weighted bit is 1 when the 3-bit number {tapA, tapB, tapC} is at
// least 8-k for weight code k, which gives probability k/8. The test also
// checks seed loading (zero seed replaced by 1), hold without `step`, and
// the measured frequency of ones for each code against k/8.
module tb_pattern_gen;
  import tc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic load, step;
  logic [31:0] seed;
  wcode_t code;
  logic bit1, bit2;
  logic [31:0] st1, st2;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pattern_gen dut1 (.clk, .rst_n, .load, .seed, .step, .code, .bit_o(bit1), .state_o(st1));
  pattern_gen #(.POLY(PG2_POLY)) dut2 (.clk, .rst_n, .load, .seed, .step, .code, .bit_o(bit2), .state_o(st2));

  function automatic logic [31:0] ref_next(logic [31:0] s, logic [31:0] p);
    logic [31:0] n;
    for (int i = 0; i < 32; i++)
      n[i] = ((i == 0) ? 1'b0 : s[i-1]) ^ (p[i] & s[31]);
    return n;
  endfunction

  function automatic logic ref_bit(logic [31:0] s, wcode_t k);
    int v = {s[31], s[20], s[9]};
    return (v >= 8 - int'(k));
  endfunction

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  logic [31:0] m1, m2;
  int ones1 [8];
  int ones2 [8];

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 0; step = 0; seed = '0; code = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check("reset state", st1 == 32'h1 && st2 == 32'h1);
    // zero seed becomes 1
    load = 1; seed = '0; @(negedge clk); load = 0;
    check("zero seed", st1 == 32'h1 && st2 == 32'h1);
    seed = 32'hDEAD_BEEF; load = 1; @(negedge clk); load = 0;
    check("seed load", st1 == 32'hDEAD_BEEF && st2 == 32'hDEAD_BEEF);
    m1 = seed; m2 = seed;
    // hold without step
    repeat (3) @(negedge clk);
    check("hold", st1 == m1 && st2 == m2);
    for (int k = 0; k < 8; k++) begin ones1[k] = 0; ones2[k] = 0; end
    for (int n = 0; n < 16000; n++) begin
      code = wcode_t'(n % 8);
      step = ($urandom_range(0, 7) != 0);
      #1;
      check("bit pg1", bit1 == ref_bit(m1, code));
      check("bit pg2", bit2 == ref_bit(m2, code));
      ones1[code] += int'(bit1);
      ones2[code] += int'(bit2);
      @(negedge clk);
      if (step) begin m1 = ref_next(m1, PG1_POLY); m2 = ref_next(m2, PG2_POLY); end
      check("state pg1", st1 == m1);
      check("state pg2", st2 == m2);
    end
    // frequency of ones: 2000 samples per code, expected k/8, tolerance 0.04
    for (int k = 0; k < 8; k++) begin
      real f1, f2;
      f1 = real'(ones1[k]) / 2000.0;
      f2 = real'(ones2[k]) / 2000.0;
      $display("code %0d: weight %0.3f  pg1 %0.3f  pg2 %0.3f", k, k / 8.0, f1, f2);
      check("weight pg1", f1 > k / 8.0 - 0.04 && f1 < k / 8.0 + 0.04);
      check("weight pg2", f2 > k / 8.0 - 0.04 && f2 < k / 8.0 + 0.04);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
