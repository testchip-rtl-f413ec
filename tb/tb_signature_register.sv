// tb_signature_register: self-checking test of the 2-input signature register.
//
// The reference treats the signature as a polynomial over GF(2): a step
// multiplies it by x modulo x^32 + (polynomial terms) and adds the input
// bits as coefficients of x^0 (in_a) and x^1 (in_b). Random input streams
// with random step and clear are compared with it. Further checks: a single
// flipped input bit in a long stream changes the signature, and with a
// single 1 loaded the register returns to 1 only after 2^32-1 steps
// (checked indirectly: it does not return within 100000 steps).
module tb_signature_register;
  import tc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic clear, step, in_a, in_b;
  logic [31:0] sig, model;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  signature_register dut (.clk, .rst_n, .clear, .step, .in_a, .in_b, .sig);

  function automatic logic [31:0] ref_step(logic [31:0] s, logic a, logic b);
    logic [32:0] t;
    t = {s, 1'b0};                          // multiply by x
    if (t[32]) t = t ^ {1'b1, SIG_POLY};    // reduce
    return t[31:0] ^ {30'b0, b, a};
  endfunction

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] sig_good;
  logic back_to_one;
  initial begin
    clear = 0; step = 0; in_a = 0; in_b = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    model = '0;
    check("reset", sig == 0);
    for (int n = 0; n < 5000; n++) begin
      clear = ($urandom_range(0, 199) == 0);
      step  = ($urandom_range(0, 3) != 0);
      in_a  = $urandom_range(0, 1);
      in_b  = $urandom_range(0, 1);
      @(negedge clk);
      if (clear) model = '0;
      else if (step) model = ref_step(model, in_a, in_b);
      check("signature", sig == model);
    end
    // single-bit error detection
    for (int run = 0; run < 2; run++) begin
      clear = 1; step = 0; @(negedge clk); clear = 0;
      for (int n = 0; n < 300; n++) begin
        step = 1;
        in_a = ((n * 7) % 5 == 0);
        in_b = ((n * 3) % 7 == 1) ^ (run == 1 && n == 123);
        @(negedge clk);
      end
      step = 0;
      if (run == 0) sig_good = sig;
      else check("error detected", sig != sig_good);
    end
    // long period from state 1
    clear = 1; @(negedge clk); clear = 0;
    step = 1; in_a = 1; in_b = 0; @(negedge clk);
    in_a = 0;
    check("state one", sig == 32'h1);
    back_to_one = 0;
    for (int n = 0; n < 100000; n++) begin
      @(negedge clk);
      if (sig == 32'h1) back_to_one = 1;
    end
    check("no short cycle", !back_to_one);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
