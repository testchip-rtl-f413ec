// tb_testchip_c880: tests of a purely combinational circuit (no scan path,
// n_sc = 0) with the dimensions of the ISCAS'85 circuit c880: 60 primary
// inputs and 26 primary outputs. The behavioural circuit of cut_model has
// those sizes but not c880's logic.
//  - weighted test: 660 patterns in 4 sets of 165; the c880 weights are not
//    published with the pattern count, so random codes 1..7 stand in;
//  - unweighted test: 37000 patterns, one set, every code 4 (weight 1/2).
// Checks: signatures against the bit-level reference (tc_ref_pkg), test
// durations of 1 + P*(S+1) + S cycles with S = 60, an injected fault
// detected by the weighted test, and the scan input of the signature
// register never used.
module tb_testchip_c880;
  import tc_pkg::*;
  import tc_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [11:0] bus_addr;
  logic [7:0] bus_wdata, bus_rdata;
  logic bus_we, bus_re;
  logic test_end, cut_sdi, cut_sdo, cut_clk, cut_test_mode;
  logic [126:0] cut_pi, cut_po;
  int n_pi = 60, n_po = 26, n_sc = 0;
  bit fault = 0;
  int checks = 0, failures = 0;
  int n_sdo_steps = 0;

  always #5 clk = ~clk;

  testchip dut (.clk, .rst_n, .bus_addr, .bus_wdata, .bus_we, .bus_re, .bus_rdata,
    .test_end, .cut_sdi, .cut_sdo, .cut_pi, .cut_po, .cut_clk, .cut_test_mode);

  cut_model cut (.cut_clk, .test_mode(cut_test_mode), .sdi(cut_sdi), .pi(cut_pi),
    .po(cut_po), .sdo(cut_sdo), .n_pi, .n_po, .n_sc, .fault);

  always @(posedge clk) if (dut.sig_step && dut.sig_en_sdo) n_sdo_steps++;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic wr(logic [11:0] a, logic [7:0] d);
    bus_addr = a; bus_wdata = d; bus_we = 1; @(negedge clk); bus_we = 0;
  endtask

  task automatic rd(logic [11:0] a, output logic [7:0] d);
    bus_addr = a; bus_re = 1; @(negedge clk); bus_re = 0; d = bus_rdata;
  endtask

  task automatic load_test(cfg_t c, w1_t w1);
    wr(A_NPI, {1'b0, c.n_pi}); wr(A_NPO, {1'b0, c.n_po});
    wr(A_NSC_LO, c.n_sc[7:0]); wr(A_NSC_HI, {7'b0, c.n_sc[8]});
    wr(A_LASTSET, {6'b0, c.last_set});
    for (int s = 0; s < 4; s++)
      for (int b = 0; b < 3; b++) wr(A_LEN_BASE + 12'(4 * s + b), 8'(c.test_len[s] >> (8 * b)));
    for (int b = 0; b < 4; b++) begin
      wr(A_SEED1 + 12'(b), c.seed1[8*b +: 8]);
      wr(A_SEED2 + 12'(b), c.seed2[8*b +: 8]);
    end
    for (int s = 0; s <= int'(c.last_set); s++)
      for (int p = 0; p < int'(c.n_pi); p++) wr(A_RAM1 + 12'(128 * s + p), {5'b0, w1[s][p]});
  endtask

  task automatic run_test(string name, cfg_t c, w1_t w1, w2_t w2, bit flt, output logic [31:0] sig);
    logic [7:0] d;
    longint np, nc, cyc;
    logic [31:0] exp_sig;
    fault = flt;
    exp_sig = ref_signature(c, w1, w2, flt, np, nc);
    wr(A_CTRL, 8'h01);
    cyc = 1;
    while (!test_end) begin @(negedge clk); cyc++; end
    for (int b = 0; b < 4; b++) begin rd(A_SIG + 12'(b), d); sig[8*b +: 8] = d; end
    check("signature", sig == exp_sig);
    check("duration", cyc == nc + 2 && nc == 1 + np * 61 + 60);
    $display("%s: %0d patterns, %0d cycles, fault=%0d, signature %08h, expected %08h",
             name, np, nc, flt, sig, exp_sig);
  endtask

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_t c;
    w1_t w1;
    w2_t w2;
    logic [31:0] sig_good, sig_bad, sig_u;
    bus_addr = '0; bus_wdata = '0; bus_we = 0; bus_re = 0;
    for (int s = 0; s < 4; s++) begin
      for (int p = 0; p < 128; p++) w1[s][p] = wcode_t'($urandom_range(1, 7));
      for (int p = 0; p < 512; p++) w2[s][p] = 3'd4;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // weighted: 660 patterns, 4 sets
    c = '0; c.n_pi = 60; c.n_po = 26; c.n_sc = 0; c.last_set = 3;
    for (int s = 0; s < 4; s++) c.test_len[s] = 165;
    c.seed1 = 32'h0BAD_F00D; c.seed2 = 32'h1;
    load_test(c, w1);
    run_test("c880 weighted", c, w1, w2, 0, sig_good);
    run_test("c880 weighted", c, w1, w2, 1, sig_bad);
    check("fault detected", sig_good != sig_bad);
    // unweighted: 37000 patterns, all weights 1/2
    for (int p = 0; p < 128; p++) w1[0][p] = 3'd4;
    c.last_set = 0; c.test_len[0] = 37000;
    load_test(c, w1);
    run_test("c880 unweighted", c, w1, w2, 0, sig_u);
    check("no scan-path samples", n_sdo_steps == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
