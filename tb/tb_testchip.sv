// tb_testchip: end-to-end test of the controller with a behavioural
// scan-path circuit (cut_model), driven through the micro computer bus the
// way a host program would use it: write the sizes, test lengths, seeds and
// weight codes, start, poll the status, wait for test_end and read the
// 32-bit signature. Each signature is compared with the bit-level reference
// (tc_ref_pkg) and the test duration with 1 + P*(S+1) + S cycles.
//
// Runs cover: S set by the POs (shift-register-only compression steps), by
// the scan path (scan-only steps) and by the PIs; 1 to 4 sets of weights
// (set switching); all eight weight codes; a zero seed; a fault in the
// circuit (the signature must differ); parameter writes ignored while
// busy; a second test started right after the first. Each mechanism is
// counted and one that never happens counts as a failure.
module tb_testchip;
  import tc_pkg::*;
  import tc_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [11:0] bus_addr;
  logic [7:0] bus_wdata, bus_rdata;
  logic bus_we, bus_re;
  logic test_end, cut_sdi, cut_sdo, cut_clk, cut_test_mode;
  logic [126:0] cut_pi, cut_po;
  int n_pi = 1, n_po = 1, n_sc = 1;
  bit fault = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  testchip dut (.clk, .rst_n, .bus_addr, .bus_wdata, .bus_we, .bus_re, .bus_rdata,
    .test_end, .cut_sdi, .cut_sdo, .cut_pi, .cut_po, .cut_clk, .cut_test_mode);

  cut_model cut (.cut_clk, .test_mode(cut_test_mode), .sdi(cut_sdi), .pi(cut_pi),
    .po(cut_po), .sdo(cut_sdo), .n_pi, .n_po, .n_sc, .fault);

  // ---- mechanism counters ---------------------------------------------------
  int n_capture = 0, n_set_switch = 0, n_sr_only = 0, n_sdo_only = 0, n_both = 0;
  int n_busy_write = 0, n_fault_detected = 0, n_zero_seed = 0, n_back_to_back = 0;
  int code_used [8];
  logic [1:0] prev_set = 0;
  always @(posedge cut_clk) if (!cut_test_mode) n_capture++;
  always @(posedge clk) begin
    prev_set <= dut.cur_set;
    if (dut.busy && dut.cur_set != prev_set) n_set_switch++;
    if (dut.sig_step) begin
      if (dut.sig_en_sr && !dut.sig_en_sdo) n_sr_only++;
      if (!dut.sig_en_sr && dut.sig_en_sdo) n_sdo_only++;
      if (dut.sig_en_sr && dut.sig_en_sdo) n_both++;
    end
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic wr(logic [11:0] a, logic [7:0] d);
    bus_addr = a; bus_wdata = d; bus_we = 1; @(negedge clk); bus_we = 0;
  endtask

  task automatic rd(logic [11:0] a, output logic [7:0] d);
    bus_addr = a; bus_re = 1; @(negedge clk); bus_re = 0; d = bus_rdata;
  endtask

  task automatic load_test(cfg_t c, w1_t w1, w2_t w2);
    wr(A_NPI, {1'b0, c.n_pi}); wr(A_NPO, {1'b0, c.n_po});
    wr(A_NSC_LO, c.n_sc[7:0]); wr(A_NSC_HI, {7'b0, c.n_sc[8]});
    wr(A_LASTSET, {6'b0, c.last_set});
    for (int s = 0; s < 4; s++)
      for (int b = 0; b < 3; b++) wr(A_LEN_BASE + 12'(4 * s + b), 8'(c.test_len[s] >> (8 * b)));
    for (int b = 0; b < 4; b++) begin
      wr(A_SEED1 + 12'(b), c.seed1[8*b +: 8]);
      wr(A_SEED2 + 12'(b), c.seed2[8*b +: 8]);
    end
    for (int s = 0; s <= int'(c.last_set); s++) begin
      for (int p = 0; p < int'(c.n_pi); p++) begin
        wr(A_RAM1 + 12'(128 * s + p), {5'b0, w1[s][p]});
        code_used[w1[s][p]]++;
      end
      for (int p = 0; p < int'(c.n_sc); p++) begin
        wr(A_RAM2 + 12'(512 * s + p), {5'b0, w2[s][p]});
        code_used[w2[s][p]]++;
      end
    end
  endtask

  // runs one test, returns the signature read over the bus
  task automatic run_test(cfg_t c, w1_t w1, w2_t w2, bit flt, output logic [31:0] sig);
    logic [7:0] d;
    longint np, nc, cyc;
    logic [31:0] exp_sig;
    n_pi = int'(c.n_pi); n_po = int'(c.n_po); n_sc = int'(c.n_sc); fault = flt;
    exp_sig = ref_signature(c, w1, w2, flt, np, nc);
    wr(A_CTRL, 8'h01);
    cyc = 1;
    // status while running, and a parameter write that must be ignored
    rd(A_CTRL, d); cyc++;
    check("busy while running", d[ST_BUSY] && !d[ST_DONE]);
    wr(A_NPI, 8'd77); cyc++;
    rd(A_NPI, d); cyc++;
    check("parameter write ignored while busy", d == {1'b0, c.n_pi});
    if (d == {1'b0, c.n_pi}) n_busy_write++;
    while (!test_end) begin @(negedge clk); cyc++; end
    check("test duration", cyc == nc + 2);
    rd(A_CTRL, d);
    check("done status", d[ST_DONE] && !d[ST_BUSY] && d[3:2] == c.last_set);
    for (int b = 0; b < 4; b++) begin rd(A_SIG + 12'(b), d); sig[8*b +: 8] = d; end
    check("signature", sig == exp_sig);
    $display("test: pi=%0d po=%0d sc=%0d sets=%0d patterns=%0d cycles=%0d fault=%0d signature=%08h expected=%08h",
             c.n_pi, c.n_po, c.n_sc, c.last_set + 1, np, nc, flt, sig, exp_sig);
  endtask

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_t c;
    w1_t w1;
    w2_t w2;
    logic [31:0] sig_good, sig_bad, sig2;
    bus_addr = '0; bus_wdata = '0; bus_we = 0; bus_re = 0;
    for (int k = 0; k < 8; k++) code_used[k] = 0;
    for (int s = 0; s < 4; s++) begin
      for (int p = 0; p < 128; p++) w1[s][p] = wcode_t'($urandom);
      for (int p = 0; p < 512; p++) w2[s][p] = wcode_t'($urandom);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // A: POs longest, 4 sets, good and faulty circuit
    c = '0; c.n_pi = 5; c.n_po = 9; c.n_sc = 6; c.last_set = 3;
    c.test_len[0] = 7; c.test_len[1] = 3; c.test_len[2] = 1; c.test_len[3] = 5;
    c.seed1 = 32'h1357_9BDF; c.seed2 = 32'h0F1E_2D3C;
    load_test(c, w1, w2);
    run_test(c, w1, w2, 0, sig_good);
    run_test(c, w1, w2, 0, sig2);
    n_back_to_back++;
    check("repeatable", sig2 == sig_good);
    run_test(c, w1, w2, 1, sig_bad);
    check("fault detected", sig_bad != sig_good);
    if (sig_bad != sig_good) n_fault_detected++;

    // B: scan path longest, 2 sets, zero seed for generator 1
    c = '0; c.n_pi = 12; c.n_po = 3; c.n_sc = 20; c.last_set = 1;
    c.test_len[0] = 10; c.test_len[1] = 6;
    c.seed1 = 32'h0; c.seed2 = 32'hCAFE_0001;
    load_test(c, w1, w2);
    run_test(c, w1, w2, 0, sig2);
    n_zero_seed++;

    // C: PIs longest, 1 set
    c = '0; c.n_pi = 16; c.n_po = 4; c.n_sc = 7; c.last_set = 0;
    c.test_len[0] = 12; c.seed1 = 32'h8000_0001; c.seed2 = 32'h7FFF_FFFE;
    load_test(c, w1, w2);
    run_test(c, w1, w2, 0, sig2);

    // D: largest sizes, 3 sets
    c = '0; c.n_pi = 127; c.n_po = 127; c.n_sc = 511; c.last_set = 2;
    c.test_len[0] = 2; c.test_len[1] = 1; c.test_len[2] = 2;
    c.seed1 = 32'hA5A5_5A5A; c.seed2 = 32'h0000_0042;
    load_test(c, w1, w2);
    run_test(c, w1, w2, 0, sig2);

    $display("mechanisms: captures=%0d set_switches=%0d sr_only_steps=%0d sdo_only_steps=%0d both_steps=%0d",
             n_capture, n_set_switch, n_sr_only, n_sdo_only, n_both);
    $display("            busy_writes_ignored=%0d faults_detected=%0d zero_seeds=%0d back_to_back=%0d",
             n_busy_write, n_fault_detected, n_zero_seed, n_back_to_back);
    check("mechanism capture", n_capture > 0);
    check("mechanism set switch", n_set_switch > 0);
    check("mechanism shift-register-only compression", n_sr_only > 0);
    check("mechanism scan-only compression", n_sdo_only > 0);
    check("mechanism two-input compression", n_both > 0);
    check("mechanism busy write", n_busy_write > 0);
    check("mechanism fault detection", n_fault_detected > 0);
    check("mechanism zero seed", n_zero_seed > 0);
    check("mechanism back-to-back tests", n_back_to_back > 0);
    for (int k = 0; k < 8; k++) check("weight code used", code_used[k] > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
