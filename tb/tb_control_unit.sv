// tb_control_unit: self-checking test of the test sequencer.
//
// Runs several programmed tests and counts, per test, the control pulses
// against values computed from the configuration: S = max(n_pi, n_po, n_sc)
// bit periods per window, P = sum of the test lengths of the used sets,
// S*(P+1) shifts, P captures (each in normal mode), P*max(n_po, n_sc)
// signature steps of which P*n_po carry shift-register bits and P*n_sc
// scan-path bits, S*(P+1)+P enabled CUT clock cycles of which P in normal
// mode, and a total of 1 + P*(S+1) + S cycles from start to done. It also
// checks the position sequence S-1 .. 0 in every window, the active set at
// every capture, and that signature samples and PO loads happen in cycles
// in which the CUT is clocked, in test and in normal mode respectively.
module tb_control_unit;
  import tc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  cfg_t cfg;
  logic start, busy, done;
  logic [1:0] cur_set;
  logic [POS_W-1:0] pos;
  logic pg_load, pg_step, sr_shift, sr_load, sig_clear, sig_step, sig_en_sr, sig_en_sdo;
  logic cut_clk_en, cut_test_mode;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  control_unit dut (.clk, .rst_n, .cfg, .start, .busy, .done, .cur_set, .pos,
    .pg_load, .pg_step, .sr_shift, .sr_load, .sig_clear, .sig_step, .sig_en_sr,
    .sig_en_sdo, .cut_clk_en, .cut_test_mode);

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int set_switches = 0;

  task automatic run(int npi, int npo, int nsc, int last, int l0, int l1, int l2, int l3);
    int S, P, M, cycles, shifts, loads, steps, steps_sr, steps_sdo, rises, cap_rises, loads_set_ok;
    int exp_pos, lens[4], seq_set, seq_cnt;
    cfg = '0;
    cfg.n_pi = 7'(npi); cfg.n_po = 7'(npo); cfg.n_sc = 9'(nsc); cfg.last_set = 2'(last);
    lens = '{l0, l1, l2, l3};
    for (int s = 0; s < 4; s++) cfg.test_len[s] = LEN_W'(lens[s]);
    S = npi; if (npo > S) S = npo; if (nsc > S) S = nsc;
    M = (npo > nsc) ? npo : nsc;
    P = 0; for (int s = 0; s <= last; s++) P += lens[s];
    cycles = 0; shifts = 0; loads = 0; steps = 0; steps_sr = 0; steps_sdo = 0;
    rises = 0; cap_rises = 0; loads_set_ok = 0;
    exp_pos = S - 1; seq_set = 0; seq_cnt = 0;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    check("busy after start", busy);
    while (!done) begin
      cycles++;
      if (sr_shift) begin
        shifts++;
        check("pos sequence", int'(pos) == exp_pos);
        exp_pos = (exp_pos == 0) ? S - 1 : exp_pos - 1;
      end
      if (sr_load) begin
        loads++;
        check("capture in normal mode", !cut_test_mode && cut_clk_en);
        if (int'(cur_set) == seq_set) loads_set_ok++;
        seq_cnt++;
        if (seq_cnt == lens[seq_set]) begin seq_cnt = 0; seq_set++; end
      end
      if (sig_step) begin
        steps++;
        if (sig_en_sr) steps_sr++;
        if (sig_en_sdo) steps_sdo++;
        check("sample while CUT shifts", cut_clk_en && cut_test_mode);
      end
      if (cut_clk_en) begin
        rises++;
        if (!cut_test_mode) cap_rises++;
      end
      @(negedge clk);
      if (cycles > 10_000_000) break;
    end
    set_switches += last;
    check("cycle count", cycles == 1 + P * (S + 1) + S);
    check("shift count", shifts == S * (P + 1));
    check("capture count", loads == P);
    check("set at captures", loads_set_ok == P);
    check("signature steps", steps == P * M);
    check("shift-register bits", steps_sr == P * npo);
    check("scan bits", steps_sdo == P * nsc);
    check("CUT clock pulses", rises == S * (P + 1) + P);
    check("normal-mode pulses", cap_rises == P);
    check("idle after done", !busy && done);
    $display("run S=%0d P=%0d cycles=%0d (expected %0d)", S, P, cycles, 1 + P * (S + 1) + S);
  endtask

  initial begin
    start = 0; cfg = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check("idle", !busy && !done && cut_test_mode && !cut_clk_en);
    run(3, 5, 4, 2, 3, 1, 2, 9);      // S from n_po, 3 sets
    run(14, 14, 18, 3, 3, 5, 5, 2);   // s1196 sizes, 4 sets
    run(9, 2, 1, 0, 4, 1, 1, 1);      // S from n_pi, 1 set
    run(127, 127, 511, 1, 1, 2, 1, 1);// largest sizes
    run(6, 4, 0, 1, 2, 3, 1, 1);      // no scan path
    check("sets switched", set_switches == 7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
