// tb_testchip_s1196: one complete test at full size and default parameters,
// with the configuration of the ISCAS'89 circuit s1196: 14 primary inputs,
// 14 primary outputs, 18 scan path elements, four sets of weights with
// 30145, 49073, 49073 and 25313 patterns (153604 in all). The weight codes
// below are those computed for s1196 (units of 1/8); list element i is PI i
// or scan element i counted from SDI. The s1196 netlist itself is not used:
// the behavioural circuit of cut_model has the same numbers of inputs,
// outputs and scan elements.
//
// The test is run once with the fault-free circuit and once with an
// injected fault. Checks: both signatures equal the bit-level reference
// (tc_ref_pkg), the fault changes the signature, the test takes
// 1 + 153604*19 + 18 cycles, and 153604 captures and 3 set switches occur.
module tb_testchip_s1196;
  import tc_pkg::*;
  import tc_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [11:0] bus_addr;
  logic [7:0] bus_wdata, bus_rdata;
  logic bus_we, bus_re;
  logic test_end, cut_sdi, cut_sdo, cut_clk, cut_test_mode;
  logic [126:0] cut_pi, cut_po;
  int n_pi = 14, n_po = 14, n_sc = 18;
  bit fault = 0;
  int checks = 0, failures = 0;

  always #25 clk = ~clk;   // 20 MHz

  testchip dut (.clk, .rst_n, .bus_addr, .bus_wdata, .bus_we, .bus_re, .bus_rdata,
    .test_end, .cut_sdi, .cut_sdo, .cut_pi, .cut_po, .cut_clk, .cut_test_mode);

  cut_model cut (.cut_clk, .test_mode(cut_test_mode), .sdi(cut_sdi), .pi(cut_pi),
    .po(cut_po), .sdo(cut_sdo), .n_pi, .n_po, .n_sc, .fault);

  int n_capture = 0, n_set_switch = 0;
  logic [1:0] prev_set = 0;
  always @(posedge cut_clk) if (!cut_test_mode) n_capture++;
  always @(posedge clk) begin
    prev_set <= dut.cur_set;
    if (dut.busy && dut.cur_set != prev_set && dut.cur_set != 0) n_set_switch++;
  end

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

  localparam int LEN [4] = '{30145, 49073, 49073, 25313};
  localparam int WPI [4][14] = '{
    '{4,7,6,6,2,3,5,4,6,5,4,7,4,2},
    '{7,5,6,7,4,1,7,7,7,1,2,2,1,1},
    '{3,7,7,7,1,4,7,7,7,7,2,6,6,2},
    '{3,6,7,7,3,3,6,4,2,5,3,7,4,2}};
  localparam int WSC [4][18] = '{
    '{7,1,3,1,7,1,7,7,7,7,1,7,1,1,7,7,1,4},
    '{1,1,1,7,7,1,7,7,7,7,1,1,1,1,7,7,1,4},
    '{1,1,1,1,7,1,7,1,1,1,1,1,1,1,7,1,1,7},
    '{1,7,7,1,7,1,7,7,7,4,1,1,1,1,7,1,1,6}};

  initial begin
    #400_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_t c;
    w1_t w1;
    w2_t w2;
    logic [7:0] d;
    logic [31:0] sig [2];
    logic [31:0] exp_sig;
    longint np, nc, cyc;
    bus_addr = '0; bus_wdata = '0; bus_we = 0; bus_re = 0;
    c = '0;
    c.n_pi = 14; c.n_po = 14; c.n_sc = 18; c.last_set = 3;
    for (int s = 0; s < 4; s++) c.test_len[s] = LEN_W'(LEN[s]);
    c.seed1 = 32'h2468_ACE1; c.seed2 = 32'h1357_9BDF;
    for (int s = 0; s < 4; s++) begin
      for (int p = 0; p < 128; p++) w1[s][p] = (p < 14) ? wcode_t'(WPI[s][p]) : 3'd0;
      for (int p = 0; p < 512; p++) w2[s][p] = (p < 18) ? wcode_t'(WSC[s][p]) : 3'd0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // load the parameter registers and the RAMs
    wr(A_NPI, 8'd14); wr(A_NPO, 8'd14); wr(A_NSC_LO, 8'd18); wr(A_NSC_HI, 8'd0);
    wr(A_LASTSET, 8'd3);
    for (int s = 0; s < 4; s++)
      for (int b = 0; b < 3; b++) wr(A_LEN_BASE + 12'(4 * s + b), 8'(LEN[s] >> (8 * b)));
    for (int b = 0; b < 4; b++) begin
      wr(A_SEED1 + 12'(b), c.seed1[8*b +: 8]);
      wr(A_SEED2 + 12'(b), c.seed2[8*b +: 8]);
    end
    for (int s = 0; s < 4; s++) begin
      for (int p = 0; p < 14; p++) wr(A_RAM1 + 12'(128 * s + p), 8'(WPI[s][p]));
      for (int p = 0; p < 18; p++) wr(A_RAM2 + 12'(512 * s + p), 8'(WSC[s][p]));
    end
    for (int run = 0; run < 2; run++) begin
      fault = (run == 1);
      n_capture = 0; n_set_switch = 0;
      exp_sig = ref_signature(c, w1, w2, fault, np, nc);
      wr(A_CTRL, 8'h01);
      cyc = 1;
      while (!test_end) begin @(negedge clk); cyc++; end
      for (int b = 0; b < 4; b++) begin rd(A_SIG + 12'(b), d); sig[run][8*b +: 8] = d; end
      $display("s1196 run %0d (fault=%0d): %0d patterns, %0d cycles = %0.3f s at 20 MHz, signature %08h, expected %08h",
               run, fault, np, cyc - 2, real'(cyc - 2) / 2.0e7, sig[run], exp_sig);
      check("signature", sig[run] == exp_sig);
      check("patterns", np == 153604);
      check("duration", cyc == nc + 2 && nc == 1 + 153604 * 19 + 18);
      check("captures", n_capture == 153604);
      check("set switches", n_set_switch == 3);
    end
    check("fault detected", sig[0] != sig[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
