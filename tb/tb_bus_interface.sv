// tb_bus_interface: self-checking test of the micro computer interface.
//
// Writes every parameter register through the bus and checks both the read
// back value (one cycle after the read strobe) and the configuration the
// core receives; checks the start pulse, the status and signature reads,
// the weight RAM write strobes and addresses of both windows, and that
// parameter and RAM writes are ignored while a test runs.
module tb_bus_interface;
  import tc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [11:0] bus_addr;
  logic [7:0] bus_wdata, bus_rdata;
  logic bus_we, bus_re;
  cfg_t cfg;
  logic start, busy, done;
  logic [1:0] cur_set;
  logic [31:0] sig;
  logic ram1_we, ram2_we;
  logic [8:0] ram1_addr;
  logic [10:0] ram2_addr;
  wcode_t ram_wdata;
  int checks = 0, failures = 0;
  int starts = 0;

  always #5 clk = ~clk;
  always @(posedge clk) if (start) starts++;

  bus_interface dut (.clk, .rst_n, .bus_addr, .bus_wdata, .bus_we, .bus_re, .bus_rdata,
    .cfg, .start, .busy, .done, .cur_set, .sig, .ram1_we, .ram1_addr, .ram2_we,
    .ram2_addr, .ram_wdata);

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

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] d;
    logic [19:0] len [4];
    logic [31:0] s1, s2;
    bus_addr = '0; bus_wdata = '0; bus_we = 0; bus_re = 0;
    busy = 0; done = 0; cur_set = 0; sig = 32'h1234_5678;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check("reset sizes", cfg.n_pi == 1 && cfg.n_po == 1 && cfg.n_sc == 1 && cfg.test_len[2] == 1);
    wr(A_NPI, 8'd14); wr(A_NPO, 8'd13); wr(A_NSC_LO, 8'hFF); wr(A_NSC_HI, 8'h01); wr(A_LASTSET, 8'd3);
    for (int s = 0; s < 4; s++) begin
      len[s] = 20'($urandom_range(1, 1_000_000));
      for (int b = 0; b < 3; b++) wr(A_LEN_BASE + 12'(4 * s + b), len[s][8*b +: 8]);
    end
    s1 = $urandom; s2 = $urandom;
    for (int b = 0; b < 4; b++) begin wr(A_SEED1 + 12'(b), s1[8*b +: 8]); wr(A_SEED2 + 12'(b), s2[8*b +: 8]); end
    check("n_pi", cfg.n_pi == 14);
    check("n_po", cfg.n_po == 13);
    check("n_sc", cfg.n_sc == 511);
    check("last_set", cfg.last_set == 3);
    for (int s = 0; s < 4; s++) check("test_len", cfg.test_len[s] == len[s]);
    check("seeds", cfg.seed1 == s1 && cfg.seed2 == s2);
    rd(A_NPI, d); check("read n_pi", d == 14);
    rd(A_NPO, d); check("read n_po", d == 13);
    rd(A_NSC_LO, d); check("read n_sc lo", d == 8'hFF);
    rd(A_NSC_HI, d); check("read n_sc hi", d == 8'h01);
    rd(A_LASTSET, d); check("read last_set", d == 3);
    for (int s = 0; s < 4; s++)
      for (int b = 0; b < 3; b++) begin
        rd(A_LEN_BASE + 12'(4 * s + b), d);
        check("read test_len", d == ((b == 2) ? {4'b0, len[s][19:16]} : len[s][8*b +: 8]));
      end
    for (int b = 0; b < 4; b++) begin
      rd(A_SEED1 + 12'(b), d); check("read seed1", d == s1[8*b +: 8]);
      rd(A_SEED2 + 12'(b), d); check("read seed2", d == s2[8*b +: 8]);
      rd(A_SIG + 12'(b), d);   check("read signature", d == sig[8*b +: 8]);
    end
    // RAM windows
    bus_addr = A_RAM1 + 12'h1A5; bus_wdata = 8'h06; bus_we = 1; #1;
    check("ram1 write", ram1_we && !ram2_we && ram1_addr == 9'h1A5 && ram_wdata == 3'd6);
    @(negedge clk);
    bus_addr = A_RAM2 + 12'h5C3; bus_wdata = 8'h03; #1;
    check("ram2 write", ram2_we && !ram1_we && ram2_addr == 11'h5C3 && ram_wdata == 3'd3);
    @(negedge clk);
    bus_addr = 12'h0F0; #1;
    check("no ram write outside the windows", !ram1_we && !ram2_we);
    @(negedge clk); bus_we = 0;
    // start
    starts = 0;
    wr(A_CTRL, 8'h01);
    @(negedge clk);
    check("one start pulse", starts == 1);
    wr(A_CTRL, 8'h00);
    @(negedge clk);
    check("no start for bit0=0", starts == 1);
    // busy: writes ignored, status visible
    busy = 1; cur_set = 2;
    wr(A_NPI, 8'd99);
    check("write ignored while busy", cfg.n_pi == 14);
    bus_addr = A_RAM2; bus_wdata = 8'h1; bus_we = 1; #1;
    check("ram write ignored while busy", !ram2_we);
    @(negedge clk); bus_we = 0;
    wr(A_CTRL, 8'h01); @(negedge clk);
    check("no start while busy", starts == 1);
    rd(A_CTRL, d); check("status busy", d == 8'b0000_1001);
    busy = 0; done = 1; cur_set = 3;
    rd(A_CTRL, d); check("status done", d == 8'b0000_1110);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
