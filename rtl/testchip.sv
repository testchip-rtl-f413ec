// testchip: weighted random pattern test controller for scan-path circuits.
//
// The chip sits between a micro computer and a circuit under test (CUT)
// with a scan path. Pattern generator 2 feeds the scan path serially (SDI),
// pattern generator 1 fills the internal shift register that drives the
// primary inputs (PIs) in parallel; both draw a 3-bit weight code per
// position from their own weight RAM, for the active one of up to 4 sets of
// weights. After each pattern the CUT is clocked once in normal mode: its
// scan path captures the response and the shift register loads the primary
// outputs (POs). While the next pattern is shifted in, both responses are
// compressed by the 2-input signature register. The control unit runs the
// programmed number of patterns for each set and signals the test end; the
// micro computer then reads the signature.
//
// Interface: a synchronous 8-bit bus (see bus_interface and the register
// map in tc_pkg), test_end, and the CUT port: cut_sdi, cut_sdo, cut_pi,
// cut_po, cut_clk (the system clock, gated: one pulse per shifted bit and
// one per capture) and
// cut_test_mode (1 = scan/test mode, 0 = normal mode). PI i is cut_pi[i]
// and PO i is cut_po[i]; unused positions are don't-care.
//
// The block structure, the sizes and the test procedure follow the
// specification; the bus protocol, the gated CUT clock and the
// polynomials are choices of this implementation.
module testchip
  import tc_pkg::*;
#(
  parameter int unsigned SR_LEN = SR_W       // PI / PO shift register length
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [11:0]       bus_addr,
  input  logic [7:0]        bus_wdata,
  input  logic              bus_we,
  input  logic              bus_re,
  output logic [7:0]        bus_rdata,
  output logic              test_end,
  output logic              cut_sdi,
  input  logic              cut_sdo,
  output logic [SR_LEN-1:0] cut_pi,
  input  logic [SR_LEN-1:0] cut_po,
  output logic              cut_clk,
  output logic              cut_test_mode
);

  cfg_t             cfg;
  logic             start, busy, done;
  logic [1:0]       cur_set;
  logic [POS_W-1:0] pos;
  logic             pg_load, pg_step, sr_shift, sr_load, cut_clk_en;
  logic             sig_clear, sig_step, sig_en_sr, sig_en_sdo;
  logic [31:0]      sig;
  logic             ram1_we, ram2_we;
  logic [8:0]       ram1_waddr;
  logic [10:0]      ram2_waddr;
  wcode_t           ram_wdata, code1, code2;
  logic             bit1, bit2, sr_so;

  bus_interface u_bus (
    .clk, .rst_n, .bus_addr, .bus_wdata, .bus_we, .bus_re, .bus_rdata,
    .cfg, .start, .busy, .done, .cur_set, .sig,
    .ram1_we, .ram1_addr(ram1_waddr), .ram2_we, .ram2_addr(ram2_waddr), .ram_wdata
  );

  control_unit u_ctrl (
    .clk, .rst_n, .cfg, .start, .busy, .done, .cur_set, .pos,
    .pg_load, .pg_step, .sr_shift, .sr_load, .sig_clear, .sig_step,
    .sig_en_sr, .sig_en_sdo, .cut_clk_en, .cut_test_mode
  );

  clock_gate u_cg (.clk, .en(cut_clk_en), .gclk(cut_clk));

  // pattern generator 1: primary inputs
  weight_ram #(.DEPTH(128)) u_ram1 (
    .clk, .we(ram1_we), .waddr(ram1_waddr), .wdata(ram_wdata),
    .raddr({cur_set, pos[6:0]}), .rdata(code1)
  );

  pattern_gen #(.POLY(PG1_POLY)) u_pg1 (
    .clk, .rst_n, .load(pg_load), .seed(cfg.seed1), .step(pg_step),
    .code(code1), .bit_o(bit1), .state_o()
  );

  // pattern generator 2: scan path
  weight_ram #(.DEPTH(512)) u_ram2 (
    .clk, .we(ram2_we), .waddr(ram2_waddr), .wdata(ram_wdata),
    .raddr({cur_set, pos[8:0]}), .rdata(code2)
  );

  pattern_gen #(.POLY(PG2_POLY)) u_pg2 (
    .clk, .rst_n, .load(pg_load), .seed(cfg.seed2), .step(pg_step),
    .code(code2), .bit_o(bit2), .state_o()
  );

  shift_register #(.W(SR_LEN)) u_sr (
    .clk, .rst_n, .shift(sr_shift), .si(bit1), .load(sr_load), .pin(cut_po),
    .tap_sel(cfg.n_po - 1'b1), .so(sr_so), .q(cut_pi)
  );

  signature_register #(.POLY(SIG_POLY)) u_sig (
    .clk, .rst_n, .clear(sig_clear), .step(sig_step),
    .in_a(sr_so & sig_en_sr), .in_b(cut_sdo & sig_en_sdo), .sig
  );

  assign cut_sdi  = bit2;
  // test_end drops as soon as a new start has been written
  assign test_end = done && !start;

endmodule
