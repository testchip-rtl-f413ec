// tc_pkg: types, constants and the register map shared by the weighted
// random pattern test controller.
//
// Sizes follow the chip's specification: up to 127 primary inputs, 127
// primary outputs, 511 scan path elements, 4 sets of weights and test
// lengths from 1 to 10^6 patterns per set. The feedback polynomials, the
// LFSR tap positions, the weight-code encoding and the register map are
// choices of this implementation (the specification only requires
// primitive degree-32 polynomials and weights 1/8 .. 7/8).
package tc_pkg;

  // ---- sizes -------------------------------------------------------------
  localparam int unsigned SR_W    = 127;      // PI / PO shift register length
  localparam int unsigned SC_MAX  = 511;      // longest scan path
  localparam int unsigned SETS    = 4;        // sets of weights
  localparam int unsigned LEN_W   = 20;       // test length counter (10^6 < 2^20)
  localparam int unsigned LEN_MAX = 1_000_000;
  localparam int unsigned POS_W   = 9;        // position counter, 0 .. 510

  // ---- polynomials (x^32 implicit, bit i = coefficient of x^i) -----------
  // All three are primitive of degree 32.
  localparam logic [31:0] PG1_POLY = 32'h04C1_1DB7;
  localparam logic [31:0] PG2_POLY = 32'h6164_99C9;
  localparam logic [31:0] SIG_POLY = 32'h0040_0007; // x^32+x^22+x^2+x+1

  // ---- weight codes --------------------------------------------------------
  // Code k (1..7) selects probability k/8 of a logic 1; code 0 gives a
  // constant 0.
  typedef logic [2:0] wcode_t;

  // Weighted bit from three (practically independent) LFSR bits a, b, c.
  function automatic logic weight_bit(wcode_t code, logic a, logic b, logic c);
    unique case (code)
      3'd0: return 1'b0;
      3'd1: return a & b & c;
      3'd2: return a & b;
      3'd3: return a & (b | c);
      3'd4: return a;
      3'd5: return a | (b & c);
      3'd6: return a | b;
      default: return a | b | c;
    endcase
  endfunction

  // ---- programmed parameters -------------------------------------------------
  typedef struct packed {
    logic [6:0]              n_pi;      // number of primary inputs, 1..127
    logic [6:0]              n_po;      // number of primary outputs, 1..127
    logic [8:0]              n_sc;      // scan path length, 0..511 (0: no scan path)
    logic [1:0]              last_set;  // number of sets used minus 1
    logic [SETS-1:0][LEN_W-1:0] test_len; // patterns per set, 1..10^6
    logic [31:0]             seed1;     // start state of pattern generator 1
    logic [31:0]             seed2;     // start state of pattern generator 2
  } cfg_t;

  // ---- register map (8-bit data, 12-bit byte address) ------------------------
  localparam logic [11:0] A_CTRL     = 12'h000; // W: bit0 start. R: status
  localparam logic [11:0] A_NPI      = 12'h001;
  localparam logic [11:0] A_NPO      = 12'h002;
  localparam logic [11:0] A_NSC_LO   = 12'h003;
  localparam logic [11:0] A_NSC_HI   = 12'h004; // bit 0 = n_sc[8]
  localparam logic [11:0] A_LASTSET  = 12'h005;
  localparam logic [11:0] A_LEN_BASE = 12'h010; // + 4*set + byte (0..2)
  localparam logic [11:0] A_SEED1    = 12'h020; // + byte (0..3), little endian
  localparam logic [11:0] A_SEED2    = 12'h024;
  localparam logic [11:0] A_SIG      = 12'h028; // read only, + byte (0..3)
  localparam logic [11:0] A_RAM1     = 12'h400; // 0x400..0x5FF: {set[1:0], pos[6:0]}
  localparam logic [11:0] A_RAM2     = 12'h800; // 0x800..0xFFF: {set[1:0], pos[8:0]}

  // status register bits
  localparam int unsigned ST_BUSY = 0;
  localparam int unsigned ST_DONE = 1;
  localparam int unsigned ST_SET0 = 2; // bits 3:2 = active set

endpackage
