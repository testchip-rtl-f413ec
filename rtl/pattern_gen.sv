// pattern_gen: serial weighted pseudo-random pattern generator.
//
// A modular (internal-XOR, Galois) 32-bit LFSR with a primitive feedback
// polynomial POLY is tapped at three stages TAP_A, TAP_B and TAP_C. Several
// feedback connections of the polynomial lie between the taps, so the three
// bits are practically independent. Boolean functions of the three bits give
// the weights 1/8 .. 7/8 (tc_pkg::weight_bit) and the 3-bit weight code,
// read from the weight RAM for the current pattern position, selects one of
// them. One weighted bit is produced per step.
//
// The LFSR structure, the weights and the code-controlled multiplexer follow
// the specification; the polynomials, tap stages and seed load are choices
// of this implementation.
//
// Timing: bit_o is combinational from the present LFSR state and code.
// `load` (priority) copies `seed` into the LFSR, `step` advances it one
// position at the rising clock edge. A zero seed is replaced by 1, since the
// all-zero state would lock the LFSR.
module pattern_gen
  import tc_pkg::*;
#(
  parameter logic [31:0] POLY  = PG1_POLY,
  parameter int unsigned TAP_A = 31,
  parameter int unsigned TAP_B = 20,
  parameter int unsigned TAP_C = 9
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  logic [31:0] seed,
  input  logic        step,
  input  wcode_t      code,
  output logic        bit_o,
  output logic [31:0] state_o
);

  logic [31:0] lfsr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      lfsr_q <= 32'h1;
    else if (load)
      lfsr_q <= (seed == '0) ? 32'h1 : seed;
    else if (step)
      lfsr_q <= {lfsr_q[30:0], 1'b0} ^ (lfsr_q[31] ? POLY : 32'h0);
  end

  assign bit_o   = weight_bit(code, lfsr_q[TAP_A], lfsr_q[TAP_B], lfsr_q[TAP_C]);
  assign state_o = lfsr_q;

endmodule
