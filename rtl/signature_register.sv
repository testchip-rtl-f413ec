// signature_register: 2-input 32-bit signature register (MISR).
//
// A modular LFSR with a primitive degree-32 feedback polynomial, whose two
// lowest stages also take the response bits: in_a (from the PI/PO shift
// register) is XORed into stage 0 and in_b (scan data out of the circuit
// under test) into stage 1. Each `step` compresses one bit of each input.
// The control unit forces an input to 0 while it carries no response.
//
// Two inputs, degree 32 and a primitive polynomial follow the
// specification (aliasing probability 2^-32 for long tests); the polynomial
// and the stages the inputs enter are choices of this implementation.
//
// Timing: `clear` (priority) zeroes the register, `step` updates it, both at
// the rising clock edge; sig is the register output.
module signature_register
  import tc_pkg::*;
#(
  parameter logic [31:0] POLY = SIG_POLY
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        step,
  input  logic        in_a,
  input  logic        in_b,
  output logic [31:0] sig
);

  logic [31:0] sig_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      sig_q <= '0;
    else if (clear)
      sig_q <= '0;
    else if (step)
      sig_q <= ({sig_q[30:0], 1'b0} ^ (sig_q[31] ? POLY : 32'h0)) ^ {30'b0, in_b, in_a};
  end

  assign sig = sig_q;

endmodule
