// shift_register: the PI/PO shift register between pattern generator 1, the
// primary inputs and outputs of the circuit under test, and the signature
// register.
//
// Bits from pattern generator 1 enter serially at stage 0 and move towards
// stage W-1; after n shifts the last n generated bits sit in stages n-1..0
// and drive the primary inputs in parallel (q). On the capture clock the
// primary outputs are loaded in parallel (pin -> stage i = PO i). While the
// next pattern is shifted in, the response leaves serially from stage
// tap_sel (= number of POs - 1), so PO n_po-1 comes out first.
//
// Serial in, parallel out to the PIs, parallel load from the POs and serial
// out to the signature register follow the specification; the shift
// direction, the variable output tap and the priority of load over shift
// are choices of this implementation.
//
// Timing: one action per rising clock edge; `load` has priority over
// `shift`. so is combinational from the stored bits.
module shift_register #(
  parameter int unsigned W  = 127,
  localparam int unsigned TW = $clog2(W)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          shift,
  input  logic          si,
  input  logic          load,
  input  logic [W-1:0]  pin,
  input  logic [TW-1:0] tap_sel,
  output logic          so,
  output logic [W-1:0]  q
);

  logic [W-1:0] sr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      sr_q <= '0;
    else if (load)
      sr_q <= pin;
    else if (shift)
      sr_q <= {sr_q[W-2:0], si};
  end

  assign so = (int'(tap_sel) < W) ? sr_q[tap_sel] : 1'b0;
  assign q  = sr_q;

endmodule
