// cut_model: behavioural circuit under test with a scan path, for the
// system testbenches. On a rising edge of cut_clk it shifts its scan path
// (SDI into element 0, SDO from element n_sc-1) in test mode, or loads the
// next state of its logic (cut_pkg) in normal mode; with n_sc = 0 it is
// combinational and SDO is 0. Primary outputs are
// combinational from the primary inputs and the scan-path state.
module cut_model (
  input  logic         cut_clk,
  input  logic         test_mode,
  input  logic         sdi,
  input  logic [126:0] pi,
  output logic [126:0] po,
  output logic         sdo,
  input  int           n_pi,
  input  int           n_po,
  input  int           n_sc,
  input  bit           fault
);
  import cut_pkg::*;

  logic [SC_W-1:0] st = '0;

  always @(posedge cut_clk) begin
    if (test_mode)
      st <= {st[SC_W-2:0], sdi};
    else
      st <= cut_next_state(pi, st, n_pi, n_sc);
  end

  assign po  = cut_outputs(pi, st, n_pi, n_po, n_sc, fault);
  assign sdo = (n_sc == 0) ? 1'b0 : st[n_sc - 1];
endmodule
