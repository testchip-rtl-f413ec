// cut_pkg: logic function of the behavioural circuit under test used by the
// system testbenches. It stands in for a real scan-path circuit (its
// netlist is not available): a fixed, arbitrary mix of XOR, AND and OR
// terms over the primary inputs and the scan-path state, sized at run time
// by n_pi, n_po and n_sc; n_sc = 0 makes it purely combinational. `fault`
// injects a stuck-at-0 fault on the AND term of primary output 0.
package cut_pkg;

  localparam int PI_W = 127;
  localparam int SC_W = 511;

  // state bit idx modulo the scan length, 0 without scan path; without scan
  // path the AND term of each output takes a second primary input instead
  function automatic logic sbit(logic [SC_W-1:0] st, int idx, int nsc);
    return (nsc == 0) ? 1'b0 : st[idx % nsc];
  endfunction

  function automatic logic [PI_W-1:0] cut_outputs(logic [PI_W-1:0] pi, logic [SC_W-1:0] st,
                                                  int npi, int npo, int nsc, bit fault);
    logic [PI_W-1:0] po = '0;
    for (int i = 0; i < npo; i++) begin
      logic and_t;
      and_t = pi[(i + 3) % npi] & ((nsc == 0) ? pi[(i + 7) % npi] : st[i % nsc]);
      if (fault && i == 0) and_t = 1'b0;
      po[i] = pi[i % npi] ^ and_t ^ (sbit(st, i + 5, nsc) | pi[(2 * i + 1) % npi]);
    end
    return po;
  endfunction

  function automatic logic [SC_W-1:0] cut_next_state(logic [PI_W-1:0] pi, logic [SC_W-1:0] st,
                                                     int npi, int nsc);
    logic [SC_W-1:0] nx = '0;
    for (int k = 0; k < nsc; k++)
      nx[k] = st[(k + 1) % nsc] ^ (pi[k % npi] & pi[(k + 2) % npi]) ^ (st[k] & ~pi[(k + 1) % npi]);
    return nx;
  endfunction

endpackage
