// tc_ref_pkg: reference model of a complete test for the system
// testbenches. It computes, at the level of bits and patterns rather than
// clock cycles, the signature a fault-free controller must produce:
//  - each generator is a polynomial LFSR stepped once per shifted bit; the
//    weighted bit for code k is 1 when the 3-bit number formed by stages
//    31, 20 and 9 is at least 8-k;
//  - every pattern is S = max(n_pi, n_po, n_sc) bits long; the bit generated
//    in step j lands at position S-1-j and takes that position's code;
//  - the response of pattern t (n_po PO bits, PO n_po-1 first, and n_sc
//    scan bits, last element first) is compressed while pattern t+1 is
//    shifted in, the PO bit into signature stage 0, the scan bit into stage 1;
//  - test_len[s] patterns are applied with set s, s = 0 .. last_set.
package tc_ref_pkg;
  import tc_pkg::*;
  import cut_pkg::*;

  typedef wcode_t w1_t [SETS][128];
  typedef wcode_t w2_t [SETS][512];

  function automatic logic [31:0] lfsr_next(logic [31:0] s, logic [31:0] p);
    logic [31:0] n;
    for (int i = 0; i < 32; i++)
      n[i] = ((i == 0) ? 1'b0 : s[i-1]) ^ (p[i] & s[31]);
    return n;
  endfunction

  function automatic logic wbit(logic [31:0] s, wcode_t k);
    int v = {s[31], s[20], s[9]};
    return (v >= 8 - int'(k));
  endfunction

  function automatic logic [31:0] misr_next(logic [31:0] s, logic a, logic b);
    logic [32:0] t = {s, 1'b0};
    if (t[32]) t = t ^ {1'b1, SIG_POLY};
    return t[31:0] ^ {30'b0, b, a};
  endfunction

  // returns the signature; n_patterns and n_cycles report the test size
  function automatic logic [31:0] ref_signature(cfg_t cfg, w1_t w1, w2_t w2, bit fault,
                                                output longint n_patterns, output longint n_cycles);
    int npi = int'(cfg.n_pi), npo = int'(cfg.n_po), nsc = int'(cfg.n_sc);
    int S = npi, P = 0, set = 0, cnt = 0;
    logic [31:0] g1 = (cfg.seed1 == 0) ? 32'h1 : cfg.seed1;
    logic [31:0] g2 = (cfg.seed2 == 0) ? 32'h1 : cfg.seed2;
    logic [31:0] sig = '0;
    logic [PI_W-1:0] sr = '0;
    logic [SC_W-1:0] sc = '0;
    if (npo > S) S = npo;
    if (nsc > S) S = nsc;
    for (int s = 0; s <= int'(cfg.last_set); s++) P += int'(cfg.test_len[s]);
    for (int t = 0; t <= P; t++) begin
      for (int j = 0; j < S; j++) begin
        int p = S - 1 - j;
        logic b1, b2;
        if (t > 0 && (j < npo || j < nsc))
          sig = misr_next(sig, (j < npo) ? sr[npo - 1] : 1'b0, (j < nsc) ? sc[nsc - 1] : 1'b0);
        b1 = wbit(g1, w1[set][p % 128]);
        b2 = wbit(g2, w2[set][p]);
        sr = {sr[PI_W-2:0], b1};
        sc = {sc[SC_W-2:0], b2};
        g1 = lfsr_next(g1, PG1_POLY);
        g2 = lfsr_next(g2, PG2_POLY);
      end
      if (t < P) begin
        logic [PI_W-1:0] po;
        logic [PI_W-1:0] pi = '0;
        for (int i = 0; i < npi; i++) pi[i] = sr[i];
        po = cut_outputs(pi, sc, npi, npo, nsc, fault);
        sc = cut_next_state(pi, sc, npi, nsc);
        sr = po;
        cnt++;
        if (cnt == int'(cfg.test_len[set])) begin cnt = 0; set++; end
        if (set > int'(cfg.last_set)) set = int'(cfg.last_set);
      end
    end
    n_patterns = P;
    n_cycles = 1 + longint'(P) * (S + 1) + S;
    return sig;
  endfunction
endpackage
