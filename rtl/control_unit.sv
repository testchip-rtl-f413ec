// control_unit: test sequencer.
//
// One test consists of P = sum of the programmed test lengths of sets
// 0..last_set patterns. For every pattern the unit runs a shift window of
// S = max(n_pi, n_po, n_sc) clock cycles in test mode, in which pattern
// generator 1 fills the PI/PO shift register, pattern generator 2 fills the
// scan path through SDI, and the response of the previous pattern (n_po bits
// from the shift register, n_sc bits from SDO) goes into the signature
// register. Then one cycle in normal mode clocks the circuit once: the scan
// path captures its response and the shift register loads the primary
// outputs. After the last pattern a final window only unloads the responses.
// After test_len[set] patterns the next set of weights becomes active; the
// test end is signalled by `done`. A scan length of 0 serves combinational
// circuits: the windows then only load the PIs and unload the POs.
//
// The sequence (shift, capture in normal mode, unload while the next pattern
// is generated, set switching, test end) follows the specification. The
// cycle counts and the ordering within a window are choices of this
// implementation.
//
// Timing: one bit per clock cycle. cut_clk_en (combinational from the
// state register) enables the CUT clock for the shift and capture cycles;
// the CUT clock is the system clock gated with it, so the CUT, the shift
// register, the generators and the signature register act on the same
// edge. cut_test_mode is registered and changes only right after an edge.
// In shift cycle j of a window the signature register takes SDO and the
// shift register output (sig_step), then the generators and the shift
// register advance (pg_step, sr_shift). `pos` = S-1-j is the final position
// (shift register stage / scan element counted from SDI) of the bit
// generated in cycle j; it addresses the weight RAMs. A test takes
// 1 + P*(S+1) + S cycles from the cycle after `start` to `done`.
module control_unit
  import tc_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  cfg_t               cfg,
  input  logic               start,
  output logic               busy,
  output logic               done,
  output logic [1:0]         cur_set,
  output logic [POS_W-1:0]   pos,
  output logic               pg_load,
  output logic               pg_step,
  output logic               sr_shift,
  output logic               sr_load,
  output logic               sig_clear,
  output logic               sig_step,
  output logic               sig_en_sr,
  output logic               sig_en_sdo,
  output logic               cut_clk_en,
  output logic               cut_test_mode
);

  typedef enum logic [2:0] {
    S_IDLE, S_INIT, S_SHIFT, S_CAP, S_DONE
  } state_t;

  state_t            state_q, state_d;
  logic [POS_W-1:0]  j_q;        // bit period within the window
  logic [LEN_W-1:0]  pcnt_q;     // patterns applied in the active set
  logic [1:0]        set_q;
  logic              resp_q;     // a response waits in the scan path / shift register
  logic              final_q;    // the window in progress is the final unload
  logic              cut_mode_q;

  logic [POS_W-1:0]  s_len;      // window length S
  logic [POS_W-1:0]  n_pi9, n_po9;
  logic              win_end, set_end;

  assign n_pi9 = POS_W'(cfg.n_pi);
  assign n_po9 = POS_W'(cfg.n_po);

  always_comb begin
    s_len = cfg.n_sc;
    if (n_pi9 > s_len) s_len = n_pi9;
    if (n_po9 > s_len) s_len = n_po9;
  end

  assign win_end = (j_q == s_len - 1'b1);
  assign set_end = (pcnt_q == cfg.test_len[set_q] - 1'b1);

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      S_IDLE:  if (start) state_d = S_INIT;
      S_INIT:  state_d = S_SHIFT;
      S_SHIFT: if (win_end) state_d = final_q ? S_DONE : S_CAP;
      S_CAP:   state_d = S_SHIFT;
      S_DONE:  if (start) state_d = S_INIT;
      default: state_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_IDLE;
      j_q        <= '0;
      pcnt_q     <= '0;
      set_q      <= '0;
      resp_q     <= 1'b0;
      final_q    <= 1'b0;
      cut_mode_q <= 1'b1;
    end else begin
      state_q    <= state_d;
      cut_mode_q <= (state_d != S_CAP);
      unique case (state_q)
        S_INIT: begin
          j_q     <= '0;
          pcnt_q  <= '0;
          set_q   <= '0;
          resp_q  <= 1'b0;
          final_q <= 1'b0;
        end
        S_SHIFT: j_q <= win_end ? '0 : j_q + 1'b1;
        S_CAP: begin
          resp_q <= 1'b1;
          if (set_end) begin
            pcnt_q <= '0;
            if (set_q == cfg.last_set) final_q <= 1'b1;
            else                       set_q   <= set_q + 1'b1;
          end else begin
            pcnt_q <= pcnt_q + 1'b1;
          end
        end
        default: ;
      endcase
    end
  end

  assign busy          = (state_q != S_IDLE) && (state_q != S_DONE);
  assign done          = (state_q == S_DONE);
  assign cur_set       = set_q;
  assign pos           = s_len - 1'b1 - j_q;
  assign pg_load       = (state_q == S_INIT);
  assign sig_clear     = (state_q == S_INIT);
  assign pg_step       = (state_q == S_SHIFT);
  assign sr_shift      = (state_q == S_SHIFT);
  assign sr_load       = (state_q == S_CAP);
  assign sig_en_sr     = resp_q && (j_q < n_po9);
  assign sig_en_sdo    = resp_q && (j_q < cfg.n_sc);
  assign sig_step      = (state_q == S_SHIFT) && (sig_en_sr || sig_en_sdo);
  assign cut_clk_en    = (state_q == S_SHIFT) || (state_q == S_CAP);
  assign cut_test_mode = cut_mode_q;

  // The PI and PO counts and the test lengths must be at least 1 when a test
  // starts, and the lengths at most 10^6. n_sc = 0 means a circuit without
  // scan path (purely combinational): SDO is then never sampled.
  a_cfg_valid: assert property (@(posedge clk) disable iff (!rst_n)
    (state_q == S_INIT) |-> (cfg.n_pi != 0 && cfg.n_po != 0))
    else $error("control_unit: zero PI or PO count programmed");
  a_len_valid: assert property (@(posedge clk) disable iff (!rst_n)
    (state_q == S_INIT) |-> (cfg.test_len[0] != 0 && 32'(cfg.test_len[0]) <= LEN_MAX))
    else $error("control_unit: test length of set 0 out of range");
  a_capture_mode: assert property (@(posedge clk) disable iff (!rst_n)
    cut_clk_en |-> (cut_test_mode == (state_q == S_SHIFT)))
    else $error("control_unit: CUT clocked in the wrong mode");

endmodule
