// bus_interface: micro computer access to the test controller.
//
// A synchronous 8-bit bus with a 12-bit byte address: a write (bus_we) or a
// read (bus_re) is sampled at a rising clock edge; read data appears on
// bus_rdata in the following cycle and is held until the next read. The
// block holds the parameter registers (sizes of the circuit under test,
// number of sets, test length per set, generator seeds), decodes the
// instruction register (writing 1 to bit 0 of CTRL starts a test), returns
// the status (busy, done, active set; busy already in the cycle after the
// start write) and the signature, and turns writes in
// the two RAM windows into weight RAM writes. Parameter and RAM writes are
// ignored while a test runs.
//
// That parameters, instructions and status live in registers the micro
// computer can access follows the specification; the bus protocol, the
// register map (tc_pkg) and the reset values are choices of this
// implementation. Bytes of multi-byte values are little endian.
module bus_interface
  import tc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [11:0] bus_addr,
  input  logic [7:0]  bus_wdata,
  input  logic        bus_we,
  input  logic        bus_re,
  output logic [7:0]  bus_rdata,
  // to / from the core
  output cfg_t        cfg,
  output logic        start,
  input  logic        busy,
  input  logic        done,
  input  logic [1:0]  cur_set,
  input  logic [31:0] sig,
  output logic        ram1_we,
  output logic [8:0]  ram1_addr,
  output logic        ram2_we,
  output logic [10:0] ram2_addr,
  output wcode_t      ram_wdata
);

  cfg_t       cfg_q;
  logic [7:0] rdata_q;
  logic       start_q;
  logic       wr_ok;

  assign wr_ok = bus_we && !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_q          <= '0;
      cfg_q.n_pi     <= 7'd1;
      cfg_q.n_po     <= 7'd1;
      cfg_q.n_sc     <= 9'd1;
      for (int s = 0; s < SETS; s++) cfg_q.test_len[s] <= LEN_W'(1);
      cfg_q.seed1    <= 32'h1;
      cfg_q.seed2    <= 32'h1;
      start_q        <= 1'b0;
    end else begin
      start_q <= bus_we && !busy && (bus_addr == A_CTRL) && bus_wdata[0];
      if (wr_ok) begin
        unique casez (bus_addr)
          A_NPI:     cfg_q.n_pi     <= bus_wdata[6:0];
          A_NPO:     cfg_q.n_po     <= bus_wdata[6:0];
          A_NSC_LO:  cfg_q.n_sc[7:0] <= bus_wdata;
          A_NSC_HI:  cfg_q.n_sc[8]  <= bus_wdata[0];
          A_LASTSET: cfg_q.last_set <= bus_wdata[1:0];
          12'h01?: begin
            if (bus_addr[1:0] == 2'd0) cfg_q.test_len[bus_addr[3:2]][7:0]   <= bus_wdata;
            if (bus_addr[1:0] == 2'd1) cfg_q.test_len[bus_addr[3:2]][15:8]  <= bus_wdata;
            if (bus_addr[1:0] == 2'd2) cfg_q.test_len[bus_addr[3:2]][19:16] <= bus_wdata[3:0];
          end
          12'h020, 12'h021, 12'h022, 12'h023:
            cfg_q.seed1[8*bus_addr[1:0] +: 8] <= bus_wdata;
          12'h024, 12'h025, 12'h026, 12'h027:
            cfg_q.seed2[8*bus_addr[1:0] +: 8] <= bus_wdata;
          default: ;
        endcase
      end
    end
  end

  // read data register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      rdata_q <= '0;
    else if (bus_re) begin
      unique casez (bus_addr)
        A_CTRL:    rdata_q <= {4'b0, cur_set, done && !start_q, busy || start_q};
        A_NPI:     rdata_q <= {1'b0, cfg_q.n_pi};
        A_NPO:     rdata_q <= {1'b0, cfg_q.n_po};
        A_NSC_LO:  rdata_q <= cfg_q.n_sc[7:0];
        A_NSC_HI:  rdata_q <= {7'b0, cfg_q.n_sc[8]};
        A_LASTSET: rdata_q <= {6'b0, cfg_q.last_set};
        12'h01?: begin
          unique case (bus_addr[1:0])
            2'd0:    rdata_q <= cfg_q.test_len[bus_addr[3:2]][7:0];
            2'd1:    rdata_q <= cfg_q.test_len[bus_addr[3:2]][15:8];
            2'd2:    rdata_q <= {4'b0, cfg_q.test_len[bus_addr[3:2]][19:16]};
            default: rdata_q <= '0;
          endcase
        end
        12'h020, 12'h021, 12'h022, 12'h023: rdata_q <= cfg_q.seed1[8*bus_addr[1:0] +: 8];
        12'h024, 12'h025, 12'h026, 12'h027: rdata_q <= cfg_q.seed2[8*bus_addr[1:0] +: 8];
        12'h028, 12'h029, 12'h02A, 12'h02B: rdata_q <= sig[8*bus_addr[1:0] +: 8];
        default:   rdata_q <= '0;
      endcase
    end
  end

  assign cfg       = cfg_q;
  assign start     = start_q;
  assign bus_rdata = rdata_q;

  // weight RAM windows
  assign ram1_we   = wr_ok && (bus_addr[11:9] == 3'b010);   // 0x400..0x5FF
  assign ram1_addr = bus_addr[8:0];
  assign ram2_we   = wr_ok && bus_addr[11];                 // 0x800..0xFFF
  assign ram2_addr = bus_addr[10:0];
  assign ram_wdata = bus_wdata[2:0];

  a_one_access: assert property (@(posedge clk) disable iff (!rst_n) !(bus_we && bus_re))
    else $error("bus_interface: read and write in the same cycle");

endmodule
