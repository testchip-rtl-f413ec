// weight_ram: storage of the weight codes of a pattern generator.
//
// One 3-bit code per pattern position and per set of weights, organised as
// SETS x DEPTH words addressed by {set, position}. The micro computer writes
// the codes before a test; during the test the control unit reads the code
// of the position whose bit is being generated.
//
// The specification gives only the contents (sequences of 3-bit codes for
// each position and set). Write port synchronous, read port asynchronous
// (combinational) so that the generated bit is available in the same cycle
// as its address; DEPTH is the position count rounded up to a power of two.
// The array is not reset: it holds whatever was last written.
module weight_ram
  import tc_pkg::*;
#(
  parameter int unsigned SETS_N = SETS,
  parameter int unsigned DEPTH  = 128,
  localparam int unsigned AW    = $clog2(SETS_N * DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  wcode_t        wdata,
  input  logic [AW-1:0] raddr,
  output wcode_t        rdata
);

  wcode_t mem [SETS_N*DEPTH];

  always_ff @(posedge clk) begin
    if (we)
      mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
