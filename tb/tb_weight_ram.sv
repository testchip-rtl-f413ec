// tb_weight_ram: self-checking test of the weight-code RAM.
//
// Fills all 4 x 512 words of a scan-path-sized RAM with random codes, keeps
// a copy in the testbench, then mixes random writes and reads (the read
// port is combinational, a write takes effect at the clock edge) and
// compares every read with the copy.
module tb_weight_ram;
  import tc_pkg::*;

  localparam int DEPTH = 512;
  localparam int AW = $clog2(4 * DEPTH);

  logic clk = 1'b0;
  logic we;
  logic [AW-1:0] waddr, raddr;
  wcode_t wdata, rdata;
  wcode_t model [4*DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  weight_ram #(.DEPTH(DEPTH)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = '0; wdata = '0; raddr = '0;
    @(negedge clk);
    for (int a = 0; a < 4*DEPTH; a++) begin
      we = 1; waddr = AW'(a); wdata = wcode_t'($urandom); model[a] = wdata;
      @(negedge clk);
    end
    we = 0;
    for (int a = 0; a < 4*DEPTH; a++) begin
      raddr = AW'(a); #1;
      checks++;
      if (rdata != model[a]) begin
        failures++;
        if (failures < 10) $display("FAIL read %0d: %0d, expected %0d", a, rdata, model[a]);
      end
    end
    @(negedge clk);
    for (int n = 0; n < 4000; n++) begin
      we = $urandom_range(0, 1);
      waddr = AW'($urandom); wdata = wcode_t'($urandom);
      raddr = AW'($urandom);
      #1;
      checks++;
      if (rdata != model[raddr]) failures++;
      @(negedge clk);
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
