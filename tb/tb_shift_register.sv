// tb_shift_register: self-checking test of the PI/PO shift register.
//
// Random shifts, parallel loads and idle cycles are applied to the 127-bit
// register and compared with a model held as a queue of bits; the serial
// output is checked at random tap positions. A directed part shifts in a
// 14-bit pattern, checks that it appears on q[13:0] with the first bit in
// stage 13, loads a PO word and checks that 14 shifts bring PO 13 .. PO 0 out.
module tb_shift_register;
  localparam int W = 127;

  logic clk = 1'b0, rst_n = 1'b0;
  logic shift, si, load, so;
  logic [W-1:0] pin, q, model;
  logic [6:0] tap_sel;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  shift_register #(.W(W)) dut (.clk, .rst_n, .shift, .si, .load, .pin, .tap_sel, .so, .q);

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [13:0] pat, po;
    shift = 0; si = 0; load = 0; pin = '0; tap_sel = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    model = '0;
    check("reset", q == '0);
    for (int n = 0; n < 5000; n++) begin
      shift = $urandom_range(0, 1);
      load  = ($urandom_range(0, 9) == 0);
      si    = $urandom_range(0, 1);
      pin   = {$urandom, $urandom, $urandom, $urandom};
      tap_sel = 7'($urandom_range(0, W - 1));
      #1;
      check("so", so == model[tap_sel]);
      @(negedge clk);
      if (load) model = pin;
      else if (shift) model = {model[W-2:0], si};
      check("q", q == model);
    end
    // directed: 14 PIs, 14 POs
    load = 0; tap_sel = 7'd13;
    pat = 14'h2A5C;
    for (int j = 0; j < 14; j++) begin
      shift = 1; si = pat[13 - j]; @(negedge clk);
    end
    shift = 0;
    check("pattern on PIs", q[13:0] == pat);
    po = 14'h1B37;
    pin = '0; pin[13:0] = po; load = 1; @(negedge clk); load = 0;
    for (int j = 0; j < 14; j++) begin
      #1 check("PO order", so == po[13 - j]);
      shift = 1; si = 1'b0; @(negedge clk);
    end
    shift = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
