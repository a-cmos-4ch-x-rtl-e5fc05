// tb_tmc_encoder: checks the 6-bit row code against rows built from a known
// transition position: rising rows (0..0 1..1), rows that start high, fall
// and rise again, all-0 and all-1 rows, and the wired-OR result of two
// transitions in one row.
`timescale 1ns / 1ps
module tb_tmc_encoder;
  import tmc_pkg::*;

  logic [31:0] row;
  logic [5:0]  code;
  int checks = 0, failures = 0;

  tmc_encoder dut (.row, .code);

  task automatic check(logic [31:0] r, logic [5:0] exp, string what);
    row = r;
    #1;
    checks++;
    if (code !== exp) begin
      failures++;
      $display("FAIL %s row=%h code=%h expected=%h", what, r, code, exp);
    end
  endtask

  initial begin
    check('0, 6'h00, "all zero");
    check('1, 6'h20, "all one");
    for (int p = 1; p < 32; p++)
      check(32'hFFFF_FFFF << p, {1'b0, 5'(p)}, "rising");
    for (int f = 1; f < 31; f++)
      for (int p = f + 1; p < 32; p++)
        // ones in [0,f), zeros in [f,p), ones from p
        check((32'hFFFF_FFFF >> (32 - f)) | (32'hFFFF_FFFF << p), {1'b1, 5'(p)}, "fall-rise");
    for (int k = 0; k < 200; k++) begin
      automatic int p = 1 + ($urandom % 31);
      automatic int w = 1 + ($urandom % (32 - p));
      automatic logic [31:0] r = (32'hFFFF_FFFF >> (32 - w)) << p;  // pulse of w ones at p
      check(r, {1'b0, 5'(p)}, "pulse");
    end
    // two transitions: wired-OR of positions 3 and 20 = 23
    check(32'b0000_0000_0001_0000_0000_0000_0000_1000, 6'h17, "two rises");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
