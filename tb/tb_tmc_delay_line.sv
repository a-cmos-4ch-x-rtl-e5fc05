// tb_tmc_delay_line: drives rising and falling input edges at chosen times
// inside a 32 ns row and checks the latched row word: cell c must hold the
// input level at (c + 1/2) * tap after the row start, with tap = 1 ns at nominal Vg
// and scaled for other Vg and process factors. Also checks that a row is
// not rewritten without launch.
`timescale 1ns / 1ps
module tb_tmc_delay_line;
  import tmc_pkg::*;

  logic clk = 0, launch = 0, tin = 0;
  real  vg = VG_NOM, vg_slow;
  logic [31:0] row_word, row_slow;
  int checks = 0, failures = 0;

  tmc_delay_line dut (.clk, .launch, .tin, .vg, .row_word);
  // slow process corner brought back to 1 ns by a lower Vg
  tmc_delay_line #(.PVT(1.2)) dut_slow (.clk, .launch, .tin, .vg(vg_slow), .row_word(row_slow));

  always #16 clk = ~clk;

  // expected word for an input that is high from rise_t to fall_t
  // (times relative to the row start), sampled every tap ns from tap/2
  function automatic logic [31:0] expect_word(real tap, real rise_t, real fall_t);
    logic [31:0] w;
    for (int c = 0; c < 32; c++) w[c] = ((c + 0.5) * tap >= rise_t) && ((c + 0.5) * tap < fall_t);
    return w;
  endfunction

  task automatic check(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++; $display("FAIL %s: %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    real taps [3] = '{1.0, 1.02, 0.97};
    vg_slow = VG_NOM - 0.4;
    @(posedge clk);
    for (int ti = 0; ti < 3; ti++) begin
      vg = VG_NOM + (taps[ti] - 1.0) / VG_SLOPE;
      for (int k = 0; k < 40; k++) begin
        automatic real x = 1.0 + ($urandom % 29) + (ti == 0 ? 0.0 : 0.3);
        automatic real y = 2.0 + ($urandom % 27) + (ti == 0 ? 0.0 : 0.3);
        // row with a rising edge at x
        @(negedge clk) launch = 1;
        @(posedge clk);
        #(x) tin = 1;
        @(posedge clk);
        #1;
        check(row_word, expect_word(taps[ti], x, 100.0), "rise row");
        if (ti == 0) check(row_slow, expect_word(1.0, x, 100.0), "rise row, slow corner");
        // row with a falling edge at y
        #(y - 1.0) tin = 0;
        launch = 0;
        @(posedge clk);
        #1;
        check(row_word, expect_word(taps[ti], -1.0, y), "fall row");
        // no launch: word stays
        tin = 1;
        @(posedge clk);
        @(posedge clk);
        #1;
        check(row_word, expect_word(taps[ti], -1.0, y), "no launch");
        tin = 0;
      end
    end
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
