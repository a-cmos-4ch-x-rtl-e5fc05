// tb_tmc_feedback: runs the delay-locking loop for fast, typical and slow
// process corners and for a corner outside the control range. Checks that
// each cycle Vg moves by one 20 mV step or not at all, in the direction of
// up/dn, that every corner in range locks (32 delays within +-0.5 ns of the
// clock period) within the expected number of cycles and stays locked,
// that it relocks after the clock period changes, and that Vg clamps at
// the end of its range.
`timescale 1ns / 1ps
module tb_tmc_feedback;
  import tmc_pkg::*;

  localparam int N = 4;
  localparam real PVTS [N] = '{0.8, 1.0, 1.2, 1.4};

  logic clk = 0, rst_n = 0;
  real  half = 16.0;
  real  vg [N];
  logic up [N], dn [N];
  int checks = 0, failures = 0;
  int steps_up = 0, steps_dn = 0;

  for (genvar i = 0; i < N; i++) begin : g_dut
    tmc_feedback #(.PVT(PVTS[i])) dut (.clk, .rst_n, .vg(vg[i]), .up(up[i]), .dn(dn[i]));
  end

  always #(half) clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic real row_err(int i, real period);
    return 32.0 * (PVTS[i] + VG_SLOPE * (vg[i] - VG_NOM)) - period;
  endfunction

  real prev [N];

  task automatic run(int cycles, int lock_by, real period);
    for (int k = 0; k < cycles; k++) begin
      for (int i = 0; i < N; i++) prev[i] = vg[i];
      @(posedge clk);
      #1;
      for (int i = 0; i < N; i++) begin
        real dv = vg[i] - prev[i];
        if (up[i]) steps_up++;
        if (dn[i]) steps_dn++;
        check(up[i] ? (dv > 0.0199 || vg[i] == VG_MAX) :
              dn[i] ? (dv < -0.0199 || vg[i] == VG_MIN) :
                      (dv == 0.0), "step size and direction");
        if (i < 3 && k >= lock_by)
          check(row_err(i, period) <= 0.5 && row_err(i, period) >= -0.5, "locked");
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < N; i++) check(vg[i] == VG_NOM, "reset value");
    run(60, 25, 32.0);
    check(vg[3] == VG_MIN, "clamped at minimum");
    check(vg[1] == VG_NOM, "typical corner never stepped");
    // slower clock: 34 ns period, about 6 more steps up
    half = 17.0;
    @(posedge clk);
    run(60, 30, 34.0);
    $display("steps up=%0d down=%0d", steps_up, steps_dn);
    check(steps_up > 0 && steps_dn > 0, "both directions used");
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
