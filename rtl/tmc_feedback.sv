// tmc_feedback: behavioural model of one array's delay-locking feedback.
//
// This is a model, not logic: the real circuit is analog. Like a PLL, it
// locks a variable delay to an external reference, but it compares delay
// with the clock period instead of phase with phase. Every clock the
// reference row (a row of delay elements like the cells') is started; one
// capacitor charges until the pulse leaves the reference row, another until
// the next clock edge, and a comparator looks at the difference. If the row
// is faster than one period, the hold capacitor on Vg is charged a step,
// slowing the delay elements; if slower, it is discharged a step.
//
// The model measures the clock period between rising edges and compares it
// with COLS * tap_delay_ns(vg, PVT): outside a +-WINDOW_NS dead band it moves
// vg by STEP_V toward lock, clamped to the control range. up / dn pulse for
// one clock with each step (comparator decisions, for observation).
// The 20 mV step, the +-0.5 ns comparator window and the 1.2-2.3 V range
// are the chip's figures; the start value of Vg and doing the comparison at
// the rising edge are this model's choices.
`timescale 1ns / 1ps
module tmc_feedback
  import tmc_pkg::*;
#(
  parameter int unsigned COLS      = N_COLS,
  parameter real         PVT       = 1.0,
  parameter real         VG_INIT   = VG_NOM,
  parameter real         STEP_V    = 0.020,
  parameter real         WINDOW_NS = 0.5
) (
  input  logic clk,
  input  logic rst_n,
  output real  vg,
  output logic up,
  output logic dn
);

  real last_edge;
  bit  have_edge;

  initial begin
    vg        = VG_INIT;
    have_edge = 1'b0;
    last_edge = 0.0;
    up        = 1'b0;
    dn        = 1'b0;
  end

  always @(posedge clk or negedge rst_n) begin
    real period, row_delay;
    if (!rst_n) begin
      vg        <= VG_INIT;
      have_edge <= 1'b0;
      up        <= 1'b0;
      dn        <= 1'b0;
    end else begin
      up <= 1'b0;
      dn <= 1'b0;
      if (have_edge) begin
        period    = $realtime - last_edge;
        row_delay = COLS * tap_delay_ns(vg, PVT);
        if (row_delay < period - WINDOW_NS) begin
          up <= 1'b1;
          vg <= (vg + STEP_V > VG_MAX) ? VG_MAX : vg + STEP_V;
        end else if (row_delay > period + WINDOW_NS) begin
          dn <= 1'b1;
          vg <= (vg - STEP_V < VG_MIN) ? VG_MIN : vg - STEP_V;
        end
      end
      last_edge <= $realtime;
      have_edge <= 1'b1;
    end
  end

endmodule
