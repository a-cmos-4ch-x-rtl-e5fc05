// tmc_delay_line: behavioural model of the write line of a TMC row.
//
// This is a model, not logic: the real part is a chain of 32 full-custom
// delay elements, one inside each cell, whose falling-edge delay is set by
// the analog control voltage Vg. When a row's write pulse starts at a CLK
// rising edge (launch high), cell c latches the channel input TIN c + 1/2
// delay elements later, so one row takes a snapshot of TIN every ~1 ns across
// the 32 ns clock period. The half-element lead-in stands for the write
// line's insertion delay; it keeps every sampling point off the clock edge. The delay of one element is
// tmc_pkg::tap_delay_ns(vg, PVT); with the feedback loop locked it is
// period/32. The finished row word is presented on row_word about half an
// element before the next CLK edge, where tmc_array stores it.
//
// Ports: clk (row start), launch (this array's row is written in this
// period), tin (channel input), vg (control voltage, volts, from
// tmc_feedback), row_word (bit c = TIN as latched by cell c).
// Sampling per cell and the Vg control follow the chip; starting the chain
// at the rising edge, the half-element lead-in and the linear delay law are this model's choices.
`timescale 1ns / 1ps
module tmc_delay_line
  import tmc_pkg::*;
#(
  parameter int unsigned COLS = N_COLS,
  parameter real         PVT  = 1.0   // uncontrolled delay factor, 1.0 = typical
) (
  input  logic            clk,
  input  logic            launch,
  input  logic            tin,
  input  real             vg,
  output logic [COLS-1:0] row_word
);

  initial row_word = '0;

  // One row write: the pulse ripples down the chain, each cell latching TIN
  // as the pulse passes it.
  task automatic write_row(real d);
    logic [COLS-1:0] w;
    #(d / 2.0);
    w[0] = tin;
    for (int c = 1; c < COLS; c++) begin
      #(d);
      w[c] = tin;
    end
    row_word = w;
  endtask

  always @(posedge clk) begin
    if (launch) begin
      fork
        write_row(tap_delay_ns(vg, PVT));
      join_none
    end
  end

endmodule
