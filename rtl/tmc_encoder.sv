// tmc_encoder: compresses one 32-bit TMC row to a 6-bit code.
//
// Inputs arrive at most once per 32 ns and only rising edges matter, so a
// row holds at most one 0-to-1 transition. An AND gate per cell boundary
// flags "cell i-1 is 0 and cell i is 1"; the flags are combined into a 5-bit
// position by a wired-OR, i.e. bit k of the position is the OR of the flags
// whose index has bit k set. The code's top bit carries the value of cell 0,
// which lets the reader spot a transition that falls on a row boundary (the
// last cell of the previous row 0, cell 0 of this row 1). A row with no
// transition gives position 0; a row with several gives the OR of their
// positions, as the wired-OR would. Purely combinational.
//
//   row  : row[0] is the earliest sample, row[31] the latest
//   code : {row[0], position}
`timescale 1ns / 1ps
module tmc_encoder
  import tmc_pkg::*;
#(
  parameter int unsigned COLS = N_COLS
) (
  input  logic [COLS-1:0]          row,
  output logic [$clog2(COLS):0]    code
);
  localparam int unsigned PW = $clog2(COLS);

  logic [COLS-1:0] rise;  // rise[i]: 0-to-1 transition between cells i-1 and i
  logic [PW-1:0]   pos;

  always_comb begin
    rise    = '0;
    for (int i = 1; i < COLS; i++) rise[i] = ~row[i-1] & row[i];
    pos = '0;
    for (int i = 1; i < COLS; i++)
      if (rise[i]) pos |= PW'(i);
    code = {row[0], pos};
  end

endmodule
