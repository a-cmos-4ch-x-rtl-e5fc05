// tmc_array: one TMC array, ROWS x COLS dual-port time-memory cells.
//
// Each cell has two ports. The timing port writes a whole row at once: the
// delay line of the selected row (tmc_delay_line) samples the channel input
// once per nanosecond during one clock period, and the completed row word is
// stored here at the next CLK edge. The bit-line port serves two users: the
// readout, which reads the row picked by the Read Pointer through the sense
// amplifiers, and the serial test path of CSR#0, which reads or writes a
// single cell. Both ports are used in the same cycle, which is what lets
// recording and readout run together.
//
// Interface and timing (all on the rising CLK edge):
//   tw_en, tw_row_sel (one-hot), tw_data : row write, stored at this edge
//   rd_en, rd_row_sel (one-hot)          : row read; rd_data is registered,
//                                          the sense-amp latch, and holds its
//                                          value while rd_en is low
//   tc_row, tc_col, tc_we, tc_wdata      : single-cell test write at this edge
//   tc_rdata                             : the addressed cell, combinational
// The row port, the one-hot word lines and the sense-amp latch follow the
// chip; the register-level timing of the ports is this design's choice.
// The cells have no reset, as in a static RAM: a row reads meaningfully
// only after it has been written.
`timescale 1ns / 1ps
module tmc_array
  import tmc_pkg::*;
#(
  parameter int unsigned ROWS = N_ROWS,
  parameter int unsigned COLS = N_COLS
) (
  input  logic                    clk,
  // timing write port
  input  logic                    tw_en,
  input  logic [ROWS-1:0]         tw_row_sel,
  input  logic [COLS-1:0]         tw_data,
  // row read port (sense amplifiers)
  input  logic                    rd_en,
  input  logic [ROWS-1:0]         rd_row_sel,
  output logic [COLS-1:0]         rd_data,
  // single-cell test port
  input  logic [$clog2(ROWS)-1:0] tc_row,
  input  logic [$clog2(COLS)-1:0] tc_col,
  input  logic                    tc_we,
  input  logic                    tc_wdata,
  output logic                    tc_rdata
);

  logic [COLS-1:0] cells [ROWS];
  logic [COLS-1:0] bitline;

  always_ff @(posedge clk) begin
    if (tc_we) cells[tc_row][tc_col] <= tc_wdata;
    if (tw_en)
      for (int r = 0; r < ROWS; r++)
        if (tw_row_sel[r]) cells[r] <= tw_data;
  end

  // Bit lines: the selected row drives them (wired-OR of the word lines).
  always_comb begin
    bitline = '0;
    for (int r = 0; r < ROWS; r++)
      if (rd_row_sel[r]) bitline |= cells[r];
  end

  always_ff @(posedge clk)
    if (rd_en) rd_data <= bitline;

  assign tc_rdata = cells[tc_row][tc_col];

endmodule
