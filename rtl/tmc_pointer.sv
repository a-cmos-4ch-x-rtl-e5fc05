// tmc_pointer: 7-bit row pointer with its row and array decoders.
//
// The chip has two of these, the Write Pointer and the Read Pointer. Both
// count up by one on every CLK edge, so once loaded they keep a fixed
// distance and the arrays behave as a ring buffer. The low five bits pick a
// row inside an array (one-hot row_sel, the word-line decoder); the upper
// bits pick the array in 2- and 1-channel mode (array_sel, see
// tmc_pkg::array_select), so the pointer wraps after 32, 64 or 128 rows.
// A CSR write loads the counter (load wins over counting). In the HOLD test
// mode the pointer stops and array_sel is all zero.
//
// Timing: ptr, row_sel and array_sel change on the rising CLK edge; row_sel
// and array_sel are combinational from ptr.
`timescale 1ns / 1ps
module tmc_pointer
  import tmc_pkg::*;
#(
  parameter int unsigned W    = PTR_W,
  parameter int unsigned ROWS = N_ROWS
) (
  input  logic                clk,
  input  logic                rst_n,
  input  mode_e               mode,
  input  logic                load,
  input  logic [W-1:0]        load_val,
  output logic [W-1:0]        ptr,
  output logic [ROWS-1:0]     row_sel,
  output logic [N_ARRAYS-1:0] array_sel
);
  localparam int unsigned RW = $clog2(ROWS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                ptr <= '0;
    else if (load)             ptr <= load_val;
    else if (mode != MODE_HOLD) ptr <= ptr + 1'b1;
  end

  always_comb begin
    row_sel = '0;
    row_sel[ptr[RW-1:0]] = 1'b1;
    array_sel = array_select(mode, PTR_W'(ptr));
  end

endmodule
