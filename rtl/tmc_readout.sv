// tmc_readout: channel selection, encoding and output register of the
// two-stage readout pipeline.
//
// Stage 1 is the row read in the arrays: while DS* is low, every array
// latches the row the Read Pointer names into its sense-amp register
// (tmc_array rd_en). This module records, at that same edge, which array
// feeds which output channel (from the mode and the upper Read Pointer
// bits) and that stage 1 holds data. Stage 2, one edge later, encodes each
// channel's row with tmc_encoder and registers the 6-bit codes on DOUT.
// One row leaves per 32 ns clock, matching the write rate, so readout keeps
// up with recording for as long as DS* stays low.
//
// Interface:
//   ds_n    readout trigger, active low, sampled at the CLK edge
//   rp      Read Pointer at that edge (the row stage 1 is reading)
//   rows    the arrays' sense-amp registers (stage 1 outputs)
//   dout    per output channel {cell 0 value, transition position}; channel
//           c is array c in 4-channel mode, array 2c+rp[5] in 2-channel
//           mode (c = 0,1), array rp[6:5] in 1-channel mode (c = 0);
//           unused channels read 0
//   dvalid  dout holds the row read two edges earlier
// The two stages and the 6-bit code follow the chip; dvalid and the
// numbering of the output channels are this design's choices.
`timescale 1ns / 1ps
module tmc_readout
  import tmc_pkg::*;
#(
  parameter int unsigned COLS = N_COLS
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       ds_n,
  input  mode_e                      mode,
  input  logic [PTR_W-1:0]           rp,
  input  logic [COLS-1:0]            rows   [N_ARRAYS],
  output logic [$clog2(COLS):0]      dout   [N_ARRAYS],
  output logic                       dvalid
);
  localparam int unsigned CW = $clog2(COLS) + 1;

  // Stage-1 bookkeeping, captured with the array read.
  logic                 s1_valid;
  mode_e                s1_mode;
  logic [1:0]           s1_hi;     // rp[6:5] of the row being read

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_mode  <= MODE_4CH;
      s1_hi    <= '0;
    end else begin
      s1_valid <= ~ds_n && (mode != MODE_HOLD);
      s1_mode  <= mode;
      s1_hi    <= rp[6:5];
    end
  end

  // Array feeding each output channel.
  logic [COLS-1:0] ch_row  [N_ARRAYS];
  logic [CW-1:0]   ch_code [N_ARRAYS];

  always_comb begin
    for (int c = 0; c < N_ARRAYS; c++) ch_row[c] = '0;
    unique case (s1_mode)
      MODE_4CH: for (int c = 0; c < N_ARRAYS; c++) ch_row[c] = rows[c];
      MODE_2CH: begin
        ch_row[0] = rows[{1'b0, s1_hi[0]}];
        ch_row[1] = rows[{1'b1, s1_hi[0]}];
      end
      MODE_1CH: ch_row[0] = rows[s1_hi];
      default: ;
    endcase
  end

  for (genvar c = 0; c < N_ARRAYS; c++) begin : g_enc
    tmc_encoder #(.COLS(COLS)) u_enc (.row(ch_row[c]), .code(ch_code[c]));
  end

  // Stage 2: output register.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dvalid <= 1'b0;
      for (int c = 0; c < N_ARRAYS; c++) dout[c] <= '0;
    end else begin
      dvalid <= s1_valid;
      if (s1_valid)
        for (int c = 0; c < N_ARRAYS; c++) dout[c] <= ch_code[c];
    end
  end

endmodule
