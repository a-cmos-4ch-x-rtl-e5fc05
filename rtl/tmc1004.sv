// tmc1004: four-channel, 1 ns/bit time memory (time-to-digital converter).
//
// Each input is recorded, not timed: a row of 32 memory cells snapshots the
// input once per nanosecond across one 32 ns clock period, and successive
// clock periods fill successive rows, so the arrays hold the last 1.024 us
// (4-channel mode), 2.048 us (2-channel) or 4.096 us (1-channel) of input
// history at 1 ns resolution. The cell spacing is held at exactly
// period/32 by a per-array feedback loop that locks the delay elements to
// the external clock, so the time scale is set by the clock crystal rather
// than by process, supply or temperature.
//
// Structure (per array a = 0..3):
//   tmc_delay_line  samples the array's channel input along the row picked
//                   by the Write Pointer (behavioural model of the cells'
//                   timing port)
//   tmc_feedback    sets the delay elements' control voltage Vg
//                   (behavioural model of the analog loop)
//   tmc_array       stores the row at the next CLK edge; serves row reads
//                   and single-cell test access
// and, shared:
//   tmc_pointer x2  Write Pointer and Read Pointer, both counting every CLK;
//                   the distance between them is the trigger latency
//   tmc_readout     while DS* is low, reads the Read Pointer's row
//                   (stage 1, in the arrays) and encodes it to 6 bits per
//                   channel on DOUT (stage 2)
//   tmc_csr         mode, cell test access and both pointers over CS*/CIO
//
// Channel mapping (this design's choice; the chip sets the mode by pins):
// in 4-channel mode array a records tin[a] and appears on dout[a]; in
// 2-channel mode arrays 0,1 record tin[0] onto dout[0] and arrays 2,3
// record tin[1] onto dout[1]; in 1-channel mode all arrays record tin[0]
// onto dout[0]. mode_pins is loaded into CSR#0 at reset.
//
// Timing: all logic runs on the rising edge of clk (31.25 MHz, 32 ns). A
// row started at edge k is stored at edge k+1. With DS* low at edge m, the
// Read Pointer's row at edge m is on dout after edge m+2, with dvalid.
`timescale 1ns / 1ps
module tmc1004
  import tmc_pkg::*;
#(
  parameter int unsigned ROWS = N_ROWS,
  parameter int unsigned COLS = N_COLS,
  // Uncontrolled delay factor of each array's delay elements (1.0 = typical).
  parameter real         PVT0 = 1.0,
  parameter real         PVT1 = 1.0,
  parameter real         PVT2 = 1.0,
  parameter real         PVT3 = 1.0
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  mode_e                 mode_pins,
  input  logic [N_ARRAYS-1:0]   tin,
  input  logic                  ds_n,
  input  logic                  cs_n,
  input  logic                  cio_in,
  output logic                  cio_out,
  output logic                  cio_oe,
  output logic [$clog2(COLS):0] dout [N_ARRAYS],
  output logic                  dvalid
);
  localparam real PVT [N_ARRAYS] = '{PVT0, PVT1, PVT2, PVT3};

  mode_e                mode;
  logic [PTR_W-1:0]     wp, rp, ptr_wdata;
  logic                 wp_load, rp_load;
  logic [ROWS-1:0]      wp_row_sel, rp_row_sel, wp_row_sel_q;
  logic [N_ARRAYS-1:0]  wp_arr_sel, rp_arr_sel, launch_q;
  logic [COL_W-1:0]     cell_col;
  logic                 cell_we;
  logic [N_ARRAYS-1:0]  cell_wdata, cell_rdata;
  logic [COLS-1:0]      row_word [N_ARRAYS];
  logic [COLS-1:0]      sa_row   [N_ARRAYS];

  tmc_csr u_csr (
    .clk, .rst_n, .mode_pins, .cs_n, .cio_in, .cio_out, .cio_oe,
    .mode, .rp, .wp, .rp_load, .wp_load, .ptr_wdata,
    .cell_col, .cell_we, .cell_wdata, .cell_rdata
  );

  tmc_pointer #(.ROWS(ROWS)) u_wp (
    .clk, .rst_n, .mode, .load(wp_load), .load_val(ptr_wdata),
    .ptr(wp), .row_sel(wp_row_sel), .array_sel(wp_arr_sel)
  );

  tmc_pointer #(.ROWS(ROWS)) u_rp (
    .clk, .rst_n, .mode, .load(rp_load), .load_val(ptr_wdata),
    .ptr(rp), .row_sel(rp_row_sel), .array_sel(rp_arr_sel)
  );

  // The row launched at this edge is stored at the next one. row_mode is
  // the mode the launch was decoded with; it routes the inputs while the
  // row records, so a mode change never splits a row between two mappings.
  mode_e row_mode;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      launch_q     <= '0;
      wp_row_sel_q <= '0;
      row_mode     <= MODE_4CH;
    end else begin
      launch_q     <= wp_arr_sel;
      wp_row_sel_q <= wp_row_sel;
      row_mode     <= mode;
    end
  end

  for (genvar a = 0; a < N_ARRAYS; a++) begin : g_array
    real  vg;
    logic fb_up, fb_dn;
    logic tin_a;

    assign tin_a = tin[array_channel(row_mode, 2'(a))];

    tmc_feedback #(.COLS(COLS), .PVT(PVT[a])) u_fb (
      .clk, .rst_n, .vg, .up(fb_up), .dn(fb_dn)
    );

    tmc_delay_line #(.COLS(COLS), .PVT(PVT[a])) u_dl (
      .clk, .launch(wp_arr_sel[a]), .tin(tin_a), .vg, .row_word(row_word[a])
    );

    tmc_array #(.ROWS(ROWS), .COLS(COLS)) u_mem (
      .clk,
      .tw_en(launch_q[a]), .tw_row_sel(wp_row_sel_q), .tw_data(row_word[a]),
      .rd_en(~ds_n & rp_arr_sel[a]), .rd_row_sel(rp_row_sel), .rd_data(sa_row[a]),
      .tc_row(rp[$clog2(ROWS)-1:0]), .tc_col(cell_col[$clog2(COLS)-1:0]),
      .tc_we(cell_we), .tc_wdata(cell_wdata[a]), .tc_rdata(cell_rdata[a])
    );
  end

  tmc_readout #(.COLS(COLS)) u_ro (
    .clk, .rst_n, .ds_n, .mode, .rp, .rows(sa_row), .dout, .dvalid
  );

endmodule
