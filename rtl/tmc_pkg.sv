// tmc_pkg: types and constants shared by the time-memory chip.
//
// The chip holds four arrays of 32 rows x 32 time-memory cells. A row is
// written in one 32 ns clock period, one cell per nanosecond, so a 7-bit
// row pointer addresses 128 rows = 4.096 us of history when all four arrays
// are chained into one channel. The channel mode (4, 2 or 1 channels) and
// the sizes are the chip's own; the numeric mode codes, the "hold" test
// code and the delay-element law below are this design's choices.
`timescale 1ns / 1ps
package tmc_pkg;

  localparam int unsigned N_ARRAYS = 4;   // TMC arrays on the chip
  localparam int unsigned N_ROWS   = 32;  // rows per array
  localparam int unsigned N_COLS   = 32;  // cells per row (1 ns each)
  localparam int unsigned PTR_W    = 7;   // pointer counter width
  localparam int unsigned COL_W    = 5;   // log2(N_COLS)

  // Channel mode, two bits of CSR#0.
  typedef enum logic [1:0] {
    MODE_4CH  = 2'd0,  // each array is its own channel, pointer bits [4:0]
    MODE_2CH  = 2'd1,  // arrays {0,1} and {2,3} chained, pointer bits [5:0]
    MODE_1CH  = 2'd2,  // all four arrays chained, pointer bits [6:0]
    MODE_HOLD = 2'd3   // recording and pointers stopped, for cell testing
  } mode_e;

  // CSR addresses.
  typedef enum logic [1:0] {
    CSR_MODE = 2'd0,   // CSR#0: mode[1:0], cell bits of arrays 0..3 [5:2]
    CSR_RP   = 2'd1,   // CSR#1: Read Pointer
    CSR_WP   = 2'd2,   // CSR#2: Write Pointer
    CSR_NONE = 2'd3    // unused, reads 0
  } csr_addr_e;

  localparam int unsigned CSR_DATA_W = 7;

  // Arrays that take part in a row access for pointer value p in mode m:
  // every array in 4-channel mode; in 2-channel mode one array of each pair,
  // chosen by p[5]; in 1-channel mode one array, chosen by p[6:5].
  function automatic logic [N_ARRAYS-1:0] array_select(mode_e m, logic [PTR_W-1:0] p);
    logic [N_ARRAYS-1:0] s;
    unique case (m)
      MODE_4CH: s = '1;
      MODE_2CH: s = p[5] ? 4'b1010 : 4'b0101;
      MODE_1CH: s = 4'b0001 << p[6:5];
      default:  s = '0;
    endcase
    return s;
  endfunction

  // Channel whose input an array records (and whose DOUT it feeds).
  function automatic logic [1:0] array_channel(mode_e m, logic [1:0] a);
    unique case (m)
      MODE_4CH: return a;
      MODE_2CH: return {1'b0, a[1]};
      default:  return 2'd0;
    endcase
  endfunction

  // Delay of one delay element, in ns, against the control voltage Vg (V)
  // and a process/voltage/temperature factor (1.0 = typical). Raising Vg
  // lengthens the delay by 0.5 ns/V, so a 20 mV feedback step moves a cell
  // by 10 ps and a 32-cell row by 0.32 ns; the 1.2-2.3 V control range
  // covers a +-25 % spread of the uncontrolled delay.
  localparam real VG_NOM   = 1.75;
  localparam real VG_MIN   = 1.2;
  localparam real VG_MAX   = 2.3;
  localparam real VG_SLOPE = 0.5;
  function automatic real tap_delay_ns(real vg, real pvt);
    return pvt + VG_SLOPE * (vg - VG_NOM);
  endfunction

endpackage
