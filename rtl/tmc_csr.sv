// tmc_csr: the three control and status registers and their serial port.
//
//   CSR#0  [1:0] channel mode (tmc_pkg::mode_e), [5:2] one cell of each of
//          the four arrays (serial test access), [6] reads 0
//   CSR#1  Read Pointer (7 bits), read and written
//   CSR#2  Write Pointer (7 bits), read and written
//
// The registers are reached over two pins, CS* and CIO, clocked by CLK.
// A frame starts with CS* low; on each rising CLK edge one bit is taken
// from CIO, least significant first: a read flag (1 = read), the two
// address bits, then seven data bits. A write takes effect at the edge
// that takes the last data bit. For a read the chip turns CIO around after
// the address: the register is copied at the edge that takes the second
// address bit, and its bits appear on cio_out (cio_oe high) one per clock,
// to be sampled at the next seven edges. Raising CS* ends the frame at any
// point. The bidirectional pin is split into cio_in, cio_out and cio_oe.
//
// Serial cell access: the cell bits of CSR#0 address the cell at row
// Read Pointer[4:0] and column col of every array. Writing CSR#0 stores
// bits [5:2] there; reading returns the four cells. Each CSR#0 frame then
// steps col by one, so 32 frames walk a row. The mode field is loaded from
// the mode pins at reset and can be rewritten through CSR#0.
//
// The register contents and the CS*/CIO pins follow the chip; the frame
// format, the bit order, the column counter and the reset load of the mode
// are this design's choices.
`timescale 1ns / 1ps
module tmc_csr
  import tmc_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  mode_e                mode_pins,
  // serial port
  input  logic                 cs_n,
  input  logic                 cio_in,
  output logic                 cio_out,
  output logic                 cio_oe,
  // to and from the core
  output mode_e                mode,
  input  logic [PTR_W-1:0]     rp,
  input  logic [PTR_W-1:0]     wp,
  output logic                 rp_load,
  output logic                 wp_load,
  output logic [PTR_W-1:0]     ptr_wdata,
  output logic [COL_W-1:0]     cell_col,
  output logic                 cell_we,
  output logic [N_ARRAYS-1:0]  cell_wdata,
  input  logic [N_ARRAYS-1:0]  cell_rdata
);
  localparam int unsigned FRAME = 1 + 2 + CSR_DATA_W;  // 10 bits

  logic [3:0]            cnt;      // bits taken in this frame
  logic                  rd_q;
  logic [1:0]            addr_q;
  logic [CSR_DATA_W-1:0] sh;       // write data in, read data out
  csr_addr_e             addr_now;
  logic                  last_bit;

  assign addr_now = csr_addr_e'({cio_in, addr_q[0]});
  assign last_bit = !cs_n && cnt == 4'(FRAME - 1);

  function automatic logic [CSR_DATA_W-1:0] read_value(csr_addr_e a);
    unique case (a)
      CSR_MODE: return {1'b0, cell_rdata, mode};
      CSR_RP:   return rp;
      CSR_WP:   return wp;
      default:  return '0;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      rd_q   <= 1'b0;
      addr_q <= '0;
      sh     <= '0;
    end else if (cs_n) begin
      cnt    <= '0;
    end else if (cnt < 4'(FRAME)) begin
      cnt <= cnt + 1'b1;
      unique case (cnt)
        4'd0: rd_q      <= cio_in;
        4'd1: addr_q[0] <= cio_in;
        4'd2: begin
          addr_q[1] <= cio_in;
          if (rd_q) sh <= read_value(addr_now);
        end
        default:
          if (rd_q) sh <= sh >> 1;
          else      sh <= {cio_in, sh[CSR_DATA_W-1:1]};
      endcase
    end
  end

  assign cio_oe  = !cs_n && rd_q && cnt >= 4'd3 && cnt < 4'(FRAME);
  assign cio_out = cio_oe & sh[0];

  // Write strobes, at the edge taking the last data bit.
  logic                  wr_commit;
  logic [CSR_DATA_W-1:0] wdata;
  assign wr_commit = last_bit && !rd_q;
  assign wdata     = {cio_in, sh[CSR_DATA_W-1:1]};

  assign rp_load    = wr_commit && addr_q == CSR_RP;
  assign wp_load    = wr_commit && addr_q == CSR_WP;
  assign ptr_wdata  = wdata;
  assign cell_we    = wr_commit && addr_q == CSR_MODE;
  assign cell_wdata = wdata[5:2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode     <= mode_pins;
      cell_col <= '0;
    end else if (last_bit && addr_q == CSR_MODE) begin
      if (!rd_q) mode <= mode_e'(wdata[1:0]);
      cell_col <= cell_col + 1'b1;
    end
  end

  // A read frame drives CIO only while CS* is low.
  a_oe_in_frame: assert property (@(posedge clk) disable iff (!rst_n) cio_oe |-> !cs_n);

endmodule
