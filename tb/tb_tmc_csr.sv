// tb_tmc_csr: plays the host side of the CS*/CIO serial port. Checks the
// reset load of the mode pins, mode write and read back, Read and Write
// Pointer loads and reads, cell test writes (data and column) and reads,
// the column step per CSR#0 frame, that an aborted frame writes nothing,
// and that CIO is driven only in a read's data phase.
`timescale 1ns / 1ps
module tb_tmc_csr;
  import tmc_pkg::*;

  logic clk = 0, rst_n = 0, cs_n = 1, cio_in = 0, cio_out, cio_oe;
  mode_e mode_pins = MODE_2CH, mode;
  logic [6:0] rp = 7'd11, wp = 7'd99, ptr_wdata;
  logic rp_load, wp_load, cell_we;
  logic [4:0] cell_col;
  logic [3:0] cell_wdata, cell_rdata;
  int checks = 0, failures = 0;
  int rp_loads = 0, wp_loads = 0, cell_writes = 0;
  logic [6:0] last_ptr;
  logic [3:0] last_cell;
  logic [4:0] last_col;

  tmc_csr dut (.clk, .rst_n, .mode_pins, .cs_n, .cio_in, .cio_out, .cio_oe, .mode,
               .rp, .wp, .rp_load, .wp_load, .ptr_wdata, .cell_col, .cell_we,
               .cell_wdata, .cell_rdata);

  always #16 clk = ~clk;

  // cell data seen by the port depends on the column, so reads check it
  assign cell_rdata = cell_col[3:0] ^ 4'b1010;

  always @(posedge clk) begin
    if (rp_load) begin rp_loads++; last_ptr <= ptr_wdata; end
    if (wp_load) begin wp_loads++; last_ptr <= ptr_wdata; end
    if (cell_we) begin cell_writes++; last_cell <= cell_wdata; last_col <= cell_col; end
    if (cio_oe && cs_n) begin failures++; $display("FAIL cio driven outside frame"); end
  end

  task automatic check(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++; $display("FAIL %s: %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic send_bit(logic b);
    @(negedge clk) cio_in = b;
    @(posedge clk);
  endtask

  task automatic csr_write(logic [1:0] a, logic [6:0] d, int abort_after = 99);
    @(negedge clk) begin cs_n = 0; cio_in = 1'b0; end
    @(posedge clk);
    send_bit(a[0]); send_bit(a[1]);
    for (int i = 0; i < 7 && i < abort_after; i++) send_bit(d[i]);
    @(negedge clk) cs_n = 1;
  endtask

  task automatic csr_read(logic [1:0] a, output logic [6:0] d);
    @(negedge clk) begin cs_n = 0; cio_in = 1'b1; end
    @(posedge clk);
    send_bit(a[0]); send_bit(a[1]);
    for (int i = 0; i < 7; i++) begin
      @(negedge clk);
      checks++;
      if (!cio_oe) begin failures++; $display("FAIL cio_oe low in data phase"); end
      @(posedge clk) d[i] = cio_out;
    end
    @(negedge clk) cs_n = 1;
  endtask

  logic [6:0] d;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(mode, MODE_2CH, "mode loaded from pins");
    check(cell_col, 0, "column after reset");
    // CSR#1 and CSR#2 reads
    csr_read(2'd1, d); check(d, 7'd11, "read RP");
    csr_read(2'd2, d); check(d, 7'd99, "read WP");
    // pointer writes
    csr_write(2'd1, 7'd77); check(rp_loads, 1, "rp_load count"); check(last_ptr, 7'd77, "rp value");
    csr_write(2'd2, 7'd5);  check(wp_loads, 1, "wp_load count"); check(last_ptr, 7'd5, "wp value");
    check(cell_col, 0, "pointer frames leave column");
    // CSR#0: mode 1ch, cell bits 1011 -> column 0, column steps
    csr_write(2'd0, {1'b0, 4'b1011, 2'd2});
    check(mode, MODE_1CH, "mode written");
    check(cell_writes, 1, "cell write count");
    check(last_cell, 4'b1011, "cell data");
    check(last_col, 0, "cell column");
    check(cell_col, 1, "column stepped");
    // read CSR#0: cells of column 1 and the mode
    csr_read(2'd0, d);
    check(d, {1'b0, 4'(5'd1 ^ 5'b01010), 2'd2}, "read CSR0");
    check(cell_col, 2, "column stepped by read");
    // walk a few more columns
    for (int k = 2; k < 40; k++) begin
      automatic logic [3:0] v = 4'($urandom);
      csr_write(2'd0, {1'b0, v, 2'd0});
      check(last_cell, v, "walk data");
      check(last_col, k % 32, "walk column");
    end
    check(mode, MODE_4CH, "mode after walk");
    // aborted frame: no write
    csr_write(2'd1, 7'd3, 4);
    check(rp_loads, 1, "aborted frame did not load");
    // unused address reads 0
    csr_read(2'd3, d); check(d, 0, "read unused");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
