// tb_tmc1004_linearity: linearity and resolution sweep of the time memory.
//
// A reference clock edge is followed by a hit on all four inputs at
// i * 0.61 ns, i = 0..1671, which covers the whole 1.024 us depth of the
// 4-channel mode (32 rows). The four arrays are given delay elements that
// are 18 % fast, typical, 18 % slow and 10 % slow, so each feedback loop
// must pull its array to 1 ns/cell. The Read Pointer is set two rows behind
// the Write Pointer and DS* stays low, so every row streams out; the
// testbench finds each hit in the DOUT stream (rise position, or cell 0 set
// after an empty row for a hit at a row boundary), turns it into a time
// (row start + position in ns) and compares it with the true hit time.
// Checks per channel: every deviation within 1.5 ns, the RMS deviation
// within 0.52 ns, the slope of a least-squares fit of measured against
// true delay equal to 1.000 within 0.001 bit/ns, and a row-to-row step
// (mean deviation at row start minus at row end) under 0.5 ns. Across
// channels: the same hit differs by at most 1 ns between arrays, and the
// slopes of the four process corners agree within 0.1 %.
`timescale 1ns / 1ps
module tb_tmc1004_linearity;
  import tmc_pkg::*;

  localparam int   NPTS = 1672;
  localparam real  STEP = 0.61;
  localparam int   D    = 2;      // rows between Write and Read Pointer

  logic       clk = 0, rst_n = 0, ds_n = 1, cs_n = 1, cio_in = 0;
  logic [3:0] tin = '0;
  logic       cio_out, cio_oe, dvalid;
  logic [5:0] dout [4];

  tmc1004 #(.PVT0(0.82), .PVT1(1.0), .PVT2(1.18), .PVT3(1.1)) dut (
    .clk, .rst_n, .mode_pins(MODE_4CH), .tin, .ds_n, .cs_n, .cio_in,
    .cio_out, .cio_oe, .dout, .dvalid);

  always #16 clk = ~clk;

  int checks = 0, failures = 0;

  // edge times, indexed by edge count since reset
  int  n_edge = 0;
  real edge_t [int];
  always @(posedge clk) if (rst_n) begin n_edge++; edge_t[n_edge] = $realtime; end

  // hit detection from the DOUT stream
  bit  hi    [4] = '{0, 0, 0, 0};
  real found [4];
  bit  got   [4] = '{0, 0, 0, 0};

  always @(posedge clk) begin
    #1;
    if (dvalid) begin
      // output after edge n_edge is the row read at edge n_edge-1, which was
      // started D edges before that
      automatic real t0 = edge_t[n_edge - 1 - D];
      for (int c = 0; c < 4; c++) begin
        automatic logic [4:0] pos = dout[c][4:0];
        automatic logic       b0  = dout[c][5];
        if (pos != 0 || (b0 && !hi[c])) begin
          found[c] = t0 + pos;   // cell pos sits at pos + 1/2 ns
          got[c]   = 1;
        end
        hi[c] = (pos != 0) ? 1'b1 : b0;
      end
    end
  end

  task automatic csr_write(logic [1:0] a, logic [6:0] d);
    @(negedge clk) begin cs_n = 0; cio_in = 1'b0; end
    @(negedge clk) cio_in = a[0];
    @(negedge clk) cio_in = a[1];
    for (int i = 0; i < 7; i++) @(negedge clk) cio_in = d[i];
    @(negedge clk) cs_n = 1;
  endtask

  real sx [4], sy [4], sxx [4], sxy [4], sdd [4], maxdev [4];
  // mean deviation of hits at the start (cells 0-3) and end (cells 28-31)
  // of a row, for the row-to-row discontinuity
  real head_sum [4], tail_sum [4];
  int  head_n [4], tail_n [4];
  real max_a2a = 0.0;
  real slope_min = 2.0, slope_max = 0.0;

  initial begin
    for (int c = 0; c < 4; c++) begin
      sx[c] = 0; sy[c] = 0; sxx[c] = 0; sxy[c] = 0; sdd[c] = 0; maxdev[c] = 0;
      head_sum[c] = 0; tail_sum[c] = 0; head_n[c] = 0; tail_n[c] = 0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (60) @(posedge clk);          // loops lock
    // Read Pointer := Write Pointer - D at the commit edge, 10 edges on
    #1;
    begin
      automatic int k = n_edge;
      csr_write(2'd1, 7'(k + 10 - D));
    end
    @(negedge clk) ds_n = 0;
    repeat (40) @(posedge clk);
    for (int i = 0; i < NPTS; i++) begin
      automatic real tau = i * STEP;
      automatic real tref, thit;
      @(posedge clk);
      tref = $realtime;
      for (int c = 0; c < 4; c++) got[c] = 0;
      #(tau) tin = 4'hF;
      thit = $realtime;
      #40 tin = 4'h0;
      repeat (D + 4) @(posedge clk);
      for (int c = 0; c < 4; c++) begin
        automatic real m = found[c] - tref;
        automatic real dev = found[c] - thit;
        checks++;
        if (!got[c] || dev > 1.5 || dev < -1.5) begin
          failures++;
          if (failures < 10) $display("FAIL ch%0d point %0d: got=%0d dev=%f", c, i, got[c], dev);
        end
        sx[c] += tau; sy[c] += m; sxx[c] += tau * tau; sxy[c] += tau * m; sdd[c] += dev * dev;
        if (dev > maxdev[c]) maxdev[c] = dev;
        if (-dev > maxdev[c]) maxdev[c] = -dev;
        begin
          automatic real inrow = tau - 32.0 * $floor(tau / 32.0);
          if (inrow < 4.0)  begin head_sum[c] += dev; head_n[c]++; end
          if (inrow >= 28.0) begin tail_sum[c] += dev; tail_n[c]++; end
        end
        // array-to-array: the same hit seen by two arrays
        if (found[c] - found[0] > max_a2a) max_a2a = found[c] - found[0];
        if (found[0] - found[c] > max_a2a) max_a2a = found[0] - found[c];
      end
    end
    for (int c = 0; c < 4; c++) begin
      automatic real slope = (NPTS * sxy[c] - sx[c] * sy[c]) / (NPTS * sxx[c] - sx[c] * sx[c]);
      automatic real rms = $sqrt(sdd[c] / NPTS);
      $display("ch%0d: slope %f bit/ns, rms deviation %f ns, max deviation %f ns, Vg %f V",
               c, slope, rms, maxdev[c],
               c == 0 ? dut.g_array[0].vg : c == 1 ? dut.g_array[1].vg :
               c == 2 ? dut.g_array[2].vg : dut.g_array[3].vg);
      checks++;
      if (slope < 0.999 || slope > 1.001) begin failures++; $display("FAIL ch%0d slope", c); end
      checks++;
      if (rms > 0.52) begin failures++; $display("FAIL ch%0d rms", c); end
      begin
        automatic real disc = head_sum[c] / head_n[c] - tail_sum[c] / tail_n[c];
        $display("ch%0d: row-to-row discontinuity %f ns", c, disc);
        checks++;
        if (disc > 0.5 || disc < -0.5) begin failures++; $display("FAIL ch%0d row-to-row", c); end
      end
      if (slope < slope_min) slope_min = slope;
      if (slope > slope_max) slope_max = slope;
    end
    $display("array-to-array difference, max %f ns; slope spread over corners %f", max_a2a, slope_max - slope_min);
    checks++;
    if (max_a2a > 1.0) begin failures++; $display("FAIL array-to-array"); end
    checks++;
    if (slope_max - slope_min > 0.001) begin failures++; $display("FAIL slope spread"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
