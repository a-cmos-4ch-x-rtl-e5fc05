// tb_tmc_array: writes random rows through the timing port and random
// cells through the test port into a shadow copy, then checks row reads
// (one clock of latency, held while rd_en is low) and cell reads.
`timescale 1ns / 1ps
module tb_tmc_array;
  logic clk = 0;
  logic tw_en = 0, rd_en = 0, tc_we = 0, tc_wdata = 0, tc_rdata;
  logic [31:0] tw_row_sel = 0, rd_row_sel = 0, tw_data = 0, rd_data;
  logic [4:0] tc_row = 0, tc_col = 0;
  logic [31:0] shadow [32];
  int checks = 0, failures = 0;

  tmc_array dut (.clk, .tw_en, .tw_row_sel, .tw_data, .rd_en, .rd_row_sel, .rd_data,
                 .tc_row, .tc_col, .tc_we, .tc_wdata, .tc_rdata);

  always #16 clk = ~clk;

  initial begin
    // fill every row
    for (int r = 0; r < 32; r++) begin
      @(negedge clk);
      tw_en = 1; tw_row_sel = 32'd1 << r; tw_data = $urandom; shadow[r] = tw_data;
    end
    @(negedge clk) tw_en = 0;
    // mixed traffic
    for (int i = 0; i < 400; i++) begin
      automatic int rr = $urandom % 32;
      automatic int wr = $urandom % 32;
      @(negedge clk);
      // cell read check (combinational)
      tc_row = 5'($urandom); tc_col = 5'($urandom);
      #1 checks++;
      if (tc_rdata !== shadow[tc_row][tc_col]) begin
        failures++; $display("FAIL cell r%0d c%0d", tc_row, tc_col);
      end
      tc_we = ($urandom % 4 == 0); tc_wdata = 1'($urandom);
      tw_en = ($urandom % 2 == 0) && (wr != tc_row); tw_row_sel = 32'd1 << wr; tw_data = $urandom;
      rd_en = 1; rd_row_sel = 32'd1 << rr;
      @(posedge clk);
      begin
        automatic logic [31:0] exp_rd = shadow[rr];
        if (tc_we) shadow[tc_row][tc_col] = tc_wdata;
        if (tw_en) shadow[wr] = tw_data;
        #1 checks++;
        if (rd_data !== exp_rd) begin
          failures++; $display("FAIL read row %0d: %h expected %h", rr, rd_data, exp_rd);
        end
      end
      // hold check
      @(negedge clk) begin
        automatic logic [31:0] held = rd_data;
        rd_en = 0; tw_en = 0; tc_we = 0; rd_row_sel = 32'd1 << ((rr + 1) % 32);
        @(posedge clk); #1 checks++;
        if (rd_data !== held) begin failures++; $display("FAIL hold"); end
      end
    end
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
