// tb_tmc_readout: drives the four stage-1 row registers with rows whose code
// is known by construction, under random mode, Read Pointer and DS*, and
// checks dout/dvalid two edges after DS* is sampled, with the channel to
// array mapping of each mode. Counts dvalid cycles per mode.
`timescale 1ns / 1ps
module tb_tmc_readout;
  import tmc_pkg::*;

  logic clk = 0, rst_n = 0, ds_n = 1;
  mode_e mode = MODE_4CH;
  logic [6:0] rp = 0;
  logic [31:0] rows [4];
  logic [5:0]  dout [4];
  logic dvalid;
  int checks = 0, failures = 0;
  int valid_per_mode [4] = '{0, 0, 0, 0};

  tmc_readout dut (.clk, .rst_n, .ds_n, .mode, .rp, .rows, .dout, .dvalid);

  always #16 clk = ~clk;

  // Random row and its code, from a chosen shape.
  task automatic make_row(output logic [31:0] r, output logic [5:0] c);
    int kind = $urandom % 4;
    int p = 1 + $urandom % 31;
    case (kind)
      0: begin r = '0; c = 6'h00; end
      1: begin r = '1; c = 6'h20; end
      default: begin r = 32'hFFFF_FFFF << p; c = {1'b0, 5'(p)}; end
    endcase
  endtask

  logic [5:0]  codes [4];
  logic [5:0]  exp_dout [4];
  logic        s_valid;
  mode_e       s_mode;
  logic [6:0]  s_rp;

  initial begin
    for (int a = 0; a < 4; a++) begin rows[a] = '0; exp_dout[a] = '0; codes[a] = '0; end
    s_valid = 0; s_mode = MODE_4CH; s_rp = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      // The rows read at the last edge, for the request captured there.
      for (int a = 0; a < 4; a++) make_row(rows[a], codes[a]);
      // next request
      mode = mode_e'($urandom % 4);
      rp   = 7'($urandom);
      ds_n = ($urandom % 3 == 0);
      @(posedge clk);
      #1;
      // stage 2 result of the request captured one edge earlier
      if (s_valid) begin
        for (int c = 0; c < 4; c++) exp_dout[c] = 6'h00;
        case (s_mode)
          MODE_4CH: for (int c = 0; c < 4; c++) exp_dout[c] = codes[c];
          MODE_2CH: begin
            exp_dout[0] = codes[s_rp[5] ? 1 : 0];
            exp_dout[1] = codes[s_rp[5] ? 3 : 2];
          end
          default:  exp_dout[0] = codes[s_rp[6:5]];
        endcase
        valid_per_mode[s_mode]++;
      end
      checks++;
      if (dvalid !== s_valid) begin
        failures++; $display("FAIL dvalid=%b expected %b", dvalid, s_valid);
      end
      for (int c = 0; c < 4; c++) begin
        checks++;
        if (dout[c] !== exp_dout[c]) begin
          failures++;
          $display("FAIL mode=%0d rp=%0d ch%0d dout=%h expected %h", s_mode, s_rp, c, dout[c], exp_dout[c]);
        end
      end
      s_valid = !ds_n && mode != MODE_HOLD;
      s_mode  = mode;
      s_rp    = rp;
    end
    for (int m = 0; m < 3; m++) begin
      checks++;
      if (valid_per_mode[m] == 0) begin failures++; $display("FAIL mode %0d never read", m); end
    end
    $display("valid rows per mode: 4ch=%0d 2ch=%0d 1ch=%0d", valid_per_mode[0], valid_per_mode[1], valid_per_mode[2]);
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
