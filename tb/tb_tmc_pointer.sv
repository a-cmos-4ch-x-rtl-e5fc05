// tb_tmc_pointer: checks counting, loading, the one-hot row decoder and the
// array decoder in all four modes against a counter kept by the testbench.
`timescale 1ns / 1ps
module tb_tmc_pointer;
  import tmc_pkg::*;

  logic clk = 0, rst_n = 0, load = 0;
  mode_e mode = MODE_4CH;
  logic [6:0] load_val = '0, ptr;
  logic [31:0] row_sel;
  logic [3:0] array_sel;
  int checks = 0, failures = 0;
  logic [6:0] model;

  tmc_pointer dut (.clk, .rst_n, .mode, .load, .load_val, .ptr, .row_sel, .array_sel);

  always #16 clk = ~clk;

  function automatic logic [3:0] exp_arr(mode_e m, logic [6:0] p);
    case (m)
      MODE_4CH: return 4'hF;
      MODE_2CH: return p[5] ? 4'b1010 : 4'b0101;
      MODE_1CH: return p[6:5] == 0 ? 4'b0001 : p[6:5] == 1 ? 4'b0010 :
                       p[6:5] == 2 ? 4'b0100 : 4'b1000;
      default:  return 4'h0;
    endcase
  endfunction

  task automatic check_now();
    checks++;
    if (ptr !== model || row_sel !== (32'd1 << model[4:0]) || array_sel !== exp_arr(mode, model)) begin
      failures++;
      $display("FAIL mode=%0d ptr=%0d model=%0d row_sel=%h array_sel=%b", mode, ptr, model, row_sel, array_sel);
    end
  endtask

  initial begin
    model = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check_now();
    for (int m = 0; m < 4; m++) begin
      mode = mode_e'(m);
      for (int i = 0; i < 300; i++) begin
        @(negedge clk);
        if ($urandom % 20 == 0) begin
          load = 1; load_val = 7'($urandom);
        end else load = 0;
        @(posedge clk);
        if (load) model = load_val;
        else if (mode != MODE_HOLD) model = model + 1;
        #1 check_now();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
