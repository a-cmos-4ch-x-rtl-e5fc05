// tb_tmc1004: end-to-end test of the time memory at its default size.
//
// Four random pulse trains drive the inputs; every transition sits half a
// nanosecond off a cell sampling point, some just after a clock edge, where
// they cross a row boundary (the row before ends low, this row starts high). The testbench keeps its own model of the two pointers, the
// mode register and, per array and row, when the row was started and which
// input it recorded. For every row read while DS* is low it rebuilds the
// row from the input waveform at 1 ns steps, encodes it and compares it
// with DOUT two clocks later, so it checks the 1 ns/bit time scale, the
// ring buffer, the channel mapping and the pipeline latency together.
//
// Sequence: clock at 30 ns then 32 ns (the delay loops must step down,
// then up, and relock); 4-channel recording with continuous readout;
// switch to 2- and 1-channel mode through CSR#0; HOLD mode with serial
// cell writes and reads through CSR#0; back to 4-channel with DS* pulsed.
// Pointer loads and reads go through CSR#1/#2. Every mechanism is counted
// and one that never happened is a failure.
`timescale 1ns / 1ps
module tb_tmc1004;
  import tmc_pkg::*;

  logic       clk = 0, rst_n = 0, ds_n = 1, cs_n = 1, cio_in = 0;
  mode_e      mode_pins = MODE_4CH;
  logic [3:0] tin = '0;
  logic       cio_out, cio_oe, dvalid;
  logic [5:0] dout [4];
  real        half = 15.0;

  tmc1004 dut (.clk, .rst_n, .mode_pins, .tin, .ds_n, .cs_n, .cio_in,
               .cio_out, .cio_oe, .dout, .dvalid);

  always #(half) clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------------------------------------------------------------- counts
  int n_fb_up = 0, n_fb_dn = 0, n_rows_4 = 0, n_rows_2 = 0, n_rows_1 = 0;
  int n_rise = 0, n_boundary = 0, n_concurrent = 0, n_wrap = 0, n_ptr_load = 0;
  int n_cell_wr = 0, n_cell_rd = 0, n_ds_gap = 0, n_csr_rd = 0;

  always @(posedge clk) begin
    for (int a = 0; a < 4; a++) ;
    if (dut.g_array[0].fb_up || dut.g_array[1].fb_up || dut.g_array[2].fb_up || dut.g_array[3].fb_up) n_fb_up++;
    if (dut.g_array[0].fb_dn || dut.g_array[1].fb_dn || dut.g_array[2].fb_dn || dut.g_array[3].fb_dn) n_fb_dn++;
  end

  // ------------------------------------------------------- input waveform
  real tr_time [4][$];
  bit  tr_lvl  [4][$];
  bit  gen_on = 0;

  function automatic bit level_at(int ch, real t);
    bit l = 0;
    for (int i = 0; i < tr_time[ch].size(); i++)
      if (tr_time[ch][i] <= t) l = tr_lvl[ch][i];
    return l;
  endfunction

  task automatic set_tin(int ch, bit v);
    tin[ch] = v;
    tr_time[ch].push_back($realtime);
    tr_lvl[ch].push_back(v);
  endtask

  // Pulse trains, transitions at half-nanosecond offsets after an edge.
  for (genvar ch = 0; ch < 4; ch++) begin : g_gen
    initial begin
      wait (gen_on);
      forever begin
        automatic real off;
        repeat (2 + $urandom % 3) @(posedge clk);
        off = ($urandom % 8 == 0) ? 0.25 : 1.0 + ($urandom % 30);
        #(off) set_tin(ch, 1);
        if (off < 0.5) n_boundary++;
        n_rise++;
        repeat (2 + $urandom % 2) @(posedge clk);
        #(1.0 + ($urandom % 30)) set_tin(ch, 0);
      end
    end
  end

  // ------------------------------------------------------------ chip model
  logic [6:0] m_wp = 0, m_rp = 0;
  mode_e      m_mode = MODE_4CH;
  bit         pend_wp = 0, pend_rp = 0, pend_mode = 0;
  logic [6:0] pend_val;
  mode_e      pend_mode_val;
  bit         record_ok = 0;

  // per array and row: start time of the stored row and its input
  real  mem_t  [4][32];
  int   mem_ch [4][32];
  bit   mem_ok [4][32];
  real  lq_t   [4];
  int   lq_ch  [4];
  bit   lq_on  [4];
  logic [4:0] lq_row;

  function automatic logic [3:0] sel(mode_e m, logic [6:0] p);
    case (m)
      MODE_4CH: return 4'b1111;
      MODE_2CH: return p[5] ? 4'b1010 : 4'b0101;
      MODE_1CH: return 4'b0001 << p[6:5];
      default:  return 4'b0000;
    endcase
  endfunction

  function automatic int chan(mode_e m, int a);
    return m == MODE_4CH ? a : m == MODE_2CH ? a / 2 : 0;
  endfunction

  // Row as the ideal 1 ns sampler would store it (cell c at c + 0.5 ns),
  // and its code.
  function automatic logic [5:0] ideal_code(int ch, real t0);
    logic [31:0] w;
    logic [4:0]  pos = 0;
    for (int c = 0; c < 32; c++) w[c] = level_at(ch, t0 + c + 0.5);
    for (int c = 1; c < 32; c++) if (!w[c-1] && w[c]) pos = pos | 5'(c);
    return {w[0], pos};
  endfunction

  bit         rq_on = 0;
  bit         rq_ok [4];
  logic [5:0] rq_code [4];
  mode_e      rq_mode;
  logic [5:0] exp_dout [4] = '{0, 0, 0, 0};

  initial begin
    forever begin
      @(posedge clk);
      begin
        automatic real t = $realtime;
        automatic bit  rd = !ds_n && m_mode != MODE_HOLD;
        automatic bit  nrq_ok [4];
        automatic logic [5:0] nrq_code [4];
        automatic logic [3:0] rs = sel(m_mode, m_rp);
        // stage 1 read at this edge, from memory before this edge's write
        for (int c = 0; c < 4; c++) begin nrq_ok[c] = 1; nrq_code[c] = 0; end
        if (rd) begin
          for (int a = 0; a < 4; a++) begin
            if (rs[a]) begin
              automatic int c = m_mode == MODE_4CH ? a : m_mode == MODE_2CH ? a / 2 : 0;
              automatic int r = m_rp[4:0];
              nrq_ok[c]   = mem_ok[a][r];
              nrq_code[c] = mem_ok[a][r] ? ideal_code(mem_ch[a][r], mem_t[a][r]) : 6'h0;
              if (lq_on[a]) n_concurrent++;
            end
          end
        end
        // timing writes of the rows started at the last edge
        for (int a = 0; a < 4; a++)
          if (lq_on[a]) begin
            mem_t[a][lq_row] = lq_t[a]; mem_ch[a][lq_row] = lq_ch[a]; mem_ok[a][lq_row] = record_ok;
          end
        // rows started at this edge
        for (int a = 0; a < 4; a++) begin
          lq_on[a] = sel(m_mode, m_wp)[a]; lq_t[a] = t; lq_ch[a] = chan(m_mode, a);
        end
        lq_row = m_wp[4:0];
        // pointers and mode
        if (pend_wp) begin m_wp = pend_val; pend_wp = 0; n_ptr_load++; end
        else if (m_mode != MODE_HOLD) m_wp = m_wp + 1;
        if (pend_rp) begin m_rp = pend_val; pend_rp = 0; n_ptr_load++; end
        else if (m_mode != MODE_HOLD) m_rp = m_rp + 1;
        if (m_mode == MODE_4CH && m_wp[4:0] == 0) n_wrap++;
        if (m_mode == MODE_1CH && m_wp == 0) n_wrap++;
        if (pend_mode) begin m_mode = pend_mode_val; pend_mode = 0; end
        // check the output of the read from the last edge
        #1;
        check(dvalid == rq_on, "dvalid");
        if (rq_on) begin
          for (int c = 0; c < 4; c++) exp_dout[c] = rq_code[c];
          for (int c = 0; c < 4; c++)
            if (rq_ok[c]) begin
              check(dout[c] == exp_dout[c], "dout code");
              if (dout[c] != exp_dout[c] && failures < 20)
                $display("  ch%0d dout=%h expected %h mode=%0d", c, dout[c], exp_dout[c], rq_mode);
            end
          if (rq_ok[0] && rq_mode == MODE_4CH) n_rows_4++;
          if (rq_ok[0] && rq_mode == MODE_2CH) n_rows_2++;
          if (rq_ok[0] && rq_mode == MODE_1CH) n_rows_1++;
        end else if (!rd) n_ds_gap++;
        rq_on = rd; rq_mode = m_mode;
        for (int c = 0; c < 4; c++) begin rq_ok[c] = nrq_ok[c]; rq_code[c] = nrq_code[c]; end
      end
    end
  end

  // ----------------------------------------------------------- CSR access
  task automatic csr_frame(bit rd, logic [1:0] a, logic [6:0] wd, output logic [6:0] rdv);
    @(negedge clk) begin cs_n = 0; cio_in = rd; end
    @(negedge clk) cio_in = a[0];
    @(negedge clk) cio_in = a[1];
    for (int i = 0; i < 7; i++) begin
      @(negedge clk);
      if (rd) begin
        @(posedge clk) rdv[i] = cio_out;
      end else begin
        cio_in = wd[i];
        if (i == 6) begin
          pend_val = wd;
          if (a == 2'd1) pend_rp = 1;
          if (a == 2'd2) pend_wp = 1;
          if (a == 2'd0) begin
            pend_mode = 1; pend_mode_val = mode_e'(wd[1:0]);
            // the test write lands in the Read Pointer's row at the next edge
            for (int ar = 0; ar < 4; ar++) mem_ok[ar][m_rp[4:0]] = 0;
          end
        end
      end
    end
    @(negedge clk) cs_n = 1;
  endtask

  task automatic csr_write(logic [1:0] a, logic [6:0] d);
    logic [6:0] unused;
    csr_frame(0, a, d, unused);
  endtask

  // reads a pointer and checks it against the model, allowing for the
  // snapshot taken at the edge of the second address bit
  task automatic check_ptr(logic [1:0] a);
    logic [6:0] v, expv;
    fork
      begin
        repeat (2) @(negedge clk);
        @(negedge clk) expv = (a == 2'd1) ? m_rp : m_wp;
      end
    join_none
    csr_frame(1, a, 0, v);
    check(v == expv, "pointer read");
    n_csr_rd++;
  endtask

  // ---------------------------------------------------------------- test
  logic [4:0] m_col = 0;
  logic [3:0] cell_model [32];

  initial begin
    for (int a = 0; a < 4; a++) for (int r = 0; r < 32; r++) mem_ok[a][r] = 0;
    for (int a = 0; a < 4; a++) lq_on[a] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // loops lock to a 30 ns clock, then to the 32 ns (31.25 MHz) clock
    repeat (60) @(posedge clk);
    half = 16.0;
    repeat (60) @(posedge clk);
    record_ok = 1;
    gen_on = 1;
    // 4-channel: trigger latency of 20 rows
    csr_write(2'd2, 7'd0);
    check_ptr(2'd2);
    csr_write(2'd1, 7'(7'd0 - 7'd9));
    check_ptr(2'd1);
    @(negedge clk) ds_n = 0;
    repeat (150) @(posedge clk);
    // 2-channel
    csr_write(2'd0, {1'b0, 4'b0000, MODE_2CH}); m_col++;
    repeat (200) @(posedge clk);
    // 1-channel, latency of 100 rows
    csr_write(2'd0, {1'b0, 4'b0000, MODE_1CH}); m_col++;
    csr_write(2'd1, 7'(m_wp - 7'd100 + 7'd11));
    check_ptr(2'd1);
    repeat (400) @(posedge clk);
    check_ptr(2'd2);
    // HOLD: serial cell access on row 5 of every array
    @(negedge clk) ds_n = 1;
    csr_write(2'd0, {1'b0, 4'b0000, MODE_HOLD});
    cell_model[m_col] = 4'b0000; m_col++;
    csr_write(2'd1, 7'd5);
    for (int k = 0; k < 32; k++) begin
      automatic logic [3:0] v = 4'($urandom);
      csr_write(2'd0, {1'b0, v, MODE_HOLD});
      cell_model[m_col] = v; m_col++; n_cell_wr++;
    end
    for (int k = 0; k < 32; k++) begin
      logic [6:0] v;
      csr_frame(1, 2'd0, 0, v);
      check(v[5:2] == cell_model[m_col] && v[1:0] == MODE_HOLD, "cell read");
      m_col++; n_cell_rd++;
    end
    check_ptr(2'd1);
    // 4-channel again, DS* pulsed
    csr_write(2'd0, {1'b0, 4'b0000, MODE_4CH}); m_col++;
    for (int k = 0; k < 40; k++) begin
      @(negedge clk) ds_n = $urandom % 2;
      repeat (1 + $urandom % 4) @(posedge clk);
    end
    @(negedge clk) ds_n = 1;
    repeat (3) @(posedge clk);

    $display("feedback steps up=%0d down=%0d", n_fb_up, n_fb_dn);
    $display("rows checked 4ch=%0d 2ch=%0d 1ch=%0d, rises=%0d boundary=%0d",
             n_rows_4, n_rows_2, n_rows_1, n_rise, n_boundary);
    $display("read during write=%0d wraps=%0d ptr loads=%0d ptr reads=%0d cell wr=%0d rd=%0d ds gaps=%0d",
             n_concurrent, n_wrap, n_ptr_load, n_csr_rd, n_cell_wr, n_cell_rd, n_ds_gap);
    check(n_fb_up > 0, "feedback stepped up");
    check(n_fb_dn > 0, "feedback stepped down");
    check(n_rows_4 > 0 && n_rows_2 > 0 && n_rows_1 > 0, "all modes read");
    check(n_boundary > 0, "row-boundary hit");
    check(n_concurrent > 0 && n_wrap > 0 && n_ptr_load > 0, "ring buffer use");
    check(n_cell_wr > 0 && n_cell_rd > 0 && n_ds_gap > 0 && n_csr_rd > 0, "csr use");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
