// tb_cbm_ctrl: self-checking testbench for the counter-based sensor controller.
// HF_CLK edges are numbered from the edge on which reset is released (edge 0,
// a main-clock edge); main-clock edges are the multiples of HF_RATIO. The
// testbench keeps its own copy of the counter fed by the controller's clr and
// cnt_en, and an independent model of the measurement: a measurement starts at
// a main edge with start_meas high when idle or on its last edge, the window is
// open on edges start+OBS_OPEN .. start+OBS_CLOSE, and it ends after
// start+OBS_CLOSE. main_edge, clr, obs_win, busy, lut_out and out_ok are
// checked before every HF_CLK edge with random start_meas and meas_val.
`timescale 1ns / 100ps
module tb_cbm_ctrl;
  localparam int unsigned W = 10, R = 10, OPEN = 1, CLOSE = 14, REF = 8;
  logic hf_clk = 1'b0, rst_n = 1'b0, start_meas = 1'b0;
  logic [W-1:0] cnt_m, meas_val;
  logic main_edge, clr, cnt_en, obs_win, busy, out_ok;
  logic [W-1:0] lut_out;
  int checks = 0, failures = 0, n_start = 0, n_win = 0, n_ok = 0, n_nok = 0, n_refused = 0;

  cbm_ctrl dut (.hf_clk, .rst_n, .start_meas, .path_sel(1'b0), .cnt(cnt_m), .meas_val,
                .main_edge, .clr, .cnt_en, .obs_win, .busy, .lut_out, .out_ok);

  always #5 hf_clk = ~hf_clk;

  always_ff @(posedge hf_clk) begin
    if (clr)         cnt_m <= '0;
    else if (cnt_en) cnt_m <= cnt_m + 1'b1;
  end

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input logic got, input logic exp, input int i);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("edge %0d: %s=%b expected %b", i, what, got, exp);
    end
  endtask

  initial begin
    bit m_busy; int s; bit me, st, win, last;
    cnt_m = '0; meas_val = '0;
    m_busy = 0; s = 0;
    @(posedge hf_clk); @(posedge hf_clk);
    rst_n <= 1'b1;                       // edge 0
    for (int i = 1; i < 3000; i++) begin
      @(negedge hf_clk);
      start_meas = ($urandom % 3 != 0);
      meas_val   = W'($urandom % 16);
      #1;
      me   = (i % R == 0);
      last = m_busy && (i - s >= CLOSE);
      st   = me && start_meas && (!m_busy || last);
      win  = m_busy && (i - s >= OPEN) && (i - s <= CLOSE);
      chk("main_edge", main_edge, me, i);
      chk("clr", clr, st, i);
      chk("obs_win", obs_win, win, i);
      chk("busy", busy, m_busy, i);
      chk("cnt_en", cnt_en, m_busy, i);
      chk("out_ok", out_ok, (int'(meas_val) <= REF), i);
      checks++;
      if (int'(lut_out) != REF) failures++;
      if (st) n_start++;
      if (me && start_meas && m_busy && !last) n_refused++;
      if (win) n_win++;
      if (out_ok) n_ok++; else n_nok++;
      @(posedge hf_clk);
      if (st) begin m_busy = 1; s = i; end
      else if (last) m_busy = 0;
    end
    $display("starts=%0d refused=%0d window_edges=%0d ok=%0d not_ok=%0d", n_start, n_refused, n_win, n_ok, n_nok);
    if (n_start == 0 || n_refused == 0 || n_win == 0 || n_nok == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
