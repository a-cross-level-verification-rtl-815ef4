// tb_fir_cbm: self-checking testbench for the FIR filter with one product bit
// monitored by the counter-based delay sensor.
//
// main_clk has a 100 ns period, hf_clk 10 ns, rising edges aligned; reset is
// released on a main_clk edge. The testbench plays the monitored path: it
// forces the net cps_d (bit 15 of the tap-1 product, the flip-flop input the
// sensor watches) and gives the new value computed from its own sample
// history a chosen delay after the main_clk edge that launches it. Every
// second edge a measurement is started and the delay is random: 0 (with the
// edge), whole hf_clk periods plus a fraction, inside or beyond the 14-period
// window, and sometimes past the next main_clk edge, so that the product
// register captures a stale bit. On the other edges the value arrives 83 ns
// after the edge. Checked: meas_val = floor(delay / 10 ns) when the bit
// changed inside the window and 0 otherwise, out_ok = (meas_val <= 8), and
// data_out against a reference filter that uses the bit actually captured.
`timescale 1ns / 100ps
module tb_fir_cbm;
  import fir_pkg::*;
  localparam int N  = 400;           // main_clk edges
  localparam int CB = 15;            // monitored product bit
  localparam int unsigned CF [TAPS] = '{141, 249, 249, 141};

  logic main_clk = 1'b0, hf_clk = 1'b0, rst_n = 1'b0, start_meas = 1'b0;
  sample_t data_in = '0;
  out_t data_out;
  logic [9:0] meas_val;
  logic out_ok;
  logic cps_p = 1'b0;
  int checks = 0, failures = 0;
  int n_meas = 0, n_late = 0, n_ok_nz = 0, n_zero = 0, n_nochange = 0, n_outside = 0, n_stale = 0;

  fir_cbm dut (.main_clk, .hf_clk, .rst_n, .data_in, .start_meas, .data_out, .meas_val, .out_ok);

  always #5 hf_clk = ~hf_clk;
  initial begin #5; forever begin main_clk = ~main_clk; #50; end end

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial force dut.cps_d = cps_p;

  int unsigned smp [0:N+8];      // smp[k+4]: sample applied before edge k
  int          dly [0:N+8];      // dly[k+4]: arrival delay (ns) of the bit launched at edge k

  function automatic logic [PROD_W-1:0] vprod(int k, int i);   // product for edge k
    int idx = k - 1 - i + 4;
    if (idx < 0) return '0;
    return PROD_W'(smp[idx] * CF[i]);
  endfunction

  initial begin
    logic [PROD_W-1:0] pq [TAPS];    // reference product registers
    logic [OUT_W-1:0] yexp;
    logic cap, vnew, vold;
    int exp_meas, s;
    for (int k = 0; k <= N + 8; k++) begin
      smp[k] = (k < 4) ? 0 : $urandom % 256;
      if (k % 2 == 1) dly[k] = 83;
      else case ($urandom % 6)
        0: dly[k] = 0;
        1: dly[k] = 10 * int'($urandom % 9) + 3 + int'($urandom % 5);          // within reference
        2, 3: dly[k] = 10 * (9 + int'($urandom % 5)) + 3 + int'($urandom % 5); // 9..13 periods
        4: dly[k] = 10 * (14 + int'($urandom % 2)) + 3 + int'($urandom % 5);  // beyond window
        default: dly[k] = 10 * (5 + int'($urandom % 10)) + 3 + int'($urandom % 5);
      endcase
    end
    for (int i = 0; i < TAPS; i++) pq[i] = '0;
    exp_meas = 0;
    @(posedge main_clk);
    @(posedge main_clk) rst_n <= 1'b1;      // edge k = -1; first active edge k = 0
    data_in = sample_t'(smp[4]);
    start_meas = 1'b1;
    for (int k = 0; k < N; k++) begin
      @(posedge main_clk);
      // reference: data_out from registers before this edge, then register update
      s = 0;
      for (int i = 0; i < TAPS; i++) s += int'(pq[i]);
      yexp = OUT_W'(s >> 2);
      // bit captured at edge k: value for edge k if it arrived, else the older one
      vnew = vprod(k, 1)[CB];
      vold = vprod(k - 1, 1)[CB];
      cap  = (k == 0 || dly[k-1+4] < 100) ? vnew : vold;
      if (cap != vnew) n_stale++;
      for (int i = 0; i < TAPS; i++) pq[i] = vprod(k, i);
      pq[1][CB] = cap;
      // launch the bit for edge k+1
      fork
        automatic int d = dly[k+4];
        automatic logic b = vprod(k + 1, 1)[CB];
        if (d == 0) cps_p <= b;
        else #(d) cps_p = b;
      join_none
      if (k % 2 == 0) begin
        logic chg;
        chg = (vprod(k + 1, 1)[CB] != vprod(k, 1)[CB]);
        if (!chg) begin exp_meas = 0; n_nochange++; end
        else if (dly[k+4] > 140) begin exp_meas = 0; n_outside++; end
        else exp_meas = dly[k+4] / 10;
        if (chg && dly[k+4] == 0) n_zero++;
      end
      #1;
      checks++;
      if (data_out !== yexp) begin
        failures++;
        $display("edge %0d: data_out=%h expected %h", k, data_out, yexp);
      end
      #78;
      data_in = sample_t'(smp[k+5]);
      start_meas = (k % 2 == 1);
      if (k % 2 == 1) begin
        // end of a measurement started at edge k-1
        checks += 2;
        if (int'(meas_val) != exp_meas) begin
          failures++;
          $display("edge %0d: meas_val=%0d expected %0d", k - 1, meas_val, exp_meas);
        end
        if (out_ok !== (exp_meas <= 8)) failures++;
        if (exp_meas > 8) n_late++; else if (exp_meas > 0) n_ok_nz++;
        n_meas++;
      end
    end
    $display("measurements=%0d late(not ok)=%0d ok_nonzero=%0d zero_delay=%0d no_transition=%0d outside_window=%0d stale_captures=%0d",
             n_meas, n_late, n_ok_nz, n_zero, n_nochange, n_outside, n_stale);
    if (n_late == 0 || n_ok_nz == 0 || n_zero == 0 || n_outside == 0 || n_stale == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
