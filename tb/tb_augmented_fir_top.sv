// tb_augmented_fir_top: end-to-end testbench of augmented_fir_top with every
// parameter at its default. Both filters run at the same time, each with its
// own clocks, and the testbench plays the propagation delay of their
// monitored paths by forcing the nets in front of the monitored flip-flops.
//
// Razor half (10 ns clock, clk_dly = clk delayed by 5.5 ns): the 64 product
// bits normally arrive 6 ns after the launching edge; in random cycles one
// tap's products arrive late, 0.2 ns or 5.2 ns after the edge that should
// have captured them (minimum- and maximum-delay faults). Correction enables
// are random per tap. A reference of the 64 registers checks data_out after
// every edge and the 64 error flags and metric_ok in every low phase.
//
// Counter half (100 ns main clock, 10 ns HF clock): the monitored product bit
// arrives after a random delay of 0 to 15 HF periods; a measurement is taken
// every second main-clock edge and checked against floor(delay / 10 ns), and
// out_ok against the reference of 8 periods. data_out is checked against a
// reference that uses the bit the register actually captured.
//
// Each mechanism must occur at least once: late data of both kinds detected,
// Razor restore, error flagged without restore, a measurement above and one
// within the reference, a transition with the clock edge, one beyond the
// observability window and a stale capture by the counter-monitored register.
`timescale 1ns / 100ps
module tb_augmented_fir_top;
  import fir_pkg::*;
  localparam int NR = TAPS * PROD_W;
  localparam int N  = 600;            // Razor-half clock edges
  localparam int M  = 300;            // counter-half main clock edges
  localparam int CB = 15;             // monitored product bit of the counter half
  localparam int unsigned CF [TAPS] = '{141, 249, 249, 141};

  int checks = 0, failures = 0;

  // ---------------------------------------------------------------- DUT
  logic rz_clk = 1'b0, rz_clk_dly = 1'b1, rz_rst_n = 1'b0;
  sample_t rz_data_in = '0;
  logic [NR-1:0] rz_r = '0, rz_e, pd;
  out_t rz_data_out;
  logic rz_metric_ok;
  logic cb_main_clk = 1'b0, cb_hf_clk = 1'b0, cb_rst_n = 1'b0, cb_start_meas = 1'b0;
  sample_t cb_data_in = '0;
  out_t cb_data_out;
  logic [9:0] cb_meas_val;
  logic cb_out_ok;
  logic cps_p = 1'b0;

  augmented_fir_top dut (.*);

  always #5 rz_clk = ~rz_clk;
  initial begin rz_clk_dly = 1'b1; #5.5; forever begin rz_clk_dly = ~rz_clk_dly; #5; end end
  always #5 cb_hf_clk = ~cb_hf_clk;
  initial begin #5; forever begin cb_main_clk = ~cb_main_clk; #50; end end

  initial begin
    force dut.u_fir_razor.prod_d = pd;
    force dut.u_fir_cbm.cps_d = cps_p;
  end

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit rz_done = 0, cb_done = 0;

  // ---------------------------------------------------------------- Razor half
  int n_min = 0, n_max = 0, n_det = 0, n_restore = 0, n_flag_only = 0;
  int unsigned rsmp [0:N+8];
  int          late [0:N+8];
  int          kind [0:N+8];
  logic [TAPS-1:0] rtap [0:N+8];
  logic [NR-1:0] vn;

  function automatic logic [PROD_W-1:0] rprod(int k, int i);
    int idx = k - 1 - i + 4;
    if (idx < 0) return '0;
    return PROD_W'(rsmp[idx] * CF[i]);
  endfunction

  function automatic logic [NR-1:0] rall(int k);
    logic [NR-1:0] v;
    for (int i = 0; i < TAPS; i++) v[i*PROD_W +: PROD_W] = rprod(k, i);
    return v;
  endfunction

  function automatic logic [OUT_W-1:0] rz_ref_out(logic [NR-1:0] q);
    int unsigned s = 0;
    for (int i = 0; i < TAPS; i++) s += int'(q[i*PROD_W +: PROD_W]);
    return OUT_W'(s >> 2);
  endfunction

  function automatic logic [NR-1:0] rmask(logic [TAPS-1:0] rt);
    logic [NR-1:0] m;
    for (int i = 0; i < TAPS; i++) m[i*PROD_W +: PROD_W] = {PROD_W{rt[i]}};
    return m;
  endfunction

  initial begin
    logic [NR-1:0] qm, qn, dedge, rst_m, vprev, vk;
    for (int k = 0; k <= N + 8; k++) begin
      rsmp[k] = (k < 4) ? 0 : $urandom % 256;
      late[k] = (k > 8 && $urandom % 8 == 0) ? 1 + int'($urandom % TAPS) : 0;
      kind[k] = 1 + int'($urandom % 2);
      rtap[k] = TAPS'($urandom);
    end
    pd = '0; qm = '0;
    #22 rz_rst_n = 1'b1;
    rz_data_in = sample_t'(rsmp[4]); rz_r = rmask(rtap[4]);
    for (int k = 0; k < N; k++) begin
      @(posedge rz_clk);
      vprev = rall(k - 1);
      vk    = rall(k);
      dedge = vk;
      if (late[k+4] != 0) dedge[(late[k+4]-1)*PROD_W +: PROD_W] = vprev[(late[k+4]-1)*PROD_W +: PROD_W];
      rst_m = (qm ^ vprev) & rmask(rtap[k+4]);
      qn    = (rst_m & vprev) | (~rst_m & dedge);
      if (rst_m != '0) n_restore++;
      vn = rall(k + 1);
      fork
        automatic int kk = k + 1;
        automatic logic [NR-1:0] vnext = vn;
        automatic int lt = late[k+5] - 1;
        begin
          #6;
          for (int i = 0; i < TAPS; i++)
            if (late[kk+4] != i + 1) pd[i*PROD_W +: PROD_W] = vnext[i*PROD_W +: PROD_W];
          if (late[kk+4] != 0) begin
            if (kind[kk+4] == 1) #4.2; else #9.2;
            pd[lt*PROD_W +: PROD_W] = vnext[lt*PROD_W +: PROD_W];
          end
        end
      join_none
      #1;
      checks++;
      if (rz_data_out !== rz_ref_out(qm)) begin
        failures++;
        $display("razor edge %0d: data_out=%h expected %h", k, rz_data_out, rz_ref_out(qm));
      end
      qm = qn;
      #6;
      checks += 2;
      if (rz_e !== (qm ^ vk)) begin
        failures++;
        $display("razor edge %0d: e=%h expected %h", k, rz_e, qm ^ vk);
      end
      if (rz_metric_ok !== ((qm ^ vk) == '0)) failures++;
      if (late[k+4] != 0) begin
        if (kind[k+4] == 1) n_min++; else n_max++;
        if (rz_e != '0) begin
          n_det++;
          if (rtap[k+5][late[k+4]-1] == 1'b0) n_flag_only++;
        end
      end
      rz_data_in = sample_t'(rsmp[k+5]);
      rz_r = rmask(rtap[k+5]);
    end
    rz_done = 1;
  end

  // ---------------------------------------------------------------- counter half
  int n_meas = 0, n_late = 0, n_ok_nz = 0, n_zero = 0, n_outside = 0, n_stale = 0;
  int unsigned csmp [0:M+8];
  int          dly  [0:M+8];

  function automatic logic [PROD_W-1:0] cprod(int k, int i);
    int idx = k - 1 - i + 4;
    if (idx < 0) return '0;
    return PROD_W'(csmp[idx] * CF[i]);
  endfunction

  initial begin
    logic [PROD_W-1:0] pq [TAPS];
    logic [OUT_W-1:0] yexp;
    logic cap, vnew, vold, chg;
    int exp_meas, s;
    for (int k = 0; k <= M + 8; k++) begin
      csmp[k] = (k < 4) ? 0 : $urandom % 256;
      if (k % 2 == 1) dly[k] = 83;
      else case ($urandom % 6)
        0: dly[k] = 0;
        1: dly[k] = 10 * int'($urandom % 9) + 3 + int'($urandom % 5);
        2, 3: dly[k] = 10 * (9 + int'($urandom % 5)) + 3 + int'($urandom % 5);
        4: dly[k] = 10 * (14 + int'($urandom % 2)) + 3 + int'($urandom % 5);
        default: dly[k] = 10 * (5 + int'($urandom % 10)) + 3 + int'($urandom % 5);
      endcase
    end
    for (int i = 0; i < TAPS; i++) pq[i] = '0;
    exp_meas = 0;
    @(posedge cb_main_clk);
    @(posedge cb_main_clk) cb_rst_n <= 1'b1;
    cb_data_in = sample_t'(csmp[4]);
    cb_start_meas = 1'b1;
    for (int k = 0; k < M; k++) begin
      @(posedge cb_main_clk);
      s = 0;
      for (int i = 0; i < TAPS; i++) s += int'(pq[i]);
      yexp = OUT_W'(s >> 2);
      vnew = cprod(k, 1)[CB];
      vold = cprod(k - 1, 1)[CB];
      cap  = (k == 0 || dly[k-1+4] < 100) ? vnew : vold;
      if (cap != vnew) n_stale++;
      for (int i = 0; i < TAPS; i++) pq[i] = cprod(k, i);
      pq[1][CB] = cap;
      fork
        automatic int d = dly[k+4];
        automatic logic b = cprod(k + 1, 1)[CB];
        if (d == 0) cps_p <= b;
        else #(d) cps_p = b;
      join_none
      if (k % 2 == 0) begin
        chg = (cprod(k + 1, 1)[CB] != cprod(k, 1)[CB]);
        if (!chg) exp_meas = 0;
        else if (dly[k+4] > 140) begin exp_meas = 0; n_outside++; end
        else exp_meas = dly[k+4] / 10;
        if (chg && dly[k+4] == 0) n_zero++;
      end
      #1;
      checks++;
      if (cb_data_out !== yexp) begin
        failures++;
        $display("counter edge %0d: data_out=%h expected %h", k, cb_data_out, yexp);
      end
      #78;
      cb_data_in = sample_t'(csmp[k+5]);
      cb_start_meas = (k % 2 == 1);
      if (k % 2 == 1) begin
        checks += 2;
        if (int'(cb_meas_val) != exp_meas) begin
          failures++;
          $display("counter edge %0d: meas_val=%0d expected %0d", k - 1, cb_meas_val, exp_meas);
        end
        if (cb_out_ok !== (exp_meas <= 8)) failures++;
        if (exp_meas > 8) n_late++; else if (exp_meas > 0) n_ok_nz++;
        n_meas++;
      end
    end
    cb_done = 1;
  end

  // ---------------------------------------------------------------- summary
  initial begin
    wait (rz_done && cb_done);
    $display("razor: late(min)=%0d late(max)=%0d detected=%0d restores=%0d flagged_only=%0d",
             n_min, n_max, n_det, n_restore, n_flag_only);
    $display("counter: measurements=%0d late(not ok)=%0d ok_nonzero=%0d zero_delay=%0d outside_window=%0d stale_captures=%0d",
             n_meas, n_late, n_ok_nz, n_zero, n_outside, n_stale);
    if (n_min == 0)       begin failures++; $display("never happened: minimum-delay fault"); end
    if (n_max == 0)       begin failures++; $display("never happened: maximum-delay fault"); end
    if (n_det == 0)       begin failures++; $display("never happened: Razor detection"); end
    if (n_restore == 0)   begin failures++; $display("never happened: Razor restore"); end
    if (n_flag_only == 0) begin failures++; $display("never happened: error without restore"); end
    if (n_late == 0)      begin failures++; $display("never happened: delay above reference"); end
    if (n_ok_nz == 0)     begin failures++; $display("never happened: delay within reference"); end
    if (n_zero == 0)      begin failures++; $display("never happened: zero-delay transition"); end
    if (n_outside == 0)   begin failures++; $display("never happened: transition beyond window"); end
    if (n_stale == 0)     begin failures++; $display("never happened: stale capture"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
