// tb_mutation_analysis: mutation analysis of both augmented filters, run on
// augmented_fir_top with default parameters.
//
// A delay fault ("mutant") postpones the arrival of one monitored signal.
//  - Razor filter: for each of the 64 Razor-protected product bits, one
//    minimum-delay fault (value arrives 0.2 ns after the capturing edge) and
//    one maximum-delay fault (5.2 ns after it, just before the falling edge)
//    are applied, one at a time, each in a cycle where that bit changes, with
//    the bit's correction enable high. 128 faults in all. For each the
//    testbench records whether an error flag rose, whether the filter output
//    differed from the fault-free reference (killed = either), and whether the
//    late value reached the register one cycle later (corrected). The full
//    register-level reference is checked every cycle as in tb_fir_razor.
//  - Counter-monitored filter: one minimum-delay fault (the smallest delay
//    the counter resolves: just past the first HF_CLK edge, 10.3 ns), one
//    maximum-delay fault (just before the next main-clock edge) and 13
//    delta-delay faults spread evenly over the measurable range, 1 to 13
//    HF_CLK periods (delay = 10.3 ns + j * 120/13 ns, j = 0..12), each in a
//    measurement where the bit changes. Unfaulted measurements must read 0.
//    Killed = meas_val != 0, error = out_ok low.
// Expected with this design: Razor 100 % detected, killed and corrected;
// counter minimum killed without error, maximum killed with error, delta
// 13 of 13 killed and 4 of 13 (readings 9..12 periods) errors, 30.77 %.
`timescale 1ns / 100ps
module tb_mutation_analysis;
  import fir_pkg::*;
  localparam int NR = TAPS * PROD_W;
  localparam int N  = 2400;           // Razor-half clock edges
  localparam int M  = 400;            // counter-half main clock edges
  localparam int CB = 15;
  localparam int unsigned CF [TAPS] = '{141, 249, 249, 141};

  int checks = 0, failures = 0;

  logic rz_clk = 1'b0, rz_clk_dly = 1'b1, rz_rst_n = 1'b0;
  sample_t rz_data_in = '0;
  logic [NR-1:0] rz_r = '1, rz_e, pd;
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
    #3000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit rz_done = 0, cb_done = 0;

  // ------------------------------------------------------------ Razor filter
  int unsigned rsmp [0:N+8];
  int          lbit [0:N+8];       // late bit for edge k (index k+4), -1 none
  int          lkind [0:N+8];      // 1 minimum, 2 maximum
  int          mut_of [0:N+8];     // mutant number applied at edge k
  bit rz_det [128], rz_kill [128], rz_corr [128], rz_used [128];
  logic [NR-1:0] vn;

  function automatic logic [NR-1:0] rall(int k);
    logic [NR-1:0] v;
    for (int i = 0; i < TAPS; i++) begin
      int idx = k - 1 - i + 4;
      v[i*PROD_W +: PROD_W] = (idx < 0) ? '0 : PROD_W'(rsmp[idx] * CF[i]);
    end
    return v;
  endfunction

  function automatic logic [OUT_W-1:0] ref_out(logic [NR-1:0] q);
    int unsigned s = 0;
    for (int i = 0; i < TAPS; i++) s += int'(q[i*PROD_W +: PROD_W]);
    return OUT_W'(s >> 2);
  endfunction

  initial begin
    logic [NR-1:0] qm, qn, dedge, rst_m, vprev, vk, gold;
    int k0, m, b;
    for (int k = 0; k <= N + 8; k++) begin
      rsmp[k] = (k < 4) ? 0 : $urandom % 256;
      lbit[k] = -1; lkind[k] = 0; mut_of[k] = -1;
    end
    // place the 128 faults, each on an edge where its bit changes
    k0 = 10;
    for (m = 0; m < 128; m++) begin
      b = m / 2;
      while (k0 < N - 10 && rall(k0)[b] == rall(k0 - 1)[b]) k0++;
      if (k0 >= N - 10) break;
      lbit[k0+4] = b; lkind[k0+4] = 1 + (m % 2); mut_of[k0+4] = m;
      rz_used[m] = 1;
      k0 += 4;
    end
    pd = '0; qm = '0;
    #22 rz_rst_n = 1'b1;
    rz_data_in = sample_t'(rsmp[4]);
    for (int k = 0; k < N; k++) begin
      @(posedge rz_clk);
      vprev = rall(k - 1);
      vk    = rall(k);
      dedge = vk;
      if (lbit[k+4] >= 0) dedge[lbit[k+4]] = vprev[lbit[k+4]];
      rst_m = (qm ^ vprev) & rz_r;
      qn    = (rst_m & vprev) | (~rst_m & dedge);
      // corrected: the late value of the previous edge's fault is in the register now
      if (k > 0 && mut_of[k-1+4] >= 0) begin
        b = lbit[k-1+4];
        if (qn[b] == vprev[b] && rst_m[b]) rz_corr[mut_of[k-1+4]] = 1;
      end
      vn = rall(k + 1);
      fork
        automatic logic [NR-1:0] vnext = vn;
        automatic int lb = lbit[k+5];
        automatic int kd = lkind[k+5];
        begin
          #6;
          for (int i = 0; i < NR; i++) if (i != lb) pd[i] = vnext[i];
          if (lb >= 0) begin
            if (kd == 1) #4.2; else #9.2;
            pd[lb] = vnext[lb];
          end
        end
      join_none
      #1;
      checks++;
      if (rz_data_out !== ref_out(qm)) begin
        failures++;
        $display("razor edge %0d: data_out=%h expected %h", k, rz_data_out, ref_out(qm));
      end
      // output differs from the fault-free filter: attribute to the last fault
      gold = rall(k - 1);
      if (rz_data_out != ref_out(gold))
        for (int j = k; j >= k - 3 && j >= 0; j--)
          if (mut_of[j+4] >= 0) begin rz_kill[mut_of[j+4]] = 1; break; end
      qm = qn;
      #6;
      checks++;
      if (rz_e !== (qm ^ vk)) begin
        failures++;
        $display("razor edge %0d: e=%h expected %h", k, rz_e, qm ^ vk);
      end
      if (mut_of[k+4] >= 0 && rz_e[lbit[k+4]]) begin
        rz_det[mut_of[k+4]] = 1;
        rz_kill[mut_of[k+4]] = 1;
      end
      rz_data_in = sample_t'(rsmp[k+5]);
    end
    rz_done = 1;
  end

  // ------------------------------------------------------------ counter filter
  int unsigned csmp [0:M+8];
  int          cdly [0:M+8];       // launch delay (in 0.1 ns) at edge k (index k+4), 0 = with the edge
  int          cmut [0:M+8];       // 0 none, 1 minimum, 2 maximum, 3.. delta (3 + index j)
  int n_kill [3], n_err [3], n_app [3];

  function automatic logic cbit(int k);    // monitored bit intended for edge k
    int idx = k - 1 - 1 + 4;
    return (idx < 0) ? 1'b0 : 1'(((csmp[idx] * CF[1]) >> CB) & 1);
  endfunction

  initial begin
    int k0, exp_meas, mm, cls;
    for (int k = 0; k <= M + 8; k++) begin
      csmp[k] = (k < 4) ? 0 : $urandom % 256;
      cdly[k] = 0; cmut[k] = 0;
    end
    k0 = 4;
    for (mm = 0; mm < 15; mm++) begin
      // measurement edges are even; fault on an even edge whose launched bit changes
      while (k0 < M - 6 && (k0 % 2 != 0 || cbit(k0 + 1) == cbit(k0))) k0++;
      if (k0 >= M - 6) break;
      if (mm == 0)      begin cmut[k0+4] = 1; cdly[k0+4] = 103; end
      else if (mm == 1) begin cmut[k0+4] = 2; cdly[k0+4] = 997; end
      else              begin cmut[k0+4] = 3 + (mm - 2); cdly[k0+4] = 103 + (1200 * (mm - 2)) / 13; end
      k0 += 4;
    end
    exp_meas = 0;
    @(posedge cb_main_clk);
    @(posedge cb_main_clk) cb_rst_n <= 1'b1;
    cb_data_in = sample_t'(csmp[4]);
    cb_start_meas = 1'b1;
    for (int k = 0; k < M; k++) begin
      @(posedge cb_main_clk);
      fork
        automatic int d = cdly[k+4];
        automatic logic bnew = cbit(k + 1);
        if (d == 0) cps_p <= bnew;
        else #(d * 0.1) cps_p = bnew;
      join_none
      if (k % 2 == 0)
        exp_meas = (cbit(k + 1) != cbit(k)) ? (cdly[k+4] / 100) : 0;
      #179;   // 180 ns after the edge
      if (k % 2 == 0) begin
        checks += 2;
        if (int'(cb_meas_val) != exp_meas) begin
          failures++;
          $display("counter edge %0d: meas_val=%0d expected %0d", k, cb_meas_val, exp_meas);
        end
        if (cb_out_ok !== (exp_meas <= 8)) failures++;
        if (cmut[k+4] != 0) begin
          cls = (cmut[k+4] >= 3) ? 2 : cmut[k+4] - 1;
          n_app[cls]++;
          if (cb_meas_val != 0) n_kill[cls]++;
          if (!cb_out_ok) n_err[cls]++;
        end
      end
      @(negedge cb_main_clk);
      #20;    // 70 ns after the edge: inputs for the next edge
      cb_data_in = sample_t'(csmp[k+5]);
      cb_start_meas = (k % 2 == 1);
    end
    cb_done = 1;
  end

  initial begin
    int nd[2], nk[2], nc[2], nu[2];
    wait (rz_done && cb_done);
    nd = '{0, 0}; nk = '{0, 0}; nc = '{0, 0}; nu = '{0, 0};
    for (int m = 0; m < 128; m++) begin
      nu[m%2] += rz_used[m]; nd[m%2] += rz_det[m]; nk[m%2] += rz_kill[m]; nc[m%2] += rz_corr[m];
    end
    $display("Razor minimum-delay mutants: applied %0d killed %0d errors %0d corrected %0d", nu[0], nk[0], nd[0], nc[0]);
    $display("Razor maximum-delay mutants: applied %0d killed %0d errors %0d corrected %0d", nu[1], nk[1], nd[1], nc[1]);
    $display("Counter minimum-delay mutant: applied %0d killed %0d errors %0d", n_app[0], n_kill[0], n_err[0]);
    $display("Counter maximum-delay mutant: applied %0d killed %0d errors %0d", n_app[1], n_kill[1], n_err[1]);
    $display("Counter delta-delay mutants:  applied %0d killed %0d errors %0d (%0.2f %%)", n_app[2], n_kill[2], n_err[2],
             n_app[2] ? 100.0 * n_err[2] / n_app[2] : 0.0);
    checks += 8;
    if (nu[0] != 64 || nu[1] != 64) failures++;
    if (nd[0] != 64 || nd[1] != 64 || nk[0] != 64 || nk[1] != 64) failures++;
    if (nc[0] != 64 || nc[1] != 64) failures++;
    if (n_app[0] != 1 || n_kill[0] != 1 || n_err[0] != 0) failures++;
    if (n_app[1] != 1 || n_kill[1] != 1 || n_err[1] != 1) failures++;
    if (n_app[2] != 13) failures++;
    if (n_kill[2] != 13) failures++;
    if (n_err[2] != 4) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
