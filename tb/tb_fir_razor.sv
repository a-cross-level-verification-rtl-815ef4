// tb_fir_razor: self-checking testbench for the FIR filter with Razor
// flip-flops on its 64 product bits.
//
// clk has a 10 ns period, clk_dly is clk delayed by 5.5 ns. The testbench plays
// the multipliers' propagation delay: it forces the 64 Razor D nets (prod_d)
// and updates them 6 ns after each rising edge with the products for the next
// edge, which it computes itself from the samples it applied. In random cycles
// one tap's 16 products arrive late instead, 0.2 ns ("minimum delay") or
// 5.2 ns ("maximum delay") after the edge that should have captured them.
// R is set per tap, at random. The reference tracks every product register:
// after each edge it holds the shadow value (the previous product) where E
// and R were high, the stale previous product where the data was late, and
// the new product otherwise. It checks data_out (16 MSBs of the product sum of
// the registers) after every edge, and E (register xor product latched in the
// shadow) and metric_ok in every low clock phase.
`timescale 1ns / 100ps
module tb_fir_razor;
  import fir_pkg::*;
  localparam int NR = TAPS * PROD_W;
  localparam int N  = 600;

  logic clk = 1'b0, clk_dly = 1'b1, rst_n = 1'b0;
  sample_t data_in = '0;
  logic [NR-1:0] r = '0, e, pd;
  out_t data_out;
  logic metric_ok;
  int checks = 0, failures = 0;
  int n_min = 0, n_max = 0, n_det = 0, n_restore = 0, n_flag_only = 0, n_out_err = 0;

  fir_razor dut (.clk, .clk_dly, .rst_n, .data_in, .r, .data_out, .e, .metric_ok);

  always #5 clk = ~clk;
  initial begin clk_dly = 1'b1; #5.5; forever begin clk_dly = ~clk_dly; #5; end end

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int unsigned CF [TAPS] = '{141, 249, 249, 141};
  int unsigned smp [0:N+8];     // smp[k+4]: sample applied before edge k
  int          late [0:N+8];    // late[k+4]: 0 none, else tap+1 whose products are late for edge k
  int          kind [0:N+8];    // 1 min-delay, 2 max-delay
  logic [TAPS-1:0] rtap [0:N+8];

  // product of tap i intended for edge k
  function automatic logic [PROD_W-1:0] vprod(int k, int i);
    int idx = k - 1 - i + 4;
    if (idx < 0) return '0;
    return PROD_W'(smp[idx] * CF[i]);
  endfunction

  function automatic logic [NR-1:0] vall(int k);
    logic [NR-1:0] v;
    for (int i = 0; i < TAPS; i++) v[i*PROD_W +: PROD_W] = vprod(k, i);
    return v;
  endfunction

  function automatic logic [OUT_W-1:0] ref_out(logic [NR-1:0] q);
    int unsigned s = 0;
    for (int i = 0; i < TAPS; i++) s += int'(q[i*PROD_W +: PROD_W]);
    return OUT_W'(s >> 2);
  endfunction

  function automatic logic [NR-1:0] rmask(logic [TAPS-1:0] rt);
    logic [NR-1:0] m;
    for (int i = 0; i < TAPS; i++) m[i*PROD_W +: PROD_W] = {PROD_W{rt[i]}};
    return m;
  endfunction

  logic [NR-1:0] vn;

  initial force dut.prod_d = pd;

  initial begin
    logic [NR-1:0] qm, qn, dedge, rst_m, emask, vprev, vk;
    for (int k = 0; k <= N + 8; k++) begin
      smp[k]  = (k < 4) ? 0 : $urandom % 256;
      late[k] = (k > 8 && $urandom % 8 == 0) ? 1 + int'($urandom % TAPS) : 0;
      kind[k] = 1 + int'($urandom % 2);
      rtap[k] = TAPS'($urandom);
    end
    pd = '0; qm = '0;
    #22 rst_n = 1'b1;                   // edges at 5, 15; first active edge k=0 at 25
    data_in = sample_t'(smp[4]); r = rmask(rtap[4]);
    for (int k = 0; k < N; k++) begin
      @(posedge clk);
      // reference register update at edge k
      vprev = vall(k - 1);
      vk    = vall(k);
      dedge = vk;
      if (late[k+4] != 0) dedge[(late[k+4]-1)*PROD_W +: PROD_W] = vprev[(late[k+4]-1)*PROD_W +: PROD_W];
      emask = qm ^ vprev;
      rst_m = emask & rmask(rtap[k+4]);
      qn    = (rst_m & vprev) | (~rst_m & dedge);
      if (rst_m != '0) n_restore++;
      // drive the delayed product nets for edge k+1
      vn = vall(k + 1);
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
      if (data_out !== ref_out(qm)) begin
        failures++;
        $display("edge %0d: data_out=%h expected %h", k, data_out, ref_out(qm));
      end
      if (ref_out(qm) != ref_out(vprev)) n_out_err++;
      qm = qn;
      #6;                                // low phase: shadow holds vall(k)
      checks += 2;
      if (e !== (qm ^ vk)) begin
        failures++;
        $display("edge %0d: e=%h expected %h", k, e, qm ^ vk);
      end
      if (metric_ok !== ((qm ^ vk) == '0)) failures++;
      if (late[k+4] != 0) begin
        if (kind[k+4] == 1) n_min++; else n_max++;
        if (e != '0) begin
          n_det++;
          if (rtap[k+5][late[k+4]-1] == 1'b0) n_flag_only++;
        end
      end
      data_in = sample_t'(smp[k+5]);
      r = rmask(rtap[k+5]);
    end
    $display("late(min)=%0d late(max)=%0d detected=%0d restores=%0d flagged_only=%0d outputs_differing_from_fault_free=%0d",
             n_min, n_max, n_det, n_restore, n_flag_only, n_out_err);
    if (n_min == 0 || n_max == 0 || n_det == 0 || n_restore == 0 || n_flag_only == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
