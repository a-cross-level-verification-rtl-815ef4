// tb_razor_ff: self-checking testbench for the modified Razor flip-flop.
//
// clk has a 10 ns period; clk_dly is clk delayed by half a period plus 0.5 ns,
// so the shadow latch is open from 0.5 ns to 5.5 ns after each rising edge.
// The testbench models the combinational path in front of D: the value meant
// for rising edge k is launched at edge k-1 and normally reaches D 6 ns later
// (slower than half a period, faster than a period). In randomly chosen cycles
// it arrives late instead, 0.2 ns after edge k ("minimum delay", just after
// the edge) or 5.2 ns after it ("maximum delay", just before the latch
// closes). R is random. Expected Q and E are worked out from the intended
// values and the arrival times: Q after edge k is the shadow value v(k-1) if a
// restore happens (E high and R high at the edge), else whatever D held; E
// in the low phase is (Q != v(k)). Both are checked every cycle.
`timescale 1ns / 100ps
module tb_razor_ff;

  logic clk = 1'b0, clk_dly = 1'b1, rst_n = 1'b0;
  logic d = 1'b0, r = 1'b0;
  logic q, e;

  int checks = 0, failures = 0;
  int n_late_min = 0, n_late_max = 0, n_detect = 0, n_restore = 0, n_flag_only = 0;

  razor_ff dut (.clk, .clk_dly, .rst_n, .d, .r, .q, .e);

  always #5 clk = ~clk;
  initial begin clk_dly = 1'b1; #5.5; forever begin clk_dly = ~clk_dly; #5; end end

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int N = 400;
  logic v [0:N+1];      // intended value for rising edge k
  int   late [0:N+1];   // 0 normal, 1 min-delay, 2 max-delay arrival
  logic rr [0:N+1];     // R during cycle before edge k

  initial begin
    logic q_exp, q_prev, e_exp, restore;
    for (int k = 0; k <= N + 1; k++) begin
      v[k]    = 1'($urandom);
      late[k] = ($urandom % 5 == 0) ? 1 + int'($urandom % 2) : 0;
      rr[k]   = 1'($urandom);
    end
    for (int k = 0; k < 3; k++) begin v[k] = 1'b0; late[k] = 0; end
    // reset over the first edges (edge 0 at 5 ns)
    #2; d = 1'b0;
    r = rr[2];
    #20; rst_n = 1'b1;   // release at 22 ns, edge 2 at 25 ns
    q_prev = 1'b0;
    for (int k = 2; k <= N; k++) begin
      @(posedge clk);
      // launch v[k+1]
      fork
        automatic int kk = k + 1;
        begin
          if (late[kk] == 0)      #6 d = v[kk];
          else if (late[kk] == 1) #10.2 d = v[kk];
          else                    #15.2 d = v[kk];
        end
      join_none
      // expected Q after edge k
      e_exp   = (q_prev != v[k-1]);
      restore = e_exp && rr[k];
      if (restore)        q_exp = v[k-1];
      else if (late[k] != 0) q_exp = v[k-1];
      else                q_exp = v[k];
      #1;
      checks++;
      if (q !== q_exp) begin
        failures++;
        $display("edge %0d: q=%b expected %b", k, q, q_exp);
      end
      if (restore) n_restore++;
      if (late[k] != 0 && !rr[k+1]) n_flag_only++;
      #6;   // low phase: shadow closed
      e_exp = (q_exp != v[k]);
      checks++;
      if (e !== e_exp) begin
        failures++;
        $display("edge %0d: e=%b expected %b", k, e, e_exp);
      end
      if (late[k] == 1) n_late_min++;
      if (late[k] == 2) n_late_max++;
      if (late[k] != 0 && e) n_detect++;
      q_prev = q_exp;
      r = rr[k+1];
    end
    $display("late(min)=%0d late(max)=%0d detected=%0d restored=%0d flagged_only=%0d",
             n_late_min, n_late_max, n_detect, n_restore, n_flag_only);
    if (n_late_min == 0 || n_late_max == 0 || n_restore == 0 || n_flag_only == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
