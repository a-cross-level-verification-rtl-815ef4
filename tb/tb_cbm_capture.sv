// tb_cbm_capture: self-checking testbench for the transition capture of the
// counter-based sensor. Random clr, obs_win, curr_cps and counter values are
// applied between HF_CLK edges. The reference keeps the previous level of
// curr_cps, loads the counter into the rising or falling register on a
// transition inside the window, remembers which came last, and zeroes all on
// clr; meas_val must equal the register of the last transition.
`timescale 1ns / 100ps
module tb_cbm_capture;
  localparam int unsigned W = 10;
  logic hf_clk = 1'b0, rst_n = 1'b0, clr = 1'b0, obs_win = 1'b0, curr_cps = 1'b0;
  logic [W-1:0] cnt = '0;
  logic [W-1:0] reg_rise, reg_fall, meas_val;
  logic last_rise;
  int checks = 0, failures = 0, n_rise = 0, n_fall = 0, n_outside = 0;

  cbm_capture #(.CNT_W(W)) dut (.hf_clk, .rst_n, .clr, .obs_win, .curr_cps, .cnt,
                                .reg_rise, .reg_fall, .last_rise, .meas_val);

  always #5 hf_clk = ~hf_clk;

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic p; logic [W-1:0] rr, rf; logic lr;
    p = 0; rr = '0; rf = '0; lr = 0;
    #12 rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge hf_clk);
      clr      = ($urandom % 30 == 0);
      obs_win  = ($urandom % 4 != 0);
      curr_cps = ($urandom % 3 == 0) ? ~curr_cps : curr_cps;
      cnt      = W'($urandom);
      @(posedge hf_clk);
      if (clr) begin rr = '0; rf = '0; lr = 0; end
      else if (obs_win && curr_cps && !p) begin rr = cnt; lr = 1; n_rise++; end
      else if (obs_win && !curr_cps && p) begin rf = cnt; lr = 0; n_fall++; end
      else if (!obs_win && curr_cps != p) n_outside++;
      p = curr_cps;
      #1;
      checks += 4;
      if (reg_rise !== rr || reg_fall !== rf || last_rise !== lr || meas_val !== (lr ? rr : rf)) begin
        failures++;
        $display("edge %0d: rise=%0d/%0d fall=%0d/%0d last=%b/%b meas=%0d", i, reg_rise, rr,
                 reg_fall, rf, last_rise, lr, meas_val);
      end
    end
    $display("rising=%0d falling=%0d outside_window=%0d", n_rise, n_fall, n_outside);
    if (n_rise == 0 || n_fall == 0 || n_outside == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
