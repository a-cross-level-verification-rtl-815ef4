// tb_counter_delay_sensor: self-checking testbench for the counter-based delay
// sensor. main_clk has a 100 ns period and hf_clk a 10 ns one, rising edges
// aligned; reset is released on a main_clk edge. Every second main_clk edge a
// measurement is requested (now and then deliberately not), and the
// testbench plays the monitored path: it toggles curr_cps zero to three times
// after the edge, at random delays at least one hf_clk period apart and kept off
// the hf_clk edges (a delay of exactly 0 means the path changes with the
// clock edge itself). The expected reading is floor(delay / 10 ns) of the
// last toggle with delay up to OBS_CLOSE (14) periods, 0 when there is none;
// out_ok must be (reading <= 8). A start request while a measurement runs
// must be ignored, and without a request the reading must hold.
`timescale 1ns / 100ps
module tb_counter_delay_sensor;
  localparam int unsigned W = 10;
  logic main_clk = 1'b0, hf_clk = 1'b0, rst_n = 1'b0, start_meas = 1'b0, curr_cps = 1'b0;
  logic [W-1:0] meas_val, lut_out;
  logic out_ok, obs_win, busy;
  int checks = 0, failures = 0;
  int n_meas = 0, n_late = 0, n_ok_nonzero = 0, n_zero_delay = 0, n_outside = 0,
      n_glitch = 0, n_skip = 0, n_refused = 0;

  counter_delay_sensor dut (.hf_clk, .rst_n, .start_meas, .path_sel(1'b0), .curr_cps,
                            .meas_val, .lut_out, .out_ok, .obs_win, .busy);

  always #5 hf_clk = ~hf_clk;
  initial begin #5; forever begin main_clk = ~main_clk; #50; end end

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%t meas %0d: %s=%0d expected %0d", $realtime, n_meas, what, got, exp);
    end
  endtask

  initial begin
    int exp_val, n_tog, dl, last_in;
    int delays[3];
    exp_val = 0;
    @(posedge main_clk);
    @(posedge main_clk) rst_n <= 1'b1;
    for (int m = 0; m < 300; m++) begin
      bit skip;
      skip = (m > 2) && ($urandom % 8 == 0);
      #40 start_meas = !skip;          // 10 ns before the next main edge
      @(posedge main_clk);
      n_tog = int'($urandom % 4);
      dl = 0;
      last_in = -1;
      for (int t = 0; t < n_tog; t++) begin
        if (t == 0 && $urandom % 6 == 0) delays[t] = 0;
        else delays[t] = 10 * (dl / 10 + 2 + int'($urandom % 6)) + 3 + int'($urandom % 5);
        dl = delays[t];
        if (dl > 175) begin n_tog = t; break; end
      end
      for (int t = 0; t < n_tog; t++) begin
        automatic int d = delays[t];
        fork
          if (d == 0) curr_cps <= ~curr_cps;
          else #(d) curr_cps = ~curr_cps;
        join_none
        if (d <= 140) last_in = d; else n_outside++;
        if (d == 0) n_zero_delay++;
      end
      if (!skip) begin
        exp_val = (last_in < 0) ? 0 : last_in / 10;
        if (n_tog > 1) n_glitch++;
        if (exp_val > 8) n_late++; else if (exp_val > 0) n_ok_nonzero++;
      end else n_skip++;
      #10 start_meas = ($urandom % 2 == 0);   // requests during the run are ignored
      if (start_meas && !skip) n_refused++;
      #85;                                     // 95 ns after the start edge
      start_meas = 1'b0;
      check("busy", busy, !skip);
      #100;                                    // 195 ns after the start edge
      check("meas_val", int'(meas_val), exp_val);
      check("out_ok", int'(out_ok), int'(exp_val <= 8));
      check("busy_end", int'(busy), 0);
      check("lut_out", int'(lut_out), 8);
      n_meas++;
    end
    $display("measurements=%0d late(not ok)=%0d ok_nonzero=%0d zero_delay=%0d outside_window=%0d glitches=%0d skipped=%0d refused=%0d",
             n_meas, n_late, n_ok_nonzero, n_zero_delay, n_outside, n_glitch, n_skip, n_refused);
    if (n_late == 0 || n_ok_nonzero == 0 || n_zero_delay == 0 || n_outside == 0 ||
        n_glitch == 0 || n_skip == 0 || n_refused == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
