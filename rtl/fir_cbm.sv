// fir_cbm: 4-tap FIR filter with one critical path monitored by the
// counter-based delay sensor.
//
// Datapath: identical to fir_razor, with ordinary product registers: data_in
// is registered into a 4-sample delay line, each tap is multiplied by its
// coefficient, the four 16-bit products are registered, summed and the 16 MSBs
// of the 18-bit sum are registered as data_out (latency 2 main_clk cycles).
//
// Monitoring: bit CPS_BIT of the product of tap CPS_TAP (by default the MSB of
// a multiplier with the larger coefficient) is the monitored critical path. The
// net that feeds its product-register flip-flop (cps_d) is the sensor's
// curr_cps input; the path starts at the main_clk rising edge that updates the
// delay line. meas_val reports, in hf_clk periods, how long after that edge
// the net last changed; out_ok is low when this exceeds the reference (8
// periods by default). A measurement starts on a main_clk edge with start_meas
// high (see counter_delay_sensor); hf_clk must be HF_RATIO times main_clk,
// edge-aligned, and rst_n released on a main_clk rising edge.
//
// The filter type, the single monitored path and the sensor follow the
// published augmented filter; the tap count, coefficients and the monitored
// bit are this design's choices.
module fir_cbm
  import fir_pkg::*;
#(
  parameter coef_arr_t   C         = COEFS,
  parameter int unsigned CPS_TAP   = 1,
  parameter int unsigned CPS_BIT   = PROD_W - 1,
  parameter int unsigned CNT_W     = 10,
  parameter int unsigned HF_RATIO  = 10,
  parameter int unsigned OBS_OPEN  = 1,
  parameter int unsigned OBS_CLOSE = 14,
  parameter int unsigned REF_DELAY = 8
) (
  input  logic             main_clk,
  input  logic             hf_clk,
  input  logic             rst_n,
  input  sample_t          data_in,
  input  logic             start_meas,
  output out_t             data_out,
  output logic [CNT_W-1:0] meas_val,
  output logic             out_ok
);

  tap_arr_t   taps;
  prod_arr_t  prod_comb;
  prod_arr_t  prod_d;
  prod_arr_t  prod_q;
  logic       cps_d;          // monitored critical-path endpoint
  logic [CNT_W-1:0] lut_out;
  logic       obs_win, busy;

  always_ff @(posedge main_clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < TAPS; i++) taps[i] <= '0;
    end else begin
      taps[0] <= data_in;
      for (int i = 1; i < TAPS; i++) taps[i] <= taps[i-1];
    end
  end

  always_comb begin
    for (int i = 0; i < TAPS; i++) prod_comb[i] = fir_mul(taps[i], C[i]);
  end

  assign cps_d = prod_comb[CPS_TAP][CPS_BIT];

  always_comb begin
    prod_d = prod_comb;
    prod_d[CPS_TAP][CPS_BIT] = cps_d;
  end

  always_ff @(posedge main_clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < TAPS; i++) prod_q[i] <= '0;
      data_out <= '0;
    end else begin
      prod_q   <= prod_d;
      data_out <= fir_out(prod_q);
    end
  end

  counter_delay_sensor #(
    .CNT_W(CNT_W), .HF_RATIO(HF_RATIO), .OBS_OPEN(OBS_OPEN),
    .OBS_CLOSE(OBS_CLOSE), .LUT_DEPTH(1), .REF_LUT({CNT_W'(REF_DELAY)})
  ) u_sensor (
    .hf_clk, .rst_n, .start_meas, .path_sel(1'b0), .curr_cps(cps_d),
    .meas_val, .lut_out, .out_ok, .obs_win, .busy
  );

endmodule
