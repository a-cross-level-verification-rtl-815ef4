// counter_delay_sensor: counter-based on-chip delay monitor.
//
// Measures how long after a main-clock rising edge the monitored critical-path
// signal curr_cps last changed, in periods of the high-frequency clock hf_clk,
// and compares the result with a design-time reference. It combines the
// controller (cbm_ctrl: measurement start, observability window, reference
// table, comparison), the HF_CLK counter (cbm_counter) and the transition
// capture (cbm_capture: rising/falling registers and output multiplexer).
//
// Timing: hf_clk runs HF_RATIO times faster than the main clock, edge-aligned
// with it, and rst_n is released on a main-clock rising edge. A measurement
// starts on a main-clock edge at which start_meas is high and the sensor is
// idle; busy is high while it runs (OBS_CLOSE HF_CLK periods). A transition of
// curr_cps between HF_CLK edges e-1 and e after the start reads as e-1 on
// meas_val, one HF_CLK cycle after edge e, so resolution is one HF_CLK period
// with an error within one period. meas_val stays 0 if nothing changed in the
// window, and it holds its value until the next measurement starts.
// out_ok = (meas_val <= lut_out), lut_out being the reference of the path
// chosen by path_sel.
//
// The measurement principle, the window, the two capture registers with the
// last-transition multiplexer and the reference comparison follow the published
// sensor; widths, window bounds, the reference value 8 and the start handshake
// are this design's choices (see cbm_ctrl).
module counter_delay_sensor #(
  parameter int unsigned CNT_W     = 10,
  parameter int unsigned HF_RATIO  = 10,
  parameter int unsigned OBS_OPEN  = 1,
  parameter int unsigned OBS_CLOSE = 14,
  parameter int unsigned LUT_DEPTH = 1,
  parameter logic [LUT_DEPTH-1:0][CNT_W-1:0] REF_LUT = {CNT_W'(8)},
  localparam int unsigned SEL_W = (LUT_DEPTH > 1) ? $clog2(LUT_DEPTH) : 1
) (
  input  logic             hf_clk,
  input  logic             rst_n,
  input  logic             start_meas,
  input  logic [SEL_W-1:0] path_sel,
  input  logic             curr_cps,
  output logic [CNT_W-1:0] meas_val,
  output logic [CNT_W-1:0] lut_out,
  output logic             out_ok,
  output logic             obs_win,
  output logic             busy
);

  logic             main_edge, clr, cnt_en, last_rise;
  logic [CNT_W-1:0] cnt, reg_rise, reg_fall;

  cbm_ctrl #(
    .CNT_W(CNT_W), .HF_RATIO(HF_RATIO), .OBS_OPEN(OBS_OPEN),
    .OBS_CLOSE(OBS_CLOSE), .LUT_DEPTH(LUT_DEPTH), .REF_LUT(REF_LUT)
  ) u_ctrl (
    .hf_clk, .rst_n, .start_meas, .path_sel, .cnt, .meas_val,
    .main_edge, .clr, .cnt_en, .obs_win, .busy, .lut_out, .out_ok
  );

  cbm_counter #(.CNT_W(CNT_W)) u_counter (
    .hf_clk, .rst_n, .clr, .en(cnt_en), .cnt
  );

  cbm_capture #(.CNT_W(CNT_W)) u_capture (
    .hf_clk, .rst_n, .clr, .obs_win, .curr_cps, .cnt,
    .reg_rise, .reg_fall, .last_rise, .meas_val
  );

endmodule
