// cbm_ctrl: the CTRL block of the counter-based delay sensor.
//
// Runs entirely on HF_CLK, which is HF_RATIO times faster than the main clock
// and edge-aligned with it. A phase counter marks the HF_CLK edge that
// coincides with a rising edge of the main clock (main_edge); this requires
// rst_n to be released on a main-clock rising edge, so that main_edge holds
// on every HF_RATIO-th HF_CLK edge counted from that release.
//
// Measurement sequence: on a main_edge with start_meas high and no
// measurement running, clr restarts the counter and the capture registers and
// busy rises. The counter then counts one per HF_CLK edge. At the HF_CLK edge
// e (e = 1, 2, ... counted from the start edge, i.e. while the counter holds
// e-1) the observability window obs_win is open when
// OBS_OPEN <= e <= OBS_CLOSE; the measurement ends after edge OBS_CLOSE.
// A transition of the monitored path that happens between edges e-1 and e is
// thus reported as e-1 HF_CLK periods. With the defaults the window covers
// delays of 0 to 13 periods and runs across the next main-clock edge.
//
// The reference look-up table holds the tolerated delay per monitored path
// (one path, reference 8 periods by default); lut_out is the entry selected
// by path_sel and out_ok = (meas_val <= lut_out).
//
// The window, the HF counting and the comparison against a design-time
// reference follow the published sensor. The phase-counter alignment, the
// start/busy handshake and the exact window bounds are this design's choices.
module cbm_ctrl #(
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
  input  logic [CNT_W-1:0] cnt,
  input  logic [CNT_W-1:0] meas_val,
  output logic             main_edge,
  output logic             clr,
  output logic             cnt_en,
  output logic             obs_win,
  output logic             busy,
  output logic [CNT_W-1:0] lut_out,
  output logic             out_ok
);

  localparam int unsigned PH_W = (HF_RATIO > 1) ? $clog2(HF_RATIO) : 1;

  logic [PH_W-1:0] ph;
  logic [CNT_W:0]  edge_no;   // number of the HF_CLK edge being evaluated
  logic            last_edge;

  always_ff @(posedge hf_clk or negedge rst_n) begin
    if (!rst_n)                      ph <= '0;
    else if (ph == PH_W'(HF_RATIO-1)) ph <= '0;
    else                             ph <= ph + 1'b1;
  end

  assign main_edge = (ph == PH_W'(HF_RATIO-1));
  assign edge_no   = {1'b0, cnt} + 1'b1;
  assign last_edge = busy && (edge_no >= (CNT_W+1)'(OBS_CLOSE));
  assign clr       = main_edge && start_meas && (!busy || last_edge);
  assign cnt_en    = busy;
  assign obs_win   = busy && (edge_no >= (CNT_W+1)'(OBS_OPEN))
                          && (edge_no <= (CNT_W+1)'(OBS_CLOSE));

  always_ff @(posedge hf_clk or negedge rst_n) begin
    if (!rst_n)         busy <= 1'b0;
    else if (clr)       busy <= 1'b1;
    else if (last_edge) busy <= 1'b0;
  end

  always_comb begin
    lut_out = REF_LUT[0];
    for (int i = 0; i < LUT_DEPTH; i++)
      if (SEL_W'(i) == path_sel) lut_out = REF_LUT[i];
  end

  assign out_ok = (meas_val <= lut_out);

  // A measurement only starts on a main-clock edge, and the window only opens
  // while a measurement runs.
  a_start_on_main_edge: assert property (@(posedge hf_clk) disable iff (!rst_n) clr |-> main_edge);
  a_window_in_meas:     assert property (@(posedge hf_clk) disable iff (!rst_n) obs_win |-> busy);

endmodule
