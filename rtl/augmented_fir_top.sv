// augmented_fir_top: the two timing-monitored versions of the FIR filter side
// by side, each with its own clocks, reset and ports.
//
//  - rz_*: fir_razor, the filter with 64 modified Razor flip-flops on its
//    product registers. Inputs: clk, clk_dly (clk delayed by half a period),
//    rst_n, sample, one correction enable per Razor cell. Outputs: filtered
//    sample, one error flag per cell, and metric_ok (no cell in error).
//  - cb_*: fir_cbm, the filter with one product bit monitored by the
//    counter-based delay sensor. Inputs: main_clk, hf_clk (10x, edge-aligned),
//    rst_n (released on a main_clk rising edge), sample, start_meas. Outputs:
//    filtered sample, measured delay in hf_clk periods, out_ok.
//
// Each half is the wrapper of the augmentation scheme: the digital IP plus its
// sensor, exporting the IP outputs, the metric and the metric-OK flag. The
// delay line that makes clk_dly and the source of hf_clk are outside this
// design. Both versions share the FIR datapath and coefficients of fir_pkg.
module augmented_fir_top
  import fir_pkg::*;
#(
  localparam int unsigned NR    = TAPS * PROD_W,
  localparam int unsigned CNT_W = 10
) (
  // FIR + Razor
  input  logic             rz_clk,
  input  logic             rz_clk_dly,
  input  logic             rz_rst_n,
  input  sample_t          rz_data_in,
  input  logic [NR-1:0]    rz_r,
  output out_t             rz_data_out,
  output logic [NR-1:0]    rz_e,
  output logic             rz_metric_ok,
  // FIR + counter-based monitor
  input  logic             cb_main_clk,
  input  logic             cb_hf_clk,
  input  logic             cb_rst_n,
  input  sample_t          cb_data_in,
  input  logic             cb_start_meas,
  output out_t             cb_data_out,
  output logic [CNT_W-1:0] cb_meas_val,
  output logic             cb_out_ok
);

  fir_razor u_fir_razor (
    .clk(rz_clk), .clk_dly(rz_clk_dly), .rst_n(rz_rst_n),
    .data_in(rz_data_in), .r(rz_r),
    .data_out(rz_data_out), .e(rz_e), .metric_ok(rz_metric_ok)
  );

  fir_cbm u_fir_cbm (
    .main_clk(cb_main_clk), .hf_clk(cb_hf_clk), .rst_n(cb_rst_n),
    .data_in(cb_data_in), .start_meas(cb_start_meas),
    .data_out(cb_data_out), .meas_val(cb_meas_val), .out_ok(cb_out_ok)
  );

endmodule
