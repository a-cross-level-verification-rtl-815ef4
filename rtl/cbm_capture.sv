// cbm_capture: transition capture of the counter-based delay sensor.
//
// The monitored critical-path signal curr_cps is sampled on HF_CLK. A
// previous-level register detects a rising (0->1) or falling (1->0) transition
// between two HF_CLK edges. While the observability window obs_win is open,
// a rising transition loads the counter value into reg_rise and a falling one
// into reg_fall, and a select flag remembers which kind came last. meas_val is
// the register of the last captured transition (multiplexer input 1 = rising,
// input 0 = falling), so a path that glitches several times reports its final
// settling time. clr (start of a measurement) zeroes both registers and the
// flag; meas_val = 0 therefore means that no transition was captured in the
// window. A capture is visible on meas_val one HF_CLK cycle after the edge that
// sampled it.
//
// The two registers, the rising/falling split and the output multiplexer
// selected by the last transition follow the published sensor. The published
// cell holds curr_cps in level-sensitive latches; here an HF_CLK flip-flop
// does that job, so the block is fully synchronous.
module cbm_capture #(
  parameter int unsigned CNT_W = 10
) (
  input  logic             hf_clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             obs_win,
  input  logic             curr_cps,
  input  logic [CNT_W-1:0] cnt,
  output logic [CNT_W-1:0] reg_rise,
  output logic [CNT_W-1:0] reg_fall,
  output logic             last_rise,
  output logic [CNT_W-1:0] meas_val
);

  logic cps_q;
  logic rise, fall;

  always_ff @(posedge hf_clk or negedge rst_n) begin
    if (!rst_n) cps_q <= 1'b0;
    else        cps_q <= curr_cps;
  end

  assign rise = obs_win &  curr_cps & ~cps_q;
  assign fall = obs_win & ~curr_cps &  cps_q;

  always_ff @(posedge hf_clk or negedge rst_n) begin
    if (!rst_n) begin
      reg_rise  <= '0;
      reg_fall  <= '0;
      last_rise <= 1'b0;
    end else if (clr) begin
      reg_rise  <= '0;
      reg_fall  <= '0;
      last_rise <= 1'b0;
    end else begin
      if (rise) begin
        reg_rise  <= cnt;
        last_rise <= 1'b1;
      end
      if (fall) begin
        reg_fall  <= cnt;
        last_rise <= 1'b0;
      end
    end
  end

  assign meas_val = last_rise ? reg_rise : reg_fall;

endmodule
