// cbm_counter: the COUNTER of the counter-based delay sensor.
//
// Counts HF_CLK periods. clr (synchronous, from the controller at the start of
// a measurement) loads zero; while en is high the count advances by one on
// every rising edge of hf_clk and saturates at its maximum value instead of
// wrapping, so a delay longer than the counter range reads as full scale.
// cnt therefore holds the number of HF_CLK edges seen since the start edge.
//
// The counter and its HF_CLK clocking follow the published sensor; the width
// (CNT_W), the saturation and the asynchronous active-low reset are this
// design's choices.
module cbm_counter #(
  parameter int unsigned CNT_W = 10
) (
  input  logic             hf_clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             en,
  output logic [CNT_W-1:0] cnt
);

  always_ff @(posedge hf_clk or negedge rst_n) begin
    if (!rst_n)                 cnt <= '0;
    else if (clr)               cnt <= '0;
    else if (en && (~cnt != '0)) cnt <= cnt + 1'b1;
  end

endmodule
