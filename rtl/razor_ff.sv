// razor_ff: modified Razor flip-flop, an in-situ timing-error detector with
// optional correction.
//
// A main flip-flop samples D on the rising edge of clk. A shadow latch samples
// the same D while the delayed clock clk_dly is low; clk_dly is clk delayed by
// half a period (plus a small skew), so the latch is open during the high phase
// of clk and closes near its falling edge. Data that reaches D after the rising
// edge but before the latch closes is therefore missed by the main flip-flop
// and caught by the latch, and the two disagree: E = Q xor shadow goes high.
// The extra multiplexer in front of the main flip-flop is the modification:
// when R is high and E is high at the next rising edge, the flip-flop reloads
// the shadow value instead of D, so the late value appears on Q one cycle late.
// With R low the error is only flagged.
//
// Interface: clk, clk_dly (delayed clock, generated outside, e.g. by a delay
// line), rst_n (asynchronous, active low, clears the flip-flop and the latch),
// d, r -> q, e. E is combinational and meaningful from the latch closing to the
// next rising edge; it is sampled by the restore logic at that edge.
//
// Structure (main FF, shadow latch, comparator, R/E gating, 2:1 mux) follows
// the published cell; the reset and the use of a single R per cell are this
// design's choice. The shadow latch is an intended level-sensitive element.
module razor_ff (
  input  logic clk,
  input  logic clk_dly,
  input  logic rst_n,
  input  logic d,
  input  logic r,
  output logic q,
  output logic e
);

  logic shadow;
  logic restore;
  logic d_mux;

  // Shadow latch: transparent on the low level of the delayed clock.
  always_latch begin
    if (!rst_n)        shadow = 1'b0;
    else if (!clk_dly) shadow = d;
  end

  assign e       = q ^ shadow;
  assign restore = e & r;
  assign d_mux   = restore ? shadow : d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= 1'b0;
    else        q <= d_mux;
  end

endmodule
