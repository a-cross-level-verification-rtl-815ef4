// fir_razor: 4-tap FIR filter whose 64 critical-path flip-flops are modified
// Razor flip-flops.
//
// Datapath: data_in is registered into a 4-sample delay line (taps[0] newest).
// Each tap is multiplied by its coefficient; the multipliers are the critical
// paths. The four 16-bit products are captured in 64 razor_ff cells (bit b of
// tap t is cell t*16+b), summed, and the 16 MSBs of the 18-bit sum are
// registered as data_out. Latency: a sample on data_in at rising edge k first
// contributes to data_out after edge k+2.
//
// Monitoring: e[i] is the error flag of Razor cell i and r[i] its correction
// enable; metric_ok is high when no cell flags an error. With r[i] high, a late
// product bit is reloaded from the shadow latch one clock later; there is no
// pipeline stall, so the corrected product is used one cycle late and the
// next product of that bit is dropped. clk_dly is clk delayed by half a
// period plus a small skew (generated outside, see razor_ff). The Razor cell
// needs every monitored path to be slower than half a clock period (a hold
// constraint of the shadow latch); a zero-delay simulation must model that
// delay on the product nets (prod_d).
//
// The filter type, the 64 Razor cells, one R input and one E output per cell
// follow the published augmented filter; the tap count, coefficients, the
// choice of the product registers as the monitored endpoints and metric_ok as
// the NOR of all E flags are this design's choices.
module fir_razor
  import fir_pkg::*;
#(
  parameter coef_arr_t C = COEFS,
  localparam int unsigned NR = TAPS * PROD_W
) (
  input  logic          clk,
  input  logic          clk_dly,
  input  logic          rst_n,
  input  sample_t       data_in,
  input  logic [NR-1:0] r,
  output out_t          data_out,
  output logic [NR-1:0] e,
  output logic          metric_ok
);

  tap_arr_t        taps;
  prod_arr_t       prod_comb;   // multiplier outputs
  prod_arr_t       prod_q;      // Razor-protected product registers
  logic [NR-1:0]   prod_d;      // Razor D inputs (critical-path endpoints)
  logic [NR-1:0]   raz_q;

  always_ff @(posedge clk or negedge rst_n) begin
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

  for (genvar t = 0; t < TAPS; t++) begin : g_tap
    assign prod_d[t*PROD_W +: PROD_W] = prod_comb[t];
    assign prod_q[t] = raz_q[t*PROD_W +: PROD_W];
  end

  for (genvar i = 0; i < NR; i++) begin : g_raz
    razor_ff u_raz (
      .clk, .clk_dly, .rst_n, .d(prod_d[i]), .r(r[i]), .q(raz_q[i]), .e(e[i])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) data_out <= '0;
    else        data_out <= fir_out(prod_q);
  end

  assign metric_ok = ~|e;

endmodule
