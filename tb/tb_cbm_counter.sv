// tb_cbm_counter: self-checking testbench for the HF_CLK counter.
// A 4-bit instance is driven with random clear and enable; a reference count
// (clear wins, then +1 when enabled, held at 15) is compared after every edge.
// Saturation and clear are each required to happen.
`timescale 1ns / 100ps
module tb_cbm_counter;
  localparam int unsigned W = 4;
  logic hf_clk = 1'b0, rst_n = 1'b0, clr = 1'b0, en = 1'b0;
  logic [W-1:0] cnt;
  int checks = 0, failures = 0, n_sat = 0, n_clr = 0;
  int model;

  cbm_counter #(.CNT_W(W)) dut (.hf_clk, .rst_n, .clr, .en, .cnt);

  always #5 hf_clk = ~hf_clk;

  initial begin
    #50000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1'b1;
    model = 0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge hf_clk);
      clr = ($urandom % 25 == 0);
      en  = ($urandom % 8 != 0);
      @(posedge hf_clk);
      if (clr) begin model = 0; n_clr++; end
      else if (en) begin
        if (model == (1 << W) - 1) n_sat++;
        else model++;
      end
      #1;
      checks++;
      if (int'(cnt) != model) begin
        failures++;
        $display("cycle %0d: cnt=%0d expected %0d", i, cnt, model);
      end
    end
    if (n_sat == 0 || n_clr == 0) failures++;
    $display("saturated=%0d cleared=%0d", n_sat, n_clr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
