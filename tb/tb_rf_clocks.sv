// tb_rf_clocks: testbench source of the two phase-locked reference clocks.
//
// clk_238 runs at 238 MHz (period 4201.68 ps). clk_5712 runs at exactly 24
// times that (period 175.07 ps) and its rising edges fall PHASE after every
// rising edge of clk_238, standing for the cable phase that places the
// 5712 MHz sampling point inside the 238 MHz data-valid window. Both start
// low; the first clk_238 rising edge is at 2100.84 ps.
module tb_rf_clocks #(
  parameter realtime PHASE = 40ps
) (
  output logic clk_238,
  output logic clk_5712
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam realtime HALF_238  = 2100.840ps;
  localparam realtime HALF_5712 = 87.535ps;

  initial begin
    clk_238 = 1'b0;
    forever #HALF_238 clk_238 = ~clk_238;
  end

  initial begin
    clk_5712 = 1'b0;
    #(HALF_238 + PHASE);
    forever begin
      clk_5712 = 1'b1;
      #HALF_5712;
      clk_5712 = 1'b0;
      #HALF_5712;
    end
  end
endmodule
