// tdu_sync_board: the second board of the trigger delay unit, which pins
// each delayed output to the 5712 MHz RF.
//
// The outputs of the delay board carry the FPGA's own timing jitter. Each
// channel therefore passes two D flip-flops. The first is clocked by the
// 238 MHz reference: it removes the FPGA jitter, which could otherwise exceed
// one 175 ps period of 5712 MHz and make the final edge jump by a whole
// fast-clock period. The second is clocked by the 5712 MHz RF and places
// the output edge on the C-band reference. Because 5712 MHz is exactly 24
// times 238 MHz and both come from one oscillator, the second stage always
// samples a settled first stage, so the crossing needs no synchroniser; the
// phase between the two clocks is set by cabling so that a 5712 MHz edge
// falls inside the 238 MHz data-valid window.
//
// Interface and timing: d_in is sampled on clk_238; stage1 follows one
// clk_238 edge later, q on the next clk_5712 edge after that. rst_n is an
// asynchronous active-low reset of both stages.
//
// From the source design: the two re-timing stages, their order and clocks.
// This design's own choice: the reset and the observable first-stage output.
module tdu_sync_board
  import timing_pkg::*;
#(
  parameter int unsigned N_CH = TDU_CHANNELS
) (
  input  logic            clk_238,
  input  logic            clk_5712,
  input  logic            rst_n,
  input  logic [N_CH-1:0] d_in,
  output logic [N_CH-1:0] stage1,
  output logic [N_CH-1:0] q
);
  timeunit 1ps;
  timeprecision 1fs;

  always_ff @(posedge clk_238 or negedge rst_n) begin
    if (!rst_n) stage1 <= '0;
    else        stage1 <= d_in;
  end

  always_ff @(posedge clk_5712 or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= stage1;
  end
endmodule
