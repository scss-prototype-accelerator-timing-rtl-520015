// tdu: trigger delay unit, eight delayed triggers locked to 5712 MHz.
//
// Each TDU receives the master trigger and produces eight delayed copies of
// it, one per piece of equipment (gun, deflector, klystrons, monitors). The
// coarse delay is counted in 4.2 ns steps of the 238 MHz clock on the delay
// board (tdu_delay_board); the sync board (tdu_sync_board) then re-times each
// output first to 238 MHz and finally to 5712 MHz, so the output edge sits on
// the C-band RF with sub-picosecond jitter in the real hardware.
//
// Interface and timing: clk_238 and clk_5712 are phase-locked reference
// clocks (5712 = 24 x 238 MHz); rst_n is asynchronous, active low. An output
// rises on the first clk_5712 edge after the clk_238 edge that follows the
// delay board's output edge, i.e. one 238 MHz cycle plus the 238-to-5712
// phase after it. Pulse widths are kept exactly. Settings are plain inputs
// standing for the module's control registers.
//
// From the source design: the split into a delay board and a sync board and
// what each does. This design's own choice: the register inputs and the
// observable board-internal signals.
module tdu
  import timing_pkg::*;
#(
  parameter int unsigned N_CH    = TDU_CHANNELS,
  parameter int unsigned DELAY_W = DELAY_BITS,
  parameter int unsigned WIDTH_W = WIDTH_BITS
) (
  input  logic                         clk_238,
  input  logic                         clk_5712,
  input  logic                         rst_n,
  input  logic                         trig_in,
  input  logic [N_CH-1:0]              hw_inhibit,
  input  logic [N_CH-1:0]              sw_inhibit,
  input  logic [N_CH-1:0][DELAY_W-1:0] delay,
  input  logic [N_CH-1:0][WIDTH_W-1:0] width,
  output logic                         trig_strobe,
  output logic [N_CH-1:0]              fpga_out,
  output logic [N_CH-1:0]              ch_busy,
  output logic [N_CH-1:0]              out
);
  timeunit 1ps;
  timeprecision 1fs;


  tdu_delay_board #(
    .N_CH   (N_CH),
    .DELAY_W(DELAY_W),
    .WIDTH_W(WIDTH_W)
  ) u_delay (
    .clk_238    (clk_238),
    .rst_n      (rst_n),
    .trig_in    (trig_in),
    .hw_inhibit (hw_inhibit),
    .sw_inhibit (sw_inhibit),
    .delay      (delay),
    .width      (width),
    .trig_strobe(trig_strobe),
    .ch_out     (fpga_out),
    .ch_busy    (ch_busy)
  );

  tdu_sync_board #(
    .N_CH(N_CH)
  ) u_sync (
    .clk_238 (clk_238),
    .clk_5712(clk_5712),
    .rst_n   (rst_n),
    .d_in    (fpga_out),
    .stage1  (),
    .q       (out)
  );
endmodule
