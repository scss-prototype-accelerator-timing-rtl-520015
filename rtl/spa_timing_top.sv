// spa_timing_top: the trigger system of the prototype accelerator.
//
// One master trigger unit (MTU) makes the master trigger, locked to the
// 60 Hz AC line and to the 238 MHz reference, at an operation cycle of 1 Hz
// to 60 Hz. The master trigger leaves on `master_trig` towards the LVDS
// trigger-distribution chain, a passive fan-out made of four units in series
// that is not part of this RTL. Its copies come back on `tdu_trig_in`, one
// per trigger delay unit (TDU). Each of the NUM_TDU units turns its copy into
// eight delayed outputs re-timed to the 5712 MHz RF.
//
// Interface and timing: clk_238 and clk_5712 are the two phase-locked
// reference clocks distributed to every rack (5712 = 24 x 238 MHz). rst_n is
// asynchronous, active low. MTU settings (source select, enable, divide
// ratio) and TDU settings (per channel delay, width and software inhibit)
// are plain inputs standing for the control registers of the VME modules.
// Latencies are those of mtu and tdu plus whatever the distribution chain
// adds outside.
//
// From the source design: one MTU, nine TDUs of eight channels, the signal
// flow between them. This design's own choice: exposing the distribution
// chain as a port pair and the registers as inputs.
module spa_timing_top
  import timing_pkg::*;
#(
  parameter int unsigned N_TDU   = NUM_TDU,
  parameter int unsigned N_CH    = TDU_CHANNELS,
  parameter int unsigned DELAY_W = DELAY_BITS,
  parameter int unsigned WIDTH_W = WIDTH_BITS,
  parameter int unsigned DIV_W   = DIV_BITS
) (
  input  logic                                    clk_238,
  input  logic                                    clk_5712,
  input  logic                                    rst_n,
  // Master trigger unit
  input  logic                                    ac_line_60hz,
  input  logic                                    ext_60hz,
  input  logic                                    mtu_clk_sel,
  input  logic                                    mtu_enable,
  input  logic [DIV_W-1:0]                        mtu_div_ratio,
  output logic                                    master_trig,
  // Master trigger returning from the distribution chain, one per TDU
  input  logic [N_TDU-1:0]                        tdu_trig_in,
  // Trigger delay units
  input  logic [N_TDU-1:0][N_CH-1:0]              hw_inhibit,
  input  logic [N_TDU-1:0][N_CH-1:0]              sw_inhibit,
  input  logic [N_TDU-1:0][N_CH-1:0][DELAY_W-1:0] delay,
  input  logic [N_TDU-1:0][N_CH-1:0][WIDTH_W-1:0] width,
  output logic [N_TDU-1:0][N_CH-1:0]              tdu_out,
  output logic [N_TDU-1:0][N_CH-1:0]              tdu_busy,
  output logic [N_TDU-1:0]                        tdu_trig_strobe
);
  timeunit 1ps;
  timeprecision 1fs;


  mtu #(
    .DIV_W(DIV_W)
  ) u_mtu (
    .clk_238     (clk_238),
    .rst_n       (rst_n),
    .ac_line_60hz(ac_line_60hz),
    .ext_60hz    (ext_60hz),
    .clk_sel     (mtu_clk_sel),
    .enable      (mtu_enable),
    .div_ratio   (mtu_div_ratio),
    .fpga_trig   (),
    .master_trig (master_trig)
  );

  for (genvar t = 0; t < N_TDU; t++) begin : g_tdu

    tdu #(
      .N_CH   (N_CH),
      .DELAY_W(DELAY_W),
      .WIDTH_W(WIDTH_W)
    ) u_tdu (
      .clk_238    (clk_238),
      .clk_5712   (clk_5712),
      .rst_n      (rst_n),
      .trig_in    (tdu_trig_in[t]),
      .hw_inhibit (hw_inhibit[t]),
      .sw_inhibit (sw_inhibit[t]),
      .delay      (delay[t]),
      .width      (width[t]),
      .trig_strobe(tdu_trig_strobe[t]),
      .fpga_out   (),
      .ch_busy    (tdu_busy[t]),
      .out        (tdu_out[t])
    );
  end
endmodule
