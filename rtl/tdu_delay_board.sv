// tdu_delay_board: the first (FPGA) board of the trigger delay unit.
//
// Takes the master trigger delivered by the distribution chain, brings it
// into the 238 MHz domain with a two-flop synchroniser and turns its rising
// edge into a one-cycle strobe that starts all eight delay channels at once.
// The eight hardware inhibit lines are synchronised the same way and ORed
// per channel with a software inhibit bit; an inhibited channel keeps its
// output low.
//
// Interface and timing: everything runs on clk_238 with an asynchronous
// active-low reset. The strobe is issued on the third clk_238 edge counting
// the one that first samples trig_in high; from there each channel follows
// the timing of tdu_channel (output high from strobe edge + delay[i], for
// width[i] cycles). A hardware inhibit takes effect two edges after it is
// applied; the software inhibit at once. Delay, width and software-inhibit
// settings are plain inputs standing for the module's control registers.
//
// From the source design: the 238 MHz 24-bit delay counters, the 15-bit width
// counters, eight channels, and suppression by hardware inhibit or by
// software command. This design's own choices: the synchronisers, the
// rising-edge strobe and the register inputs.
module tdu_delay_board
  import timing_pkg::*;
#(
  parameter int unsigned N_CH    = TDU_CHANNELS,
  parameter int unsigned DELAY_W = DELAY_BITS,
  parameter int unsigned WIDTH_W = WIDTH_BITS
) (
  input  logic                         clk_238,
  input  logic                         rst_n,
  input  logic                         trig_in,
  input  logic [N_CH-1:0]              hw_inhibit,
  input  logic [N_CH-1:0]              sw_inhibit,
  input  logic [N_CH-1:0][DELAY_W-1:0] delay,
  input  logic [N_CH-1:0][WIDTH_W-1:0] width,
  output logic                         trig_strobe,
  output logic [N_CH-1:0]              ch_out,
  output logic [N_CH-1:0]              ch_busy
);
  timeunit 1ps;
  timeprecision 1fs;

  logic            trig_s, trig_prev;
  logic [N_CH-1:0] hw_inh_s;

  sync_2ff #(.WIDTH(1 + N_CH)) u_sync (
    .clk  (clk_238),
    .rst_n(rst_n),
    .d    ({hw_inhibit, trig_in}),
    .q    ({hw_inh_s, trig_s})
  );

  always_ff @(posedge clk_238 or negedge rst_n) begin
    if (!rst_n) trig_prev <= 1'b0;
    else        trig_prev <= trig_s;
  end
  assign trig_strobe = trig_s && !trig_prev;

  for (genvar i = 0; i < N_CH; i++) begin : g_ch
    tdu_channel #(
      .DELAY_W(DELAY_W),
      .WIDTH_W(WIDTH_W)
    ) u_ch (
      .clk    (clk_238),
      .rst_n  (rst_n),
      .trig   (trig_strobe),
      .delay  (delay[i]),
      .width  (width[i]),
      .inhibit(hw_inh_s[i] || sw_inhibit[i]),
      .out    (ch_out[i]),
      .busy   (ch_busy[i])
    );
  end
endmodule
