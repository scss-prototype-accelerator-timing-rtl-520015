// mtu: master trigger unit.
//
// Produces the master trigger that starts every operation cycle of the
// accelerator. The trigger must be locked to two things at once: the 60 Hz
// AC line (so the klystron and gun modulators always fire at the same point
// of the mains cycle) and the 238 MHz RF reference (so the beam always meets
// the same RF phase).
//
// How it works. Two 60 Hz clocks come in: the AC line clock and a 60 Hz clock
// from an external source. Both are brought into the 238 MHz domain by
// two-flop synchronisers and their rising edges are detected separately; the
// select input then picks which edge stream is used, so switching sources
// never manufactures a false edge. A down-counter passes one edge in every
// `div_ratio` (1..60), giving an operation cycle of 60 Hz down to 1 Hz. Each
// passed edge starts a pulse PULSE_CYCLES long (`fpga_trig`). That signal
// then goes through one more D flip-flop clocked by 238 MHz, standing for the
// separate SiGe flip-flop at the board output that re-times the FPGA output
// to the reference clock and removes the FPGA's own jitter (`master_trig`).
//
// Interface and timing. All logic is on clk_238; rst_n is an asynchronous,
// active-low reset. The first selected 60 Hz rising edge after reset (or
// after `enable` rises) is passed; then every div_ratio-th. A div_ratio of 0
// is taken as 1. `fpga_trig` rises on the third clk_238 edge, counting the
// one that first samples the 60 Hz input high; `master_trig` one edge later; both stay high PULSE_CYCLES
// cycles. `enable` low stops triggering and restarts the divider.
//
// From the source design: the two 60 Hz inputs and their selection, the
// division to a 1-60 Hz cycle in logic clocked at 238 MHz, the final 238 MHz
// re-timing flip-flop. This design's own choices: the synchronisers, the
// passing of the first edge, the pulse length, the enable input, and the
// register inputs standing in for the remote-control bus.
module mtu
  import timing_pkg::*;
#(
  parameter int unsigned DIV_W        = DIV_BITS,
  parameter int unsigned PULSE_CYCLES = MTU_PULSE_CYC
) (
  input  logic             clk_238,
  input  logic             rst_n,
  input  logic             ac_line_60hz,   // AC line clock (via transformer box)
  input  logic             ext_60hz,       // 60 Hz clock from another source
  input  logic             clk_sel,        // 0: AC line, 1: external 60 Hz
  input  logic             enable,
  input  logic [DIV_W-1:0] div_ratio,      // trigger on every div_ratio-th 60 Hz edge
  output logic             fpga_trig,      // trigger before the output flip-flop
  output logic             master_trig     // re-timed master trigger
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned PW = (PULSE_CYCLES > 1) ? $clog2(PULSE_CYCLES) : 1;

  logic [1:0]       src_sync, src_prev, src_rise;
  logic             sel_rise;
  logic [DIV_W-1:0] div_cnt;
  logic [PW-1:0]    pulse_cnt;
  logic             fire;

  sync_2ff #(.WIDTH(2)) u_sync (
    .clk  (clk_238),
    .rst_n(rst_n),
    .d    ({ext_60hz, ac_line_60hz}),
    .q    (src_sync)
  );

  // Edge detection on each source; the select acts on edges, not levels.
  always_ff @(posedge clk_238 or negedge rst_n) begin
    if (!rst_n) src_prev <= '0;
    else        src_prev <= src_sync;
  end
  assign src_rise = src_sync & ~src_prev;
  assign sel_rise = clk_sel ? src_rise[1] : src_rise[0];

  // Rate divider: pass one selected edge, then skip div_ratio-1.
  assign fire = enable && sel_rise && (div_cnt == '0);

  always_ff @(posedge clk_238 or negedge rst_n) begin
    if (!rst_n) begin
      div_cnt <= '0;
    end else if (!enable) begin
      div_cnt <= '0;
    end else if (sel_rise) begin
      if (div_cnt == '0) div_cnt <= (div_ratio == '0) ? '0 : div_ratio - 1'b1;
      else               div_cnt <= div_cnt - 1'b1;
    end
  end

  // Pulse former inside the FPGA.
  always_ff @(posedge clk_238 or negedge rst_n) begin
    if (!rst_n) begin
      fpga_trig <= 1'b0;
      pulse_cnt <= '0;
    end else if (fire) begin
      fpga_trig <= 1'b1;
      pulse_cnt <= PW'(PULSE_CYCLES - 1);
    end else if (fpga_trig) begin
      if (pulse_cnt == '0) fpga_trig <= 1'b0;
      else                 pulse_cnt <= pulse_cnt - 1'b1;
    end
  end

  // Output D flip-flop clocked by the 238 MHz reference.
  always_ff @(posedge clk_238 or negedge rst_n) begin
    if (!rst_n) master_trig <= 1'b0;
    else        master_trig <= fpga_trig;
  end

  initial assert (PULSE_CYCLES >= 1)
    else $error("mtu: PULSE_CYCLES must be at least 1");
endmodule
