// tb_trigger_chain: behavioural model of the master-trigger distribution
// chain (LVDS fan-out units connected in series) for testbenches.
//
// Output t is the input delayed by BASE + t*STEP (transport delay), standing
// for the cable and buffer delay to the t-th trigger delay unit along the
// chain. The delays are made-up but fixed, so a testbench can predict which
// 238 MHz edge first sees the trigger at every unit.
module tb_trigger_chain #(
  parameter int      N_OUT = 9,
  parameter realtime BASE  = 5ns,
  parameter realtime STEP  = 3ns
) (
  input  logic             trig_in,
  output logic [N_OUT-1:0] trig_out
);
  timeunit 1ps;
  timeprecision 1fs;

  initial trig_out = '0;

  for (genvar t = 0; t < N_OUT; t++) begin : g_tap
    always @(trig_in) trig_out[t] <= #(BASE + t * STEP) trig_in;
  end
endmodule
