// sync_2ff: two-flop synchroniser for signals that enter the 238 MHz
// domain from outside (60 Hz clocks, the master trigger after its cable run,
// hardware inhibit lines). Each bit is sampled by two flip-flops in series;
// the output lags the input by two clock edges. Reset clears both stages.
module sync_2ff #(
  parameter int unsigned WIDTH = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [WIDTH-1:0] meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= '0;
      q    <= '0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
