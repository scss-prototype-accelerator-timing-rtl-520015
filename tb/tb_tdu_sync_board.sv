// tb_tdu_sync_board: self-checking test of the 238 MHz / 5712 MHz re-timing
// board.
//
// Random 8-bit patterns are applied on falling edges of clk_238. For every
// rising edge of clk_238 the testbench records the pattern it sampled, then
// checks (a) the first-stage outputs just after that edge, (b) that the final
// outputs still hold the previous pattern 20 ps after the edge, before the
// next 5712 MHz edge, and (c) that they hold the new pattern 100 ps after it,
// once the 5712 MHz edge (40 ps after the 238 MHz edge) has passed. Every
// change of an output is also checked to happen exactly on a 5712 MHz rising
// edge.
module tb_tdu_sync_board;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int N = 8;
  localparam realtime PHASE = 40ps;

  logic         clk_238, clk_5712;
  logic         rst_n = 1'b0;
  logic [N-1:0] d_in = '0, stage1, q;

  int unsigned checks = 0, failures = 0;
  int unsigned n_edges = 0;

  tb_rf_clocks #(.PHASE(PHASE)) u_clk (.clk_238(clk_238), .clk_5712(clk_5712));
  tdu_sync_board dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL at %0t: %s", $realtime, what);
    end
  endtask

  always @(negedge clk_238) d_in <= N'($urandom);

  logic [N-1:0] prev_pat = '0;
  always @(posedge clk_238) begin
    logic [N-1:0] pat;
    pat = d_in;
    if (rst_n) begin
      n_edges++;
      #20ps;
      check(stage1 == pat, "first stage did not take the 238 MHz sample");
      check(q == prev_pat, "final stage changed before the 5712 MHz edge");
      #80ps;
      check(q == pat, "final stage did not take the sample on the 5712 MHz edge");
    end
    prev_pat = pat;
  end

  // Output transitions only on 5712 MHz rising edges.
  realtime last_fast = 0;
  always @(posedge clk_5712) last_fast = $realtime;
  always @(q) if (rst_n) check($realtime == last_fast, "output moved off a 5712 MHz edge");

  initial begin
    repeat (3) @(negedge clk_238);
    rst_n = 1'b1;
    prev_pat = '0;
    repeat (2000) @(negedge clk_238);
    check(n_edges > 1500, "too few clock edges");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
