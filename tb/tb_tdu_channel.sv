// tb_tdu_channel: self-checking test of one delay channel.
//
// A cycle counter in the testbench numbers the rising clock edges. For each
// case the testbench raises trig for one cycle, notes the edge k that samples
// it, and then checks on every falling edge that the output is high exactly
// for the cycles k+delay .. k+delay+width-1 (and low when inhibited), and that
// busy covers the whole delay and pulse. Cases: zero delay, one-cycle
// pulses, random delays and widths, zero width, a retrigger while busy, an
// inhibit in the middle of a pulse, and the full 24-bit delay, whose length
// is also checked in simulated time (about 70.5 ms at 238 MHz).
module tb_tdu_channel;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned DW = 24;
  localparam int unsigned WW = 15;
  localparam realtime HALF = 2100.840ps;   // 238 MHz

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          trig = 1'b0;
  logic [DW-1:0] delay = '0;
  logic [WW-1:0] width = '0;
  logic          inhibit = 1'b0;
  logic          out, busy;

  int unsigned checks = 0, failures = 0;
  longint unsigned cyc = 0;

  tdu_channel dut (.*);

  always #HALF clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL at cycle %0d: %s", cyc, what);
    end
  endtask

  // Trigger with the given settings; check every cycle until idle again.
  // inh_from/inh_to: cycles (relative to the pulse start) during which the
  // inhibit input is held high; retrig_at: offset after k of a second strobe.
  task automatic run_case(input int unsigned d, input int unsigned w,
                          input int inh_from = -1, input int inh_to = -1,
                          input int retrig_at = -1);
    longint unsigned k, last, start;
    bit exp_out, exp_busy;
    @(negedge clk);
    delay = DW'(d);
    width = WW'(w);
    trig  = 1'b1;
    k     = cyc + 1;                 // the next rising edge samples trig
    @(negedge clk);
    trig  = 1'b0;
    start = k + d;
    last  = (w == 0) ? k : start + w - 1;
    while (cyc <= last + 3) begin
      // cyc is the number of the latest rising edge
      if (retrig_at >= 0 && cyc == k + longint'(retrig_at) - 1) trig = 1'b1;
      else trig = 1'b0;
      inhibit = (inh_from >= 0 && cyc + 1 >= start + inh_from && cyc + 1 < start + inh_to);
      exp_busy = (w != 0) && cyc >= k && cyc <= last;
      exp_out  = (w != 0) && cyc >= start && cyc <= last &&
                 !(inh_from >= 0 && cyc >= start + inh_from && cyc < start + inh_to);
      check(out == exp_out, $sformatf("out=%0b expected %0b (d=%0d w=%0d k=%0d)", out, exp_out, d, w, k));
      check(busy == exp_busy, $sformatf("busy=%0b expected %0b (d=%0d w=%0d)", busy, exp_busy, d, w));
      @(negedge clk);
    end
    trig = 1'b0;
    inhibit = 1'b0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_case(0, 1);
    run_case(1, 1);
    run_case(0, 4);
    run_case(5, 3);
    run_case(37, 20);
    run_case(9, 0);                        // zero width: no pulse, never busy
    run_case(40, 10, -1, -1, 12);          // second strobe during the delay
    run_case(3, 6, -1, -1, 5);             // second strobe during the pulse
    run_case(10, 12, 4, 8);                // inhibit inside the pulse
    run_case(2, 5, 0, 5);                  // inhibit over the whole pulse
    for (int i = 0; i < 12; i++)
      run_case($urandom_range(0, 3000), $urandom_range(1, 400));
    run_case(0, (1 << WW) - 1);            // longest pulse

    // Full 24-bit delay: check the rise lands on the right edge and time.
    begin
      longint unsigned k;
      realtime t0, t1;
      @(negedge clk);
      delay = '1; width = 15'd2; trig = 1'b1; k = cyc + 1;
      @(posedge clk); t0 = $realtime;
      @(negedge clk); trig = 1'b0;
      @(posedge out); t1 = $realtime;
      @(negedge clk);
      check(cyc == k + (64'd1 << DW) - 1, $sformatf("full delay rose after edge %0d, expected %0d", cyc, k + (64'd1 << DW) - 1));
      // 2^24-1 cycles of 4.2017 ns = 70.49 ms
      check((t1 - t0) > 70.48e9 && (t1 - t0) < 70.50e9, $sformatf("full delay lasted %0t", t1 - t0));
      repeat (4) @(negedge clk);
      check(!busy && !out, "idle after full-range case");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
