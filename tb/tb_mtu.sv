// tb_mtu: self-checking test of the master trigger unit.
//
// The two 60 Hz inputs are replaced by slow square waves toggled on falling
// edges of the 238 MHz clock (periods of 500 and 733 cycles, so the test
// stays short; the logic does not care about the absolute period). A small
// cycle-level reference model in the testbench follows the specification:
// an input that is high when reset ends counts as a rising edge;
// a source edge seen at clock edge c reaches the divider at edge c+2; the
// divider passes the first edge after enable and then every div_ratio-th;
// the master trigger rises at edge c+3 and stays high 8 cycles. Every
// rising edge of master_trig is compared with the model's list, pulse widths
// and the spacing of consecutive triggers are checked, and the trigger edges
// are checked to fall on clk_238 edges. Covered: both sources, ratios 1, 3,
// 60 and 0, a source switch, disable and re-enable.
module tb_mtu;
  timeunit 1ps;
  timeprecision 1fs;

  localparam realtime HALF = 2100.840ps;
  localparam int AC_P  = 500;     // cycles per period of the "AC line" input
  localparam int EXT_P = 733;     // cycles per period of the external input

  logic       clk_238 = 1'b0, rst_n = 1'b0;
  logic       ac_line_60hz = 1'b0, ext_60hz = 1'b0;
  logic       clk_sel = 1'b0, enable = 1'b0;
  logic [5:0] div_ratio = 6'd1;
  logic       fpga_trig, master_trig;

  int unsigned checks = 0, failures = 0;
  longint cyc = 0;

  mtu dut (.*);

  always #HALF clk_238 = ~clk_238;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL at cycle %0d: %s", cyc, what);
    end
  endtask

  // Source waveforms, changed on falling edges only.
  int ac_ph = AC_P / 2, ext_ph = EXT_P / 2;   // both inputs start low
  always @(negedge clk_238) begin
    ac_ph  <= (ac_ph  + 1) % AC_P;
    ext_ph <= (ext_ph + 1) % EXT_P;
    ac_line_60hz <= (ac_ph  < AC_P / 2);
    ext_60hz     <= (ext_ph < EXT_P / 3);
  end

  // Reference model.
  bit     ac_prev = 0, ext_prev = 0;
  bit     ev_ac[2], ev_ext[2];
  int     mcnt = 0;
  longint exp_q[$];
  int     n_fired = 0;
  always @(posedge clk_238) begin
    cyc = cyc + 1;
    if (rst_n) begin
      // events seen two edges ago reach the divider now
      if (!enable) mcnt = 0;
      else if (clk_sel ? ev_ext[1] : ev_ac[1]) begin
        if (mcnt == 0) begin
          exp_q.push_back(cyc + 1);
          mcnt = (div_ratio == 0) ? 0 : div_ratio - 1;
        end else mcnt = mcnt - 1;
      end
      ev_ac[1]  = ev_ac[0];  ev_ac[0]  = ac_line_60hz && !ac_prev;
      ev_ext[1] = ev_ext[0]; ev_ext[0] = ext_60hz && !ext_prev;
      ac_prev  = ac_line_60hz;
      ext_prev = ext_60hz;
    end
  end

  // Checker: observe master_trig on falling edges.
  bit     mt_prev = 0;
  longint rise_cyc, last_rise = -1;
  int     hi_len = 0;
  always @(negedge clk_238) begin
    if (master_trig && !mt_prev) begin
      n_fired++;
      rise_cyc = cyc;
      if (exp_q.size() == 0) check(0, "unexpected master trigger");
      else check(exp_q.pop_front() == rise_cyc, $sformatf("master trigger at edge %0d", rise_cyc));
      last_rise = rise_cyc;
      hi_len = 0;
    end
    if (master_trig) hi_len++;
    if (!master_trig && mt_prev) check(hi_len == 8, $sformatf("pulse width %0d cycles", hi_len));
    mt_prev = master_trig;
  end

  // Trigger edges must sit on clock edges (re-timed output).
  always @(posedge master_trig) begin
    #1ps;
    check(clk_238 == 1'b1, "master_trig edge not aligned to clk_238 rising edge");
  end

  // Spacing of consecutive triggers for a fixed configuration.
  task automatic run_cfg(input bit sel, input int div, input int n_trig);
    int period, start_n;
    longint prev_rise;
    @(negedge clk_238);
    clk_sel = sel; div_ratio = 6'(div);
    start_n = n_fired;
    // skip the first trigger after the change, then time the next ones
    wait (n_fired > start_n);
    prev_rise = last_rise;
    period = sel ? EXT_P : AC_P;
    if (div == 0) div = 1;
    for (int i = 0; i < n_trig; i++) begin
      int n0 = n_fired;
      wait (n_fired > n0);
      check(last_rise - prev_rise == longint'(div * period),
            $sformatf("trigger spacing %0d, expected %0d", last_rise - prev_rise, div * period));
      prev_rise = last_rise;
    end
  endtask

  initial begin
    repeat (5) @(negedge clk_238);
    rst_n = 1'b1;
    @(negedge clk_238);
    enable = 1'b1;
    run_cfg(0, 1, 4);
    run_cfg(0, 3, 3);
    run_cfg(1, 2, 3);       // switch to the external 60 Hz clock
    run_cfg(1, 0, 2);       // ratio 0 behaves as 1
    run_cfg(0, 60, 2);      // 1 Hz operation on a real 60 Hz line
    // disable: no trigger for several periods
    begin
      int n0;
      @(negedge clk_238); enable = 1'b0;
      repeat (3) @(negedge clk_238);
      n0 = n_fired;
      repeat (5 * AC_P) @(negedge clk_238);
      check(n_fired == n0, "trigger while disabled");
      enable = 1'b1;
      div_ratio = 6'd4;
      // the first edge after re-enable fires
      repeat (AC_P + 10) @(negedge clk_238);
      check(n_fired == n0 + 1, "no trigger on first edge after enable");
    end
    repeat (20) @(negedge clk_238);
    check(exp_q.size() == 0, "expected triggers missing at the end");
    check(n_fired > 15, "too few triggers");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk_238);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
