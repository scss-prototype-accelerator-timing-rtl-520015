// tb_workload_60hz: the trigger chain at real operating rates.
//
// A master trigger unit and a TDU delay board, both at their default sizes,
// run from a true 60 Hz AC-line square wave (16.667 ms period) and a 238 MHz
// clock for about 0.3 s of simulated time. The 5712 MHz re-timing stage is
// left out here: it only moves each edge onto the fast clock and is checked
// to the femtosecond in the other testbenches, while its 5712 MHz clock
// would make this long run far slower.
//
// Checked: master-trigger spacing at 60 Hz and at 20 Hz (divide ratio 3),
// each within one 238 MHz period of the exact mains period times the ratio;
// that each trigger is strobed three clock edges after it leaves the MTU;
// and, for every channel, the exact edge of every output pulse against a
// reference model. The settings use the ranges the unit is specified for:
// the full 24-bit delay (2^24-1 cycles, 70.49 ms, longer than four trigger
// periods, so the channel ignores the triggers that come while it counts),
// a delay longer than one 60 Hz period (every second trigger used), the
// full 15-bit width (137.7 us), and short delays.
module tb_workload_60hz;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int N  = 8;
  localparam int DW = 24;
  localparam int WW = 15;
  localparam realtime HALF   = 2100.840ps;
  localparam realtime PERIOD = 4201.680ps;
  localparam realtime T1     = 2100.840ps;
  localparam realtime AC_HALF = 8333333333.333ps;   // 60 Hz

  logic clk_238 = 1'b0, rst_n = 1'b0;
  logic ac_line_60hz = 1'b0, ext_60hz = 1'b0;
  logic clk_sel = 1'b0, enable = 1'b0;
  logic [5:0] div_ratio = 6'd1;
  logic fpga_trig, master_trig;
  logic [N-1:0]         hw_inhibit = '0, sw_inhibit = '0;
  logic [N-1:0][DW-1:0] delay;
  logic [N-1:0][WW-1:0] width;
  logic                 trig_strobe;
  logic [N-1:0]         ch_out, ch_busy;

  int unsigned checks = 0, failures = 0;

  always #HALF clk_238 = ~clk_238;
  always #AC_HALF ac_line_60hz = ~ac_line_60hz;

  mtu u_mtu (.clk_238(clk_238), .rst_n(rst_n), .ac_line_60hz(ac_line_60hz), .ext_60hz(ext_60hz),
             .clk_sel(clk_sel), .enable(enable), .div_ratio(div_ratio),
             .fpga_trig(fpga_trig), .master_trig(master_trig));
  tdu_delay_board u_board (.clk_238(clk_238), .rst_n(rst_n), .trig_in(master_trig),
                           .hw_inhibit(hw_inhibit), .sw_inhibit(sw_inhibit), .delay(delay),
                           .width(width), .trig_strobe(trig_strobe), .ch_out(ch_out), .ch_busy(ch_busy));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL at %0t: %s", $realtime, what);
    end
  endtask

  function automatic longint edge_index(input realtime t);   // edge at time t
    return longint'($floor((t - T1) / PERIOD + 0.5)) + 1;
  endfunction

  // Master trigger spacing and strobe latency.
  longint last_m = -1, m_edge = -1;
  int     n_trig = 0, n_ignored = 0, n_pulses = 0;
  longint busy_end[N];
  longint exp_rise[N][$], exp_fall[N][$];
  always @(posedge master_trig) begin
    longint m;
    m = edge_index($realtime);
    n_trig++;
    if (last_m >= 0) begin
      real want;
      want = real'(div_ratio) * 2.0 * AC_HALF / PERIOD;
      check(real'(m - last_m) > want - 1.0 && real'(m - last_m) < want + 1.0,
            $sformatf("trigger spacing %0d cycles, expected %.1f", m - last_m, want));
    end
    last_m = m;
    m_edge = m;
  end

  // Reference model, run on every strobe.
  always @(posedge trig_strobe) begin
    longint k, d, w;
    k = edge_index($realtime) + 1;        // edge that samples the strobe
    check(k == m_edge + 3, $sformatf("strobe sampled at edge %0d, master trigger left at %0d", k, m_edge));
    for (int i = 0; i < N; i++) begin
      d = longint'(delay[i]);
      w = longint'(width[i]);
      if (k <= busy_end[i]) begin n_ignored++; continue; end
      busy_end[i] = k + d + w;
      exp_rise[i].push_back(k + d);
      exp_fall[i].push_back(k + d + w);
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_mon
    always @(posedge ch_out[i]) begin
      longint n;
      n = edge_index($realtime);
      n_pulses++;
      if (exp_rise[i].size() == 0) check(0, $sformatf("unexpected pulse on channel %0d", i));
      else check(exp_rise[i].pop_front() == n, $sformatf("channel %0d rose at edge %0d", i, n));
    end
    always @(negedge ch_out[i]) if (rst_n) begin
      longint n;
      n = edge_index($realtime);
      if (exp_fall[i].size() == 0) check(0, $sformatf("unexpected fall on channel %0d", i));
      else check(exp_fall[i].pop_front() == n, $sformatf("channel %0d fell at edge %0d", i, n));
    end
  end

  initial begin
    delay[0] = '0;            width[0] = 15'd1;
    delay[1] = '1;            width[1] = 15'd2;        // 70.49 ms
    delay[2] = DW'(3000000);  width[2] = '1;           // 12.6 ms, 137.7 us wide
    delay[3] = DW'(5000000);  width[3] = 15'd100;      // 21.0 ms, over one period
    delay[4] = DW'(238);      width[4] = 15'd238;      // 1 us, 1 us wide
    delay[5] = DW'(2380000);  width[5] = 15'd2380;     // 10 ms
    delay[6] = DW'(123457);   width[6] = 15'd7;
    delay[7] = DW'(3966000);  width[7] = 15'd500;      // just under one period
    for (int i = 0; i < N; i++) busy_end[i] = 0;
    repeat (3) @(negedge clk_238);
    rst_n = 1'b1;
    enable = 1'b1;
    // 60 Hz: six triggers
    wait (n_trig == 6);
    // 20 Hz
    @(negedge clk_238);
    div_ratio = 6'd3;
    last_m = -1;                          // the next trigger still uses the old count
    wait (n_trig == 9);
    @(negedge clk_238);
    enable = 1'b0;
    repeat (10) @(negedge clk_238);       // the last strobe is still on its way
    wait (ch_busy == '0);
    repeat (10) @(negedge clk_238);
    for (int i = 0; i < N; i++)
      check(exp_rise[i].size() == 0 && exp_fall[i].size() == 0,
            $sformatf("channel %0d: %0d expected pulses missing", i, exp_rise[i].size()));
    check(n_ignored > 0, "no trigger ignored by a busy channel");
    check(n_pulses > 30, "too few pulses");
    $display("triggers=%0d pulses=%0d ignored_while_busy=%0d", n_trig, n_pulses, n_ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
