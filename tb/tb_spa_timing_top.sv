// tb_spa_timing_top: end-to-end test of the timing system at its default
// size (one master trigger unit, nine trigger delay units of eight channels,
// 24-bit delays, 15-bit widths).
//
// The master trigger leaves the design, runs through a behavioural model of
// the distribution chain (tb_trigger_chain, fixed cable delays of 5 ns plus
// 3 ns per unit) and comes back to each TDU. The 60 Hz inputs are square
// waves with shortened periods (2000 and 3001 cycles of 238 MHz) so that a
// run needs only milliseconds of simulated time; all hardware parameters
// stay at their defaults.
//
// For every master-trigger edge the testbench predicts, from the time of
// that edge alone, what each of the 72 outputs must do: the trigger reaches
// unit t at Tm + 5 ns + 3 ns*t, is first sampled by the next 238 MHz edge n1,
// is strobed at edge n1+2 = k, and channel i then rises at
// T(k + delay + 1) + 40 ps (the 5712 MHz phase) and falls `width` periods
// later, unless it is inhibited or still busy from an earlier trigger
// (busy until edge k + delay + width). The predicted edges are compared
// with the observed ones to within 1 fs. Master-trigger spacing is checked
// against the selected source period times the divide ratio.
//
// Mechanisms that must each occur at least once (a failure is counted for
// any that never does): triggers from the AC-line input and from the
// external input, a divide ratio above 1, a disabled interval without
// triggers, outputs suppressed by hardware and by software inhibit, a
// trigger ignored by a busy channel, a zero-delay channel, a long delay.
module tb_spa_timing_top;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int NT = 9;
  localparam int N  = 8;
  localparam int DW = 24;
  localparam int WW = 15;
  localparam int AC_P  = 2000;
  localparam int EXT_P = 3001;
  localparam realtime PHASE  = 40ps;
  localparam realtime PERIOD = 4201.680ps;
  localparam realtime T1     = 2100.840ps;   // time of edge 1
  localparam realtime BASE   = 5ns;
  localparam realtime STEP   = 3ns;

  logic clk_238, clk_5712;
  logic rst_n = 1'b0;
  logic ac_line_60hz = 1'b0, ext_60hz = 1'b0;
  logic mtu_clk_sel = 1'b0, mtu_enable = 1'b0;
  logic [5:0] mtu_div_ratio = 6'd1;
  logic master_trig;
  logic [NT-1:0] tdu_trig_in;
  logic [NT-1:0][N-1:0]         hw_inhibit = '0, sw_inhibit = '0;
  logic [NT-1:0][N-1:0][DW-1:0] delay = '0;
  logic [NT-1:0][N-1:0][WW-1:0] width = '0;
  logic [NT-1:0][N-1:0]         tdu_out, tdu_busy;
  logic [NT-1:0]                tdu_trig_strobe;

  int unsigned checks = 0, failures = 0;

  tb_rf_clocks #(.PHASE(PHASE)) u_clk (.clk_238(clk_238), .clk_5712(clk_5712));
  tb_trigger_chain #(.N_OUT(NT), .BASE(BASE), .STEP(STEP)) u_chain (
    .trig_in(master_trig), .trig_out(tdu_trig_in));
  spa_timing_top dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 30) $display("FAIL at %0t: %s", $realtime, what);
    end
  endtask

  // 60 Hz stand-ins, changed on falling clock edges, both starting low.
  int ac_ph = AC_P / 2, ext_ph = EXT_P / 2;
  always @(negedge clk_238) begin
    ac_ph  <= (ac_ph  + 1) % AC_P;
    ext_ph <= (ext_ph + 1) % EXT_P;
    ac_line_60hz <= (ac_ph  < AC_P / 2);
    ext_60hz     <= (ext_ph < EXT_P / 2);
  end

  // Mechanism counters.
  int n_trig_ac = 0, n_trig_ext = 0, n_div_gt1 = 0, n_disabled = 0;
  int n_hw_inh = 0, n_sw_inh = 0, n_busy_ignored = 0, n_zero_delay = 0, n_long_delay = 0;

  // Expected and observed output edges per channel.
  realtime exp_rise[NT][N][$], exp_fall[NT][N][$];
  realtime obs_rise[NT][N][$], obs_fall[NT][N][$];
  longint  busy_end[NT][N];             // channel idle after this edge

  function automatic longint edge_at_or_before(input realtime t);
    return longint'($floor((t - T1) / PERIOD + 1e-9)) + 1;
  endfunction
  function automatic realtime edge_time(input longint n);
    return T1 + real'(n - 1) * PERIOD;
  endfunction

  // Reference model, run at every master-trigger rising edge.
  realtime last_master = -1;
  int      exp_spacing = 0;
  always @(posedge master_trig) begin
    realtime tm;
    tm = $realtime;
    if (mtu_clk_sel) n_trig_ext++; else n_trig_ac++;
    check(edge_at_or_before(tm) == edge_at_or_before(tm - 1ps) + 1,
          "master trigger not on a 238 MHz edge");
    if (last_master >= 0 && exp_spacing > 0) begin
      realtime want;
      want = real'(exp_spacing) * PERIOD;
      check((tm - last_master - want) < 0.001ps && (want - (tm - last_master)) < 0.001ps,
            $sformatf("master trigger spacing %0t, expected %0t", tm - last_master, want));
      if (mtu_div_ratio > 1) n_div_gt1++;
    end
    last_master = tm;
    for (int t = 0; t < NT; t++) begin
      longint k, d, w;
      k = edge_at_or_before(tm + BASE + real'(t) * STEP) + 1 + 2;
      for (int i = 0; i < N; i++) begin
        d = longint'(delay[t][i]);
        w = longint'(width[t][i]);
        if (w == 0) continue;
        if (k <= busy_end[t][i]) begin
          n_busy_ignored++;
          continue;
        end
        busy_end[t][i] = k + d + w;
        if (hw_inhibit[t][i]) begin n_hw_inh++; continue; end
        if (sw_inhibit[t][i]) begin n_sw_inh++; continue; end
        if (d == 0) n_zero_delay++;
        if (d > 10000) n_long_delay++;
        exp_rise[t][i].push_back(edge_time(k + d + 1) + PHASE);
        exp_fall[t][i].push_back(edge_time(k + d + 1 + w) + PHASE);
      end
    end
  end

  for (genvar t = 0; t < NT; t++) begin : g_t
    for (genvar i = 0; i < N; i++) begin : g_i
      always @(posedge tdu_out[t][i]) obs_rise[t][i].push_back($realtime);
      always @(negedge tdu_out[t][i]) if (rst_n) obs_fall[t][i].push_back($realtime);
    end
  end

  // Compare everything collected so far; queues are emptied.
  task automatic compare_all();
    for (int t = 0; t < NT; t++)
      for (int i = 0; i < N; i++) begin
        check(obs_rise[t][i].size() == exp_rise[t][i].size(),
              $sformatf("tdu%0d ch%0d: %0d pulses, expected %0d", t, i,
                        obs_rise[t][i].size(), exp_rise[t][i].size()));
        while (obs_rise[t][i].size() > 0 && exp_rise[t][i].size() > 0) begin
          realtime o = obs_rise[t][i].pop_front(), e = exp_rise[t][i].pop_front();
          check((o - e) < 0.001ps && (e - o) < 0.001ps,
                $sformatf("tdu%0d ch%0d rose at %0t, expected %0t", t, i, o, e));
        end
        while (obs_fall[t][i].size() > 0 && exp_fall[t][i].size() > 0) begin
          realtime o = obs_fall[t][i].pop_front(), e = exp_fall[t][i].pop_front();
          check((o - e) < 0.001ps && (e - o) < 0.001ps,
                $sformatf("tdu%0d ch%0d fell at %0t, expected %0t", t, i, o, e));
        end
        obs_rise[t][i].delete(); exp_rise[t][i].delete();
        obs_fall[t][i].delete(); exp_fall[t][i].delete();
      end
  endtask

  // Program random settings; channel 7 of unit 0 keeps a delay longer than
  // one trigger period so that it is still busy at the next trigger.
  task automatic program_settings(input int max_delay);
    for (int t = 0; t < NT; t++)
      for (int i = 0; i < N; i++) begin
        if (t == 0 && i == 7) continue;
        delay[t][i] = DW'($urandom_range(0, max_delay));
        width[t][i] = WW'($urandom_range(1, 120));
        hw_inhibit[t][i] = ($urandom_range(0, 9) == 0);
        sw_inhibit[t][i] = ($urandom_range(0, 9) == 0);
      end
    delay[1][0] = '0;                     // a zero-delay channel
    hw_inhibit[1][0] = 1'b0; sw_inhibit[1][0] = 1'b0;
    delay[2][3] = DW'(12000);             // a long delay (about 50 us)
    hw_inhibit[2][3] = 1'b0; sw_inhibit[2][3] = 1'b0;
  endtask

  task automatic wait_triggers(input int n);
    repeat (n) @(posedge master_trig);
  endtask

  // Stop triggering, let every channel finish, then check.
  task automatic quiesce();
    @(negedge clk_238);
    mtu_enable = 1'b0;
    exp_spacing = 0;
    last_master = -1;
    repeat (20) @(negedge clk_238);
    wait (tdu_busy == '0);
    repeat (10) @(negedge clk_238);
    compare_all();
  endtask

  task automatic run(input bit sel, input int div, input int n, input int max_delay);
    program_settings(max_delay);
    mtu_clk_sel = sel;
    mtu_div_ratio = 6'(div);
    repeat (12) @(negedge clk_238);       // hardware inhibits settle
    mtu_enable = 1'b1;
    wait_triggers(1);
    exp_spacing = div * (sel ? EXT_P : AC_P);
    wait_triggers(n - 1);
    quiesce();
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin
      delay[0][i] = '0;
      width[0][i] = 15'd1;
    end
    delay[0][7] = DW'(AC_P + 500);        // outlasts one AC period
    width[0][7] = 15'd10;
    for (int t = 0; t < NT; t++)
      for (int i = 0; i < N; i++) busy_end[t][i] = 0;
    repeat (3) @(negedge clk_238);
    rst_n = 1'b1;
    repeat (3) @(negedge clk_238);

    run(1'b0, 1, 3, 1500);                // AC line, 1:1
    run(1'b0, 3, 2, 1900);                // AC line, divided by 3
    // Disabled: no trigger for several AC periods.
    begin
      int n0;
      n0 = n_trig_ac + n_trig_ext;
      repeat (4 * AC_P) @(negedge clk_238);
      check(n_trig_ac + n_trig_ext == n0, "master trigger while disabled");
      n_disabled++;
    end
    run(1'b1, 2, 2, 1500);                // external 60 Hz source, divided by 2
    run(1'b1, 1, 3, 2500);

    check(n_trig_ac > 0,      "no trigger from the AC line input");
    check(n_trig_ext > 0,     "no trigger from the external input");
    check(n_div_gt1 > 0,      "divide ratio above 1 never checked");
    check(n_disabled > 0,     "disabled interval never checked");
    check(n_hw_inh > 0,       "no output suppressed by hardware inhibit");
    check(n_sw_inh > 0,       "no output suppressed by software inhibit");
    check(n_busy_ignored > 0, "no trigger ignored by a busy channel");
    check(n_zero_delay > 0,   "no zero-delay output");
    check(n_long_delay > 0,   "no long-delay output");
    $display("mechanisms: ac=%0d ext=%0d div>1=%0d disabled=%0d hw_inh=%0d sw_inh=%0d busy_ignored=%0d zero_delay=%0d long_delay=%0d",
             n_trig_ac, n_trig_ext, n_div_gt1, n_disabled, n_hw_inh, n_sw_inh,
             n_busy_ignored, n_zero_delay, n_long_delay);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
