// tb_tdu: self-checking test of a complete trigger delay unit.
//
// Each operation programs random delays and widths, inhibits one channel in
// hardware and one in software, and sends a master trigger. The testbench
// numbers the 238 MHz rising edges (edge n at 2100.84 ps + (n-1)*4201.68 ps)
// and predicts, for channel i, an output that rises at exactly
// T(c + 3 + delay[i]) + 40 ps and falls width[i] periods later, where c is
// the edge that first samples the trigger and 40 ps is the 5712 MHz clock
// phase: three edges for the trigger synchroniser and strobe, one for the
// 238 MHz re-timing flip-flop, then the next 5712 MHz edge. Rise and fall
// times are compared to within 1 fs, and inhibited channels must stay
// quiet. One operation uses a long delay (over 20000 cycles) on one channel.
module tb_tdu;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int N  = 8;
  localparam int DW = 24;
  localparam int WW = 15;
  localparam realtime PHASE  = 40ps;
  localparam realtime PERIOD = 4201.680ps;

  logic                 clk_238, clk_5712;
  logic                 rst_n = 1'b0;
  logic                 trig_in = 1'b0;
  logic [N-1:0]         hw_inhibit = '0, sw_inhibit = '0;
  logic [N-1:0][DW-1:0] delay = '0;
  logic [N-1:0][WW-1:0] width = '0;
  logic                 trig_strobe;
  logic [N-1:0]         fpga_out, ch_busy, out;

  int unsigned checks = 0, failures = 0;
  longint cyc = 0;

  tb_rf_clocks #(.PHASE(PHASE)) u_clk (.clk_238(clk_238), .clk_5712(clk_5712));
  tdu dut (.*);

  always @(posedge clk_238) cyc <= cyc + 1;

  function automatic realtime edge_time(input longint n);
    return 2100.840ps + real'(n - 1) * PERIOD;
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL at %0t: %s", $realtime, what);
    end
  endtask

  realtime rise_t[N], fall_t[N];
  int      n_rise[N];
  for (genvar i = 0; i < N; i++) begin : g_mon
    always @(posedge out[i]) begin rise_t[i] = $realtime; n_rise[i]++; end
    always @(negedge out[i]) if (rst_n) fall_t[i] = $realtime;
  end

  function automatic bit near(input realtime a, input realtime b);
    return (a - b < 0.001ps) && (b - a < 0.001ps);
  endfunction

  task automatic operation(input bit full_range);
    longint c, last;
    int hw_ch, sw_ch;
    int n0[N];
    @(negedge clk_238);
    hw_ch = $urandom_range(0, N - 1);
    sw_ch = (hw_ch + 1 + $urandom_range(0, N - 2)) % N;
    for (int i = 0; i < N; i++) begin
      delay[i] = DW'($urandom_range(0, 500));
      width[i] = WW'($urandom_range(1, 100));
      n0[i] = n_rise[i];
    end
    if (full_range) delay[sw_ch == 0 ? 1 : 0] = DW'(20000 + $urandom_range(0, 5000));
    hw_inhibit = '0; hw_inhibit[hw_ch] = 1'b1;
    sw_inhibit = '0; sw_inhibit[sw_ch] = 1'b1;
    repeat (3) @(negedge clk_238);         // let the hardware inhibit settle
    trig_in = 1'b1;
    c = cyc + 1;
    repeat (8) @(negedge clk_238);
    trig_in = 1'b0;
    last = 0;
    for (int i = 0; i < N; i++)
      if (longint'(delay[i]) + longint'(width[i]) > last) last = longint'(delay[i]) + longint'(width[i]);
    wait (cyc > c + 3 + last + 3);
    @(negedge clk_238);
    for (int i = 0; i < N; i++) begin
      if (i == hw_ch || i == sw_ch) begin
        check(n_rise[i] == n0[i], $sformatf("inhibited channel %0d fired", i));
      end else begin
        realtime er = edge_time(c + 3 + longint'(delay[i])) + PHASE;
        realtime ef = er + real'(width[i]) * PERIOD;
        check(n_rise[i] == n0[i] + 1, $sformatf("channel %0d fired %0d times", i, n_rise[i] - n0[i]));
        check(near(rise_t[i], er), $sformatf("ch%0d rose at %0t, expected %0t", i, rise_t[i], er));
        check(near(fall_t[i], ef), $sformatf("ch%0d fell at %0t, expected %0t", i, fall_t[i], ef));
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk_238);
    rst_n = 1'b1;
    for (int op = 0; op < 10; op++) operation(1'b0);
    operation(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
