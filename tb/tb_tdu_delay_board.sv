// tb_tdu_delay_board: self-checking test of the TDU delay board.
//
// Each operation programs random delays, widths and software inhibits into
// the eight channels, sends one master-trigger pulse (8 cycles long, as the
// master trigger unit makes it) and compares all eight outputs on every
// falling clock edge with a reference model: the trigger first sampled at
// edge c gives a strobe sampled at edge c+2, channel i is high for the
// cycles c+2+delay[i] .. c+2+delay[i]+width[i]-1, and is held low when its
// software inhibit is set or when its hardware inhibit was applied two or
// more edges earlier. Hardware inhibits are toggled at random during the
// operation so that they start and end inside pulses. The number of
// strobes per operation is checked too.
module tb_tdu_delay_board;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int N  = 8;
  localparam int DW = 24;
  localparam int WW = 15;

  logic                 clk_238, clk_5712;
  logic                 rst_n = 1'b0;
  logic                 trig_in = 1'b0;
  logic [N-1:0]         hw_inhibit = '0, sw_inhibit = '0;
  logic [N-1:0][DW-1:0] delay = '0;
  logic [N-1:0][WW-1:0] width = '0;
  logic                 trig_strobe;
  logic [N-1:0]         ch_out, ch_busy;

  int unsigned checks = 0, failures = 0;
  longint cyc = 0;
  int n_strobe = 0;

  tb_rf_clocks u_clk (.clk_238(clk_238), .clk_5712(clk_5712));
  tdu_delay_board dut (.*);

  always @(posedge clk_238) begin
    cyc <= cyc + 1;
    if (trig_strobe) n_strobe <= n_strobe + 1;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL at cycle %0d: %s", cyc, what);
    end
  endtask

  task automatic operation(input bit toggle_hw, input int max_delay);
    longint c;
    logic [N-1:0] hw_hist[longint];
    int strobes0;
    longint last;
    @(negedge clk_238);
    for (int i = 0; i < N; i++) begin
      delay[i] = DW'($urandom_range(0, max_delay));
      width[i] = WW'($urandom_range(1, 60));
      sw_inhibit[i] = ($urandom_range(0, 5) == 0);
    end
    hw_inhibit = toggle_hw ? N'($urandom) : '0;
    strobes0 = n_strobe;
    last = 0;
    for (int i = 0; i < N; i++)
      if (longint'(delay[i]) + longint'(width[i]) > last) last = longint'(delay[i]) + longint'(width[i]);
    trig_in = 1'b1;
    c = cyc + 1;                          // first edge sampling the trigger
    for (longint m = cyc; m <= c + 2 + last + 4; m = m + 1) begin
      hw_hist[cyc] = hw_inhibit;          // value applied after edge cyc
      if (cyc >= c + 7) trig_in = 1'b0;    // 8-cycle trigger pulse
      for (int i = 0; i < N; i++) begin
        longint s = c + 2 + longint'(delay[i]);
        bit hw_eff = hw_hist.exists(cyc - 2) ? hw_hist[cyc - 2][i] : 1'b0;
        bit exp = cyc >= s && cyc < s + longint'(width[i]) && !sw_inhibit[i] && !hw_eff;
        check(ch_out[i] == exp, $sformatf("ch%0d out=%0b expected %0b (d=%0d w=%0d)",
                                           i, ch_out[i], exp, delay[i], width[i]));
      end
      @(negedge clk_238);
      if (toggle_hw && $urandom_range(0, 7) == 0) hw_inhibit = N'($urandom);
    end
    hw_inhibit = '0;
    repeat (4) @(negedge clk_238);
    check(n_strobe == strobes0 + 1, $sformatf("%0d strobes for one trigger", n_strobe - strobes0));
    check(ch_busy == '0, "channels still busy after the operation");
  endtask

  initial begin
    repeat (3) @(negedge clk_238);
    rst_n = 1'b1;
    repeat (3) @(negedge clk_238);
    for (int op = 0; op < 6; op++) operation(1'b0, 200);
    for (int op = 0; op < 10; op++) operation(1'b1, 200);
    operation(1'b0, 3);                    // channels overlapping closely
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
