// tb_dpwm_symmetric: self-checking test of the symmetrical DPWM.
//
// Runs the modulator at its default size (N_r = 200, 400 clocks per period)
// for a list of commands, including 0, the full-scale 200 and an
// out-of-range value, and checks per period: the period length (400 clocks
// valley to valley), the on-time (2u clocks), the sampling strobe at half a
// period and inside the on-interval, that a command change in mid-period is
// only taken at the next valley, and that en low stops the gate.
module tb_dpwm_symmetric;
  import boost_ctrl_pkg::*;

  localparam int unsigned UW = $clog2(NR + 1);

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          en = 1'b0;
  logic [UW-1:0] u_in = '0;
  logic          gate, carrier_up, valley, peak;
  logic [UW-1:0] carrier, u_active;

  int checks = 0;
  int failures = 0;

  dpwm_symmetric dut (.*);

  always #10 clk = ~clk;   // 50 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Measure one period that starts at a valley: returns on clocks, length and
  // position of the peak strobe; checks the gate at the strobe.
  task automatic measure_period(output int on_clks, output int len, output int peak_pos,
                                output bit gate_at_peak);
    on_clks = 0; len = 0; peak_pos = -1; gate_at_peak = 0;
    do begin
      if (gate) on_clks++;
      if (peak) begin peak_pos = len; gate_at_peak = gate; end
      len++;
      @(posedge clk); #1;
    end while (!valley);
  endtask

  task automatic wait_valley();
    do begin @(posedge clk); #1; end while (!valley);
  endtask

  int on_clks, len, peak_pos;
  bit gp;
  int unsigned cmds[7] = '{116, 0, 200, 1, 57, 199, 250};
  int unsigned expect_u;

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    en = 1'b1;
    foreach (cmds[i]) begin
      u_in = UW'(cmds[i]);
      wait_valley();                    // command taken here
      expect_u = (cmds[i] > NR) ? NR : cmds[i];
      check(u_active == UW'(expect_u), $sformatf("u_active %0d for u_in %0d", u_active, cmds[i]));
      measure_period(on_clks, len, peak_pos, gp);
      check(len == 2 * NR, $sformatf("period %0d clocks, expected %0d", len, 2 * NR));
      check(on_clks == 2 * int'(expect_u), $sformatf("on-time %0d clocks for u=%0d", on_clks, expect_u));
      check(peak_pos == NR, $sformatf("sample strobe at %0d, expected %0d", peak_pos, NR));
      if (expect_u > 0) check(gp == 1'b1, "gate high at the sampling strobe");
    end

    // Mid-period change: must not affect the current period.
    u_in = 8'd100;
    wait_valley();
    repeat (50) @(posedge clk);
    #1 u_in = 8'd20;
    on_clks = 0;
    while (!valley) begin
      if (gate) on_clks++;
      check(u_active == 8'd100, "command held until the valley");
      @(posedge clk); #1;
    end
    check(u_active == 8'd20, "new command at the valley");

    // Disable: gate low.
    en = 1'b0;
    repeat (500) begin
      @(posedge clk); #1;
      if (gate) begin check(1'b0, "gate high while disabled"); break; end
    end
    check(!gate && carrier == '0, "modulator stopped while disabled");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
