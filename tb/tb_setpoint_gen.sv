// tb_setpoint_gen: self-checking test of the set-point generator.
//
// Uses a short step interval (STEP_PERIODS = 4) and valley strobes every 10
// clocks. Checks that the set point equals iref without the step, that with
// the step enabled it alternates between iref and iref + step every
// STEP_PERIODS periods (576 <-> 896 as in the 0.5 A transient), that it only
// changes on a strobe, and that the sum is clamped to the 11-bit range.
module tb_setpoint_gen;
  import boost_ctrl_pkg::*;

  localparam int unsigned SP = 4;

  logic                    clk = 1'b0;
  logic                    rst_n = 1'b0;
  logic                    valley = 1'b0;
  logic [ADC_W-1:0]        iref = '0;
  logic                    step_en = 1'b0;
  logic signed [ADC_W-1:0] step_ref = '0;
  logic [ADC_W-1:0]        vref;
  logic                    step_active;

  int checks = 0;
  int failures = 0;

  setpoint_gen #(.STEP_PERIODS(SP)) dut (.*);

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // One switching period: strobe, then 9 quiet clocks with vref constant.
  task automatic period(output logic [ADC_W-1:0] v);
    valley = 1'b1;
    @(posedge clk); #1 valley = 1'b0;
    v = vref;
    repeat (9) begin
      @(posedge clk); #1;
      check(vref == v, "set point constant within a period");
    end
  endtask

  logic [ADC_W-1:0] v;
  int               phase_len;
  int               highs, lows;
  logic [ADC_W-1:0] prev;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    iref = 11'd512;
    period(v);
    check(v == 11'd512, "plain set point");

    // Periodic step 576 -> 896.
    iref = 11'd576; step_ref = 11'sd320; step_en = 1'b1;
    highs = 0; lows = 0; phase_len = 0; prev = 11'd576;
    for (int p = 0; p < 8 * SP; p++) begin
      period(v);
      check(v == 11'd576 || v == 11'd896, $sformatf("step value %0d", v));
      check(step_active == (v == 11'd896), "step_active matches");
      if (v == 11'd896) highs++; else lows++;
      if (v != prev) begin
        if (p > SP) check(phase_len == SP, $sformatf("step half-cycle %0d periods", phase_len));
        phase_len = 0;
      end
      phase_len++;
      prev = v;
    end
    check(highs == 4 * SP && lows == 4 * SP, $sformatf("duty of the step %0d/%0d", highs, lows));

    // Negative step and clamping.
    step_en = 1'b0; period(v);
    check(v == 11'd576, "step removed");
    iref = 11'd100; step_ref = -11'sd300; step_en = 1'b1;
    for (int p = 0; p < 2 * SP; p++) begin
      period(v);
      check(v == 11'd100 || v == 11'd0, $sformatf("clamped low value %0d", v));
    end
    iref = 11'd2000; step_ref = 11'sd300;
    for (int p = 0; p < 2 * SP; p++) begin
      period(v);
      check(v == 11'd2000 || v == 11'd2047, $sformatf("clamped high value %0d", v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
