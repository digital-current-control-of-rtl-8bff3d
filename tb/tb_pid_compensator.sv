// tb_pid_compensator: self-checking test of the fixed-point PID compensator.
//
// Feeds a sequence of samples (the PI gains Kp = 9, Ki = 66, the integral
// gain Ki = 1, then random gains with a derivative term and random errors)
// and compares every command with a reference computed here in 64-bit
// integer arithmetic from the compensator equations:
//   e = vref - v, de = clamp12(e - e_prev),
//   ui = clamp(ui + Ki*e, 0, 200*2^13),
//   u  = clamp(floor((16*Kp*e + ui + 128*Kd*de) / 2^13), 0, 200).
// Also checks the 3-clock latency, the clear input, and that both the
// integrator clamp and the output clamp were exercised.
module tb_pid_compensator;
  import boost_ctrl_pkg::*;

  logic                    clk = 1'b0;
  logic                    rst_n = 1'b0;
  logic                    clear = 1'b0;
  logic                    valid = 1'b0;
  logic [ADC_W-1:0]        vref = '0;
  logic [ADC_W-1:0]        v_sense = '0;
  pid_gains_t              gains = '0;
  logic [U_W-1:0]          u;
  logic                    u_valid;
  logic signed [SUM_W-1:0] u_sum;
  logic signed [ACC_W-1:0] u_int;
  logic                    int_sat, out_sat;

  int checks = 0;
  int failures = 0;
  int int_sat_seen = 0;
  int out_sat_seen = 0;

  pid_compensator dut (.*);

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  longint ref_ui = 0;
  longint ref_eprev = 0;

  function automatic longint clampl(longint x, longint lo, longint hi);
    return (x < lo) ? lo : (x > hi) ? hi : x;
  endfunction

  function automatic longint floor_div(longint a, longint b);
    return (a >= 0) ? a / b : -((-a + b - 1) / b);
  endfunction

  // Apply one sample and check the result after exactly 3 clocks.
  task automatic step(input int unsigned r, input int unsigned v);
    longint e, de, s, u_ref;
    int lat;
    e  = longint'(r) - longint'(v);
    de = clampl(e - ref_eprev, -2048, 2047);
    ref_eprev = e;
    ref_ui = clampl(ref_ui + longint'(gains.ki) * e, 0, longint'(NR) * 8192);
    s = 16 * longint'(gains.kp) * e + ref_ui + 128 * longint'(gains.kd) * de;
    u_ref = clampl(floor_div(s, 8192), 0, NR);
    vref = ADC_W'(r); v_sense = ADC_W'(v); valid = 1'b1;
    @(posedge clk); #1 valid = 1'b0;
    lat = 1;
    while (!u_valid && lat < 10) begin @(posedge clk); #1 lat++; end
    check(lat == 3, $sformatf("latency %0d clocks, expected 3", lat));
    check(longint'(u) == u_ref, $sformatf("u=%0d expected %0d (e=%0d ki=%0d kp=%0d kd=%0d)",
                                         u, u_ref, e, gains.ki, gains.kp, gains.kd));
    check(longint'(u_int) == ref_ui, $sformatf("integral %0d expected %0d", u_int, ref_ui));
    if (int_sat) int_sat_seen++;
    if (out_sat) out_sat_seen++;
    repeat ($urandom_range(0, 3)) @(posedge clk);
    #1;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // PI gains, converging-like sequence around 512.
    gains = '{kp: KP_PI_HDL, ki: KI_PI_HDL, kd: '0};
    for (int k = 0; k < 200; k++) step(512, 512 - 60 + (k % 120));
    // Large positive error: integrator and output reach their upper limits.
    for (int k = 0; k < 400; k++) step(2000, 100);
    // Large negative error: back to the lower limits.
    for (int k = 0; k < 400; k++) step(0, 2047);

    // Integral-only gains.
    gains = '{kp: '0, ki: KI_I_HDL, kd: '0};
    for (int k = 0; k < 200; k++) step(576, $urandom_range(400, 700));

    // Random gains including a derivative term.
    for (int k = 0; k < 1000; k++) begin
      if (k % 50 == 0) gains = '{kp: GAIN_W'($urandom), ki: GAIN_W'($urandom_range(0, 100)),
                                  kd: GAIN_W'($urandom)};
      step($urandom_range(0, 2047), $urandom_range(0, 2047));
    end

    // Clear empties the integrator.
    clear = 1'b1; @(posedge clk); #1 clear = 1'b0;
    check(u_int == '0 && u == '0, "clear empties the compensator");
    ref_ui = 0; ref_eprev = 0;
    gains = '{kp: KP_PI_HDL, ki: KI_PI_HDL, kd: '0};
    for (int k = 0; k < 20; k++) step(640, 600);

    check(int_sat_seen > 0, "integrator clamp exercised");
    check(out_sat_seen > 0, "output clamp exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
