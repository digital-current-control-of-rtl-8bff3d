// tb_boost_current_ctrl: end-to-end closed-loop test of the controller at
// its default size, driving a behavioural model of the Boost power stage.
//
// Sequence (one switching period = 400 clocks = 8 us):
//   1. open loop, U = 116 (D = 0.58): duty and sampled current near 1 A;
//   2. closed loop, PI gains Kp = 9, Ki = 66, set point 576 LSB (1.125 A),
//      6 LSBs removed: the average inductor current settles at the set point;
//   3. periodic set-point step +320 LSB (576 <-> 896): current follows both levels;
//   4. input voltage step 5 V -> 6 V and load step 416 mA -> 466 mA: current
//      stays regulated;
//   5. set point 0: integrator and output clamp at their lower limits;
//   6. integral-only gain Ki = 1: current error shrinks;
//   7. modulator disabled: both gates off.
// Every mechanism (open/closed-loop mode switch, command latch at the valley,
// sampling strobe, LSB masking, set-point step, integrator clamp, output
// clamp, synchronous rectifier with dead time) is counted and must occur.
module tb_boost_current_ctrl;
  import boost_ctrl_pkg::*;

  localparam int PERIOD = 2 * NR;

  logic                    clk = 1'b0;
  logic                    rst_n = 1'b0;
  logic                    en = 1'b0;
  logic [ADC_W-1:0]        adc_data;
  loop_mode_e              mode = MODE_OPEN_LOOP;
  logic [U_W-1:0]          u_open = U_OPEN_DEFAULT;
  logic [ADC_W-1:0]        iref = 11'd576;
  logic                    step_en = 1'b0;
  logic signed [ADC_W-1:0] step_ref = 11'sd320;
  pid_gains_t              gains = '{kp: KP_PI_HDL, ki: KI_PI_HDL, kd: '0};
  logic [3:0]              n_reduce = 4'(N_REDUCE_DEFAULT);
  logic                    sync_en = 1'b1;
  logic                    gate_ls, gate_hs;
  logic                    sample_strobe, period_start;
  logic [ADC_W-1:0]        v_sense, vref;
  logic [U_W-1:0]          u_pid, u_active, carrier;
  logic                    int_sat, out_sat, carrier_up, step_active;
  logic signed [ACC_W-1:0] u_int;
  logic signed [SUM_W-1:0] u_sum;

  boost_current_ctrl dut (.*);
  boost_power_stage_model plant (.clk, .gate_ls, .gate_hs, .adc_data);

  always #10 clk = ~clk;

  int checks = 0;
  int failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- per-period measurement -------------------------------------------
  real i_acc = 0.0;
  int  on_acc = 0, clk_acc = 0;
  real i_avg_last = 0.0;
  int  on_last = 0, len_last = 0;

  // mechanism counters
  int n_valley = 0, n_sample = 0, n_latch_change = 0, n_masked = 0;
  int n_step_edges = 0, n_int_sat = 0, n_out_sat = 0, n_hs_on = 0;
  int n_mode_switch = 0, n_open_periods = 0, n_closed_periods = 0;
  logic [U_W-1:0] u_prev = '0;
  logic step_prev = 1'b0;
  logic int_sat_q = 1'b0, out_sat_q = 1'b0;
  int   periods_in_level = 0;   // periods since the last set-point step edge
  loop_mode_e mode_prev = MODE_OPEN_LOOP;

  always @(posedge clk) if (rst_n) begin
    i_acc += plant.i_l;
    clk_acc++;
    if (gate_ls) on_acc++;
    if (gate_hs) n_hs_on++;
    if (sample_strobe) begin
      n_sample++;
      if ((adc_data & ~(ADC_W'('1) << n_reduce)) != 0) n_masked++;
    end
    if (int_sat && !int_sat_q) n_int_sat++;
    if (out_sat && !out_sat_q) n_out_sat++;
    int_sat_q = int_sat;
    out_sat_q = out_sat;
    if (mode != mode_prev) n_mode_switch++;
    mode_prev = mode;
    if (period_start) begin
      n_valley++;
      if (u_active != u_prev) n_latch_change++;
      u_prev = u_active;
      if (step_active != step_prev) begin n_step_edges++; periods_in_level = 0; end
      else periods_in_level++;
      step_prev = step_active;
      if (mode == MODE_OPEN_LOOP) n_open_periods++; else n_closed_periods++;
      i_avg_last = i_acc / real'(clk_acc);
      on_last = on_acc; len_last = clk_acc;
      i_acc = 0.0; on_acc = 0; clk_acc = 0;
    end
  end

  // The command in use may only change at a valley.
  logic [U_W-1:0] ua_q;
  always @(posedge clk) begin
    if (rst_n && !period_start && en && ua_q != u_active) begin
      failures++; $display("FAIL: command changed outside a valley");
    end
    ua_q <= u_active;
  end

  task automatic periods(input int n);
    repeat (n) @(posedge period_start);
    @(posedge clk); #1;
  endtask

  // Average inductor current over n periods.
  task automatic avg_current(input int n, output real avg);
    real s = 0.0;
    for (int k = 0; k < n; k++) begin
      periods(1);
      s += i_avg_last;
    end
    avg = s / n;
  endtask

  function automatic bit near(real a, real b, real tol);
    return (a > b - tol) && (a < b + tol);
  endfunction

  // With n_reduce LSBs cleared, any sample within one reduced step above the
  // set point reads as the set point, so the regulated average lies between
  // the set point and one step above it (1/512 A per LSB), plus a margin for
  // the sampling-point offset caused by the dead time.
  function automatic bit regulated(real a, int sp);
    return (a > real'(sp) / 512.0 - 0.1) && (a < real'(sp + (1 << n_reduce)) / 512.0 + 0.1);
  endfunction

  real avg, avg_hi, avg_lo, err_before, err_after;
  int  hi_n, lo_n;

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    en = 1'b1;

    // 1. Open loop.
    periods(20);
    check(len_last == PERIOD, $sformatf("period %0d clocks", len_last));
    check(on_last == 2 * 116 - 5, $sformatf("open-loop on-time %0d clocks", on_last));
    avg_current(20, avg);
    $display("open loop U=116: average iL %0.3f A, vo %0.2f V", avg, plant.v_o);
    check(near(avg, 1.0, 0.3), $sformatf("open-loop current %0.3f A", avg));
    check(near(real'(v_sense) / 512.0, avg, 0.1), "mid-on sample equals the average current");

    // 2. Closed loop with the PI compensator.
    mode = MODE_CLOSED_LOOP;
    periods(200);
    avg_current(50, avg);
    $display("PI, set point 576: average iL %0.3f A (u=%0d, vo %0.2f V)", avg, u_active, plant.v_o);
    check(regulated(avg, 576), $sformatf("PI regulated current %0.3f A", avg));
    check(v_sense == 11'd576 || v_sense == 11'd512 || v_sense == 11'd640,
          $sformatf("reduced sample %0d", v_sense));

    // 3. Periodic set-point step 576 <-> 896.
    step_en = 1'b1;
    avg_hi = 0.0; avg_lo = 0.0; hi_n = 0; lo_n = 0;
    for (int k = 0; k < 500; k++) begin
      periods(1);
      if (k > 250 && step_active && periods_in_level > 60) begin avg_hi += i_avg_last; hi_n++; end
      if (k > 250 && !step_active && periods_in_level > 60) begin avg_lo += i_avg_last; lo_n++; end
    end
    avg_hi /= (hi_n > 0) ? hi_n : 1;
    avg_lo /= (lo_n > 0) ? lo_n : 1;
    $display("step 576<->896: low %0.3f A, high %0.3f A", avg_lo, avg_hi);
    check(hi_n > 0 && regulated(avg_hi, 896), $sformatf("high level %0.3f A", avg_hi));
    check(lo_n > 0 && regulated(avg_lo, 576), $sformatf("low level %0.3f A", avg_lo));
    step_en = 1'b0;
    iref = 11'd512;
    periods(100);

    // 4. Load step 416 mA -> 466 mA, then input voltage step 5 V -> 6 V.
    plant.r_load = 12.0 / 0.466;
    periods(150);
    avg_current(50, avg);
    $display("load step: average iL %0.3f A, vo %0.2f V", avg, plant.v_o);
    check(regulated(avg, 512), $sformatf("current after the load step %0.3f A", avg));
    plant.vg = 6.0;
    periods(150);
    avg_current(50, avg);
    $display("Vg 6 V: average iL %0.3f A, vo %0.2f V", avg, plant.v_o);
    check(regulated(avg, 512), $sformatf("current after the input step %0.3f A", avg));
    plant.vg = 5.0;
    plant.r_load = 28.8;
    periods(100);

    // 5. Clamps: a large positive then a large negative error with a high
    //    integral gain drive the integrator and the output to both limits.
    gains = '{kp: KP_PI_HDL, ki: 10'd1023, kd: '0};
    iref = 11'd2047;
    periods(2);
    check(u_pid == U_W'(NR) && u_int == (ACC_W'(NR) <<< KI_FRAC), "upper clamps");
    iref = 11'd0;
    periods(3);
    check(u_pid == '0, "output clamped at zero");
    gains = '{kp: KP_PI_HDL, ki: KI_PI_HDL, kd: '0};
    iref = 11'd576;
    periods(200);

    // 6. Integral-only compensator.
    gains = '{kp: '0, ki: KI_I_HDL, kd: '0};
    iref = 11'd640;
    avg_current(20, avg);
    err_before = 640.0 / 512.0 - avg;
    periods(1500);
    avg_current(20, avg);
    err_after = 640.0 / 512.0 - avg;
    $display("integral only: error %0.3f A -> %0.3f A", err_before, err_after);
    check(err_before > 0.05 && err_after < err_before, "integral compensator reduces the error");

    // Back to open loop, then stop.
    mode = MODE_OPEN_LOOP;
    periods(5);
    check(u_active == U_OPEN_DEFAULT, "open-loop command restored");
    en = 1'b0;
    repeat (10) @(posedge clk);
    #1 check(!gate_ls && !gate_hs, "gates off when disabled");

    // Mechanisms.
    $display("mechanisms: valleys %0d samples %0d latch changes %0d masked %0d step edges %0d",
             n_valley, n_sample, n_latch_change, n_masked, n_step_edges);
    $display("            int clamp %0d out clamp %0d rectifier clocks %0d mode switches %0d open %0d closed %0d",
             n_int_sat, n_out_sat, n_hs_on, n_mode_switch, n_open_periods, n_closed_periods);
    check(n_valley > 0,        "valley latch");
    check(n_sample > 0,        "sampling strobe");
    check(n_latch_change > 0,  "command change latched");
    check(n_masked > 0,        "LSB masking");
    check(n_step_edges > 0,    "set-point step");
    check(n_int_sat > 0,       "integrator clamp");
    check(n_out_sat > 0,       "output clamp");
    check(n_hs_on > 0,         "synchronous rectifier");
    check(n_mode_switch >= 2,  "open/closed-loop switch");
    check(n_open_periods > 0 && n_closed_periods > 0, "both loop modes");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4000 * PERIOD) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
