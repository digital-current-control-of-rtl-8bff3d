// tb_current_setpoints: runs the controller at every current level and set
// point step of the experimental characterization, with the PI gains
// (Kp = 9, Ki = 66), six A/D LSBs removed and the behavioural power stage.
//
// Levels (512 LSB = 1 A): 576 and 640 (about 1 A), 896 and 960 (about 1.5 A),
// 1152 and 1216 (about 2 A), plus 768 and 1024 (0.375 V and 0.5 V of the
// 1 V range). For each, after settling, the average inductor current must lie
// between the set point and one reduced step (64 LSB) above it. Then the
// periodic steps 576 -> 896 (step 320) and 576 -> 1152 (step 576) are run and
// both levels of each are checked. The output voltage is left free (resistive
// load), so it keeps drifting slowly while the current loop holds the current.
module tb_current_setpoints;
  import boost_ctrl_pkg::*;

  localparam int PERIOD = 2 * NR;

  logic                    clk = 1'b0;
  logic                    rst_n = 1'b0;
  logic                    en = 1'b0;
  logic [ADC_W-1:0]        adc_data;
  loop_mode_e              mode = MODE_CLOSED_LOOP;
  logic [U_W-1:0]          u_open = U_OPEN_DEFAULT;
  logic [ADC_W-1:0]        iref = 11'd576;
  logic                    step_en = 1'b0;
  logic signed [ADC_W-1:0] step_ref = '0;
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

  real i_acc = 0.0;
  int  clk_acc = 0;
  real i_avg_last = 0.0;
  int  level_periods = 0;

  always @(posedge clk) if (rst_n) begin
    i_acc += plant.i_l;
    clk_acc++;
    if (period_start) begin
      i_avg_last = i_acc / real'(clk_acc);
      i_acc = 0.0; clk_acc = 0;
      level_periods = (step_active == step_q) ? level_periods + 1 : 0;
      step_q = step_active;
    end
  end
  logic step_q = 1'b0;

  task automatic periods(input int n);
    repeat (n) @(posedge period_start);
    @(posedge clk); #1;
  endtask

  function automatic bit regulated(real a, int sp);
    return (a > real'(sp) / 512.0 - 0.1) && (a < real'(sp + 64) / 512.0 + 0.1);
  endfunction

  int levels[8] = '{576, 640, 896, 960, 1152, 1216, 768, 1024};
  int steps[2]  = '{320, 576};

  initial begin
    real avg, hi, lo;
    int  nh, nl;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    en = 1'b1;
    foreach (levels[i]) begin
      iref = ADC_W'(levels[i]);
      periods(250);
      avg = 0.0;
      for (int k = 0; k < 50; k++) begin
        periods(1);
        avg += i_avg_last;
      end
      avg /= 50.0;
      $display("set point %0d LSB: average iL %0.3f A, sample %0d, command %0d, vo %0.2f V",
               levels[i], avg, v_sense, u_active, plant.v_o);
      check(regulated(avg, levels[i]), $sformatf("set point %0d: %0.3f A", levels[i], avg));
    end
    foreach (steps[i]) begin
      iref = 11'd576; step_ref = ADC_W'(steps[i]); step_en = 1'b1;
      hi = 0.0; lo = 0.0; nh = 0; nl = 0;
      for (int k = 0; k < 520; k++) begin
        periods(1);
        if (k > 130 && level_periods > 60) begin
          if (step_active) begin hi += i_avg_last; nh++; end
          else             begin lo += i_avg_last; nl++; end
        end
      end
      hi /= (nh > 0) ? nh : 1; lo /= (nl > 0) ? nl : 1;
      $display("step 576 -> %0d: low %0.3f A, high %0.3f A", 576 + steps[i], lo, hi);
      check(nh > 0 && regulated(hi, 576 + steps[i]), $sformatf("step high level %0.3f A", hi));
      check(nl > 0 && regulated(lo, 576), $sformatf("step low level %0.3f A", lo));
      step_en = 1'b0;
      periods(10);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000 * PERIOD) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
