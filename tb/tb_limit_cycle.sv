// tb_limit_cycle: shows that clearing A/D LSBs removes the limit cycle of the
// quantized current loop.
//
// The power-stage model holds its output at 12 V (stiff dc bus), so the loop
// has a true steady state. With the PI gains, the controller regulates about
// 1.2 A (610 LSB, rounded down to a multiple of 2^n_reduce) for n_reduce = 0
// to 7. After 400 settling periods it records, over 200 periods, the range of
// the DPWM command and of the sampled word. One DPWM count moves the current
// by about 12 LSB, so with fine A/D steps the command must hunt between
// counts (a limit cycle). From 2^n_reduce > 43.5, i.e. n_reduce >= 6, the
// command must be constant. Checks: limit cycle present at n_reduce = 0,
// absent (constant command and sample) at 6 and 7, and the regulated sample
// equal to the set point there.
module tb_limit_cycle;
  import boost_ctrl_pkg::*;

  localparam int PERIOD = 2 * NR;

  logic                    clk = 1'b0;
  logic                    rst_n = 1'b0;
  logic                    en = 1'b0;
  logic [ADC_W-1:0]        adc_data;
  loop_mode_e              mode = MODE_CLOSED_LOOP;
  logic [U_W-1:0]          u_open = U_OPEN_DEFAULT;
  logic [ADC_W-1:0]        iref = 11'd610;
  logic                    step_en = 1'b0;
  logic signed [ADC_W-1:0] step_ref = '0;
  pid_gains_t              gains = '{kp: KP_PI_HDL, ki: KI_PI_HDL, kd: '0};
  logic [3:0]              n_reduce = '0;
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

  initial begin
    int umin, umax, smin, smax;
    string tag;
    plant.hold_vo = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    en = 1'b1;
    for (int nr = 0; nr <= 7; nr++) begin
      n_reduce = 4'(nr);
      iref = ADC_W'((610 >> nr) << nr);
      repeat (400) @(posedge period_start);
      umin = 1000; umax = -1; smin = 4096; smax = -1;
      repeat (200) begin
        @(posedge period_start);
        #1;
        if (int'(u_active) < umin) umin = int'(u_active);
        if (int'(u_active) > umax) umax = int'(u_active);
        if (int'(v_sense) < smin) smin = int'(v_sense);
        if (int'(v_sense) > smax) smax = int'(v_sense);
      end
      tag = (umin == umax) ? "steady" : "limit cycle";
      $display("n_reduce %0d, set point %0d: command %0d..%0d, sample %0d..%0d, %s",
               nr, iref, umin, umax, smin, smax, tag);
      if (nr == 0) check(umax > umin, "limit cycle expected with the full A/D resolution");
      if (nr >= 6) begin
        check(umin == umax, $sformatf("command constant with %0d LSBs cleared", nr));
        check(smin == smax && smin == int'(iref),
              $sformatf("sample fixed at the set point with %0d LSBs cleared", nr));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8 * 700 * PERIOD) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
