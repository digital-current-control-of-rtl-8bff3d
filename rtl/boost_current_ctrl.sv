// boost_current_ctrl: digital average-current-mode controller of a
// synchronous dc-dc Boost converter (5 V -> 12 V, 5 W, 125 kHz).
//
// The inductor (switch) current is sensed by a shunt, amplified and
// converted by an 11-bit A/D converter on the power board; adc_data carries
// that word into the FPGA. Each switching period:
//   1. dpwm_symmetric runs an up-down carrier of amplitude 200 at the 50 MHz
//      clock and strobes 'peak' in the middle of the on-interval, where the
//      switch current equals the average inductor current;
//   2. adc_sampler keeps the A/D word at that strobe and clears n_reduce LSBs;
//   3. pid_compensator forms e = vref - v_sense and the new command u
//      (3 clocks later);
//   4. the command is latched by the DPWM at the next carrier valley, half a
//      period after the sample, and sets the duty cycle d = u / 200;
//   5. sync_gate_gen drives the main switch and the synchronous rectifier
//      with dead time.
// setpoint_gen supplies vref (console value plus an optional periodic step).
// In open-loop mode the DPWM takes the console command u_open and the
// compensator is held cleared; in closed-loop mode it takes the compensator
// output. The console registers (mode, gains, set point, step, n_reduce,
// u_open) are plain input ports; the console itself is outside this design.
// en low stops the modulator with both gates off.
module boost_current_ctrl
  import boost_ctrl_pkg::*;
(
  input  logic                    clk,          // 50 MHz
  input  logic                    rst_n,        // asynchronous, active low
  input  logic                    en,           // modulator enable
  // A/D converter
  input  logic [ADC_W-1:0]        adc_data,     // sensed current, 512 LSB/A
  // console registers
  input  loop_mode_e              mode,         // open or closed loop
  input  logic [U_W-1:0]          u_open,       // open-loop command U
  input  logic [ADC_W-1:0]        iref,         // current set point (LSB)
  input  logic                    step_en,      // periodic set-point step
  input  logic signed [ADC_W-1:0] step_ref,     // step size (LSB, signed)
  input  pid_gains_t              gains,        // Kp, Ki, Kd (HDL integers)
  input  logic [3:0]              n_reduce,     // A/D LSBs to clear
  input  logic                    sync_en,      // drive the synchronous rectifier
  // power stage
  output logic                    gate_ls,      // main switch
  output logic                    gate_hs,      // synchronous rectifier
  // observation (logic-analyser view)
  output logic                    sample_strobe,// A/D sampling instant
  output logic                    period_start, // carrier valley
  output logic [ADC_W-1:0]        v_sense,      // sampled current
  output logic [ADC_W-1:0]        vref,         // set point in use
  output logic [U_W-1:0]          u_pid,        // compensator output
  output logic [U_W-1:0]          u_active,     // command in the DPWM
  output logic                    int_sat,      // integrator clamped
  output logic                    out_sat,      // compensator output clamped
  output logic [U_W-1:0]          carrier,      // DPWM carrier value
  output logic                    carrier_up,   // carrier on its up ramp
  output logic                    step_active,  // set-point step applied
  output logic signed [ACC_W-1:0] u_int,        // integral term, scale 2^-13
  output logic signed [SUM_W-1:0] u_sum         // unsaturated PID sum, scale 2^-13
);

  logic                    pwm;
  logic                    sample_valid;
  logic                    u_valid;
  logic [U_W-1:0]          u_cmd;
  logic                    pid_clear;

  assign pid_clear = (mode == MODE_OPEN_LOOP) || !en;
  assign u_cmd     = (mode == MODE_CLOSED_LOOP) ? u_pid : u_open;

  dpwm_symmetric #(.NR_P(NR)) u_dpwm (
    .clk, .rst_n, .en,
    .u_in       (u_cmd),
    .gate       (pwm),
    .carrier    (carrier),
    .carrier_up (carrier_up),
    .u_active   (u_active),
    .valley     (period_start),
    .peak       (sample_strobe)
  );

  adc_sampler #(.W(ADC_W)) u_sampler (
    .clk, .rst_n,
    .sample   (sample_strobe),
    .adc_data (adc_data),
    .n_reduce (n_reduce),
    .v_sense  (v_sense),
    .valid    (sample_valid)
  );

  setpoint_gen #(.W(ADC_W)) u_setpoint (
    .clk, .rst_n,
    .valley      (period_start),
    .iref        (iref),
    .step_en     (step_en),
    .step_ref    (step_ref),
    .vref        (vref),
    .step_active (step_active)
  );

  pid_compensator #(.NR_P(NR)) u_pid_comp (
    .clk, .rst_n,
    .clear   (pid_clear),
    .valid   (sample_valid),
    .vref    (vref),
    .v_sense (v_sense),
    .gains   (gains),
    .u       (u_pid),
    .u_valid (u_valid),
    .u_sum   (u_sum),
    .u_int   (u_int),
    .int_sat (int_sat),
    .out_sat (out_sat)
  );

  sync_gate_gen u_gates (
    .clk, .rst_n,
    .pwm     (pwm),
    .sync_en (sync_en && en),
    .gate_ls (gate_ls),
    .gate_hs (gate_hs)
  );

  // A new command is always ready well before the next valley latches it.
  a_u_before_valley: assert property (@(posedge clk) disable iff (!rst_n)
    sample_strobe |-> ##[1:NR] u_valid || (mode == MODE_OPEN_LOOP) || !en);

endmodule
