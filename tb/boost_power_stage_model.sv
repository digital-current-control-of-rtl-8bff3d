// boost_power_stage_model: behavioural model of the power board (not
// synthesizable): synchronous Boost converter, shunt current sensing with
// amplifier, and a free-running 11-bit A/D converter.
//
// The converter is integrated with a forward-Euler step of one FPGA clock
// (20 ns): with the main switch on, L di/dt = Vg - rL*i; otherwise
// L di/dt = Vg - rL*i - vo, and the inductor current feeds the output
// capacitor, C dvo/dt = i_out - vo/R. When neither the main switch nor the
// rectifier MOSFET conducts, the body diode blocks negative current. The
// shunt sits in the main switch path, so the sensed signal is the inductor
// current during the on-time and zero otherwise; it is scaled by
// Rsense*Hs = 0.25 V/A and converted over a 1 V full scale into 11 bits
// (512 LSB per ampere), updated every clock. vg and r_load may be changed by
// the testbench at any time; setting hold_vo keeps the output at v_o, as a
// stiff dc bus (an inverter input) would, so the loop reaches a true steady
// state. Default values: Vg = 5 V, L = 10 uH,
// rL = 30 mOhm, C = 311 uF, R = 28.8 Ohm, Rsense = 10 mOhm, Hs = 25.
module boost_power_stage_model #(
  parameter real L_H      = 10e-6,
  parameter real RL_OHM   = 30e-3,
  parameter real C_F      = 311e-6,
  parameter real RSENSE   = 10e-3,
  parameter real HS       = 25.0,
  parameter real VFS      = 1.0,
  parameter real DT       = 20e-9,
  parameter int  ADC_BITS = 11
) (
  input  logic                clk,
  input  logic                gate_ls,   // main switch
  input  logic                gate_hs,   // synchronous rectifier
  output logic [ADC_BITS-1:0] adc_data   // A/D word
);

  real vg     = 5.0;     // input voltage
  bit  hold_vo = 1'b0;   // 1: output clamped to v_o (stiff dc bus), 0: RC load
  real r_load = 28.8;    // load resistance
  real i_l    = 1.0;     // inductor current
  real v_o    = 12.0;    // output voltage
  real i_sw;             // switch (shunt) current
  real code;

  initial adc_data = '0;

  always @(posedge clk) begin
    real vl, i_out;
    if (gate_ls) begin
      vl    = vg - RL_OHM * i_l;
      i_out = 0.0;
    end else begin
      vl    = vg - RL_OHM * i_l - v_o;
      i_out = i_l;
    end
    i_l = i_l + vl / L_H * DT;
    if (!gate_ls && !gate_hs && i_l < 0.0) i_l = 0.0;   // diode blocks
    if (!hold_vo) v_o = v_o + (i_out - v_o / r_load) / C_F * DT;
    i_sw = gate_ls ? i_l : 0.0;
    code = i_sw * RSENSE * HS / VFS * real'(1 << ADC_BITS);
    if (code < 0.0) code = 0.0;
    if (code > real'((1 << ADC_BITS) - 1)) code = real'((1 << ADC_BITS) - 1);
    adc_data <= ADC_BITS'(int'($floor(code)));
  end

endmodule
