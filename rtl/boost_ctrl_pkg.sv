// boost_ctrl_pkg: constants and types shared by the blocks of the digital
// average-current-mode controller for a 5 V -> 12 V Boost converter.
//
// The numbers follow the reference design: a 50 MHz FPGA clock, a
// symmetrical DPWM with carrier amplitude N_r = 200 (125 kHz switching),
// an 11-bit A/D converter over a 1 V full scale (512 LSB per ampere of
// inductor current with the 10 mOhm shunt and a sensing gain of 25), and
// 10-bit compensator gains with binary scales 2^-9 (Kp), 2^-13 (Ki) and
// 2^-6 (Kd). Field widths not fixed by the reference design (the integral
// accumulator, the sum of the three terms) are this design's choice and are
// sized so that nothing can overflow.
package boost_ctrl_pkg;

  // DPWM carrier amplitude: f_clk / f_s = 50 MHz / 125 kHz / 2 half ramps.
  localparam int unsigned NR        = 200;
  // Width of a DPWM command u in [0, NR].
  localparam int unsigned U_W       = $clog2(NR + 1);

  // A/D converter resolution and the error word (difference of two A/D words).
  localparam int unsigned ADC_W     = 11;
  localparam int unsigned ERR_W     = ADC_W + 1;

  // Compensator gains: 10-bit unsigned integers with a fixed binary scale.
  localparam int unsigned GAIN_W    = 10;
  localparam int unsigned KP_FRAC   = 9;
  localparam int unsigned KI_FRAC   = 13;
  localparam int unsigned KD_FRAC   = 6;

  // Accumulator and sum widths (design choice, see pid_compensator).
  localparam int unsigned ACC_W     = 24;
  localparam int unsigned SUM_W     = 32;

  // Set point giving 1 A of average inductor current (0.25 V of 1 V full scale).
  localparam logic [ADC_W-1:0] VREF_1A = 11'd512;

  // Number of A/D least significant bits removed to suppress the limit cycle.
  localparam int unsigned N_REDUCE_DEFAULT = 6;

  // Gains of the PI design (Kp = 36.12, Ki = 16.49 scaled by the A/D step).
  localparam logic [GAIN_W-1:0] KP_PI_HDL = 10'd9;
  localparam logic [GAIN_W-1:0] KI_PI_HDL = 10'd66;
  // Gain of the integral-only design (Ki = 0.041 scaled by the A/D step).
  localparam logic [GAIN_W-1:0] KI_I_HDL  = 10'd1;

  // Open-loop command giving D = 0.58 (U = D * N_r).
  localparam logic [U_W-1:0] U_OPEN_DEFAULT = 8'd116;

  typedef enum logic {
    MODE_OPEN_LOOP   = 1'b0,   // DPWM driven by the console command U
    MODE_CLOSED_LOOP = 1'b1    // DPWM driven by the compensator
  } loop_mode_e;

  // Compensator gains as loaded from the console.
  typedef struct packed {
    logic [GAIN_W-1:0] kp;
    logic [GAIN_W-1:0] ki;
    logic [GAIN_W-1:0] kd;
  } pid_gains_t;

endpackage
