// setpoint_gen: digital set point of the current loop.
//
// The set point is the console value iref (in A/D LSBs, 512 LSB = 1 A with
// the reference sensing chain). When step_en is high, a signed step
// reference is added on alternate intervals of STEP_PERIODS switching
// periods, producing the periodic set-point step used to observe the
// closed-loop transient (for example 576 -> 896 LSB with step_ref = 320).
// The sum is clamped to the A/D range. The output only changes at the DPWM
// valley strobe, so a switching period always sees one set point; it is
// registered, one clock after the strobe. step_active tells which half of the
// step cycle is running. The periodic step and the 11-bit signed step word
// follow the reference design; the step interval and the clamping are this
// design's choice.
module setpoint_gen
  import boost_ctrl_pkg::*;
#(
  parameter int unsigned W            = ADC_W,  // set point width
  parameter int unsigned STEP_PERIODS = 125     // periods per step half-cycle (1 ms)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                valley,     // period strobe from the DPWM
  input  logic [W-1:0]        iref,       // console set point
  input  logic                step_en,    // enable the periodic step
  input  logic signed [W-1:0] step_ref,   // step size, signed
  output logic [W-1:0]        vref,       // set point for the compensator
  output logic                step_active // step currently added
);

  localparam int unsigned CW = (STEP_PERIODS > 1) ? $clog2(STEP_PERIODS) : 1;

  logic [CW-1:0]      period_cnt;
  logic               step_phase;
  logic               phase_next;
  logic signed [W+1:0] sum;

  always_comb begin
    phase_next = step_phase;
    if (!step_en)                                   phase_next = 1'b0;
    else if (period_cnt == CW'(STEP_PERIODS - 1))   phase_next = ~step_phase;
    sum = $signed({2'b00, iref}) + (phase_next ? (W+2)'(step_ref) : '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      period_cnt  <= '0;
      step_phase  <= 1'b0;
      vref        <= '0;
      step_active <= 1'b0;
    end else if (valley) begin
      if (!step_en || period_cnt == CW'(STEP_PERIODS - 1)) period_cnt <= '0;
      else                                                 period_cnt <= period_cnt + 1'b1;
      step_phase  <= phase_next;
      step_active <= phase_next;
      if (sum < 0)                             vref <= '0;
      else if (sum > $signed((W+2)'((1 << W) - 1))) vref <= '1;
      else                                     vref <= sum[W-1:0];
    end
  end

endmodule
