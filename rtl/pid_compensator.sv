// pid_compensator: fixed-point PID compensator of the current loop.
//
// Once per switching period (on valid) the compensator computes
//   e[k]   = vref[k] - v_sense[k]                           (12-bit signed)
//   de[k]  = e[k] - e[k-1], clamped to 12 bits
//   u_p    = Kp * e[k]          scale 2^-9
//   u_d    = Kd * de[k]         scale 2^-6
//   u_i[k] = sat(u_i[k-1] + Ki * e[k])   scale 2^-13, clamped to [0, NR]
//   u[k]   = sat(floor(u_p + u_i[k] + u_d), 0, NR)
// i.e. the z-domain PID Kp + Ki/(1 - z^-1) + Kd (1 - z^-1). The gains are
// 10-bit unsigned integers; the proportional and derivative products are
// shifted left (by 4 and 7 bits) to line up with the integral term, which
// has the finest scale and the largest range. The result is cut to an
// integer DPWM command. Setting Kp = Kd = 0 gives the pure integral
// compensator; Kd = 0 gives the PI compensator.
//
// Timing: three pipeline stages, u and u_valid appear 3 clocks after valid.
// clear (synchronous) empties the integrator and the error history and sets
// u to 0; it is held while the loop is open.
// The equations, the gain widths and scales and the two saturations follow
// the reference design. The integrator limits [0, NR], the derivative clamp,
// the accumulator widths and the pipeline are this design's choice.
module pid_compensator
  import boost_ctrl_pkg::*;
#(
  parameter int unsigned NR_P = NR,                 // DPWM carrier amplitude
  parameter int unsigned UW   = $clog2(NR_P + 1)    // command width
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,     // empty integrator and history
  input  logic                    valid,     // new sample available
  input  logic [ADC_W-1:0]        vref,      // set point
  input  logic [ADC_W-1:0]        v_sense,   // sampled current
  input  pid_gains_t              gains,     // Kp, Ki, Kd (HDL integers)
  output logic [UW-1:0]           u,         // DPWM command
  output logic                    u_valid,   // u updated
  output logic signed [SUM_W-1:0] u_sum,     // unsaturated sum, scale 2^-13
  output logic signed [ACC_W-1:0] u_int,     // integral term, scale 2^-13
  output logic                    int_sat,   // integrator was clamped
  output logic                    out_sat    // output was clamped
);

  localparam int unsigned PROD_W  = ERR_W + GAIN_W + 1;
  localparam int unsigned P_SHIFT = KI_FRAC - KP_FRAC;
  localparam int unsigned D_SHIFT = KI_FRAC - KD_FRAC;
  localparam logic signed [ACC_W-1:0] I_MAX = ACC_W'(NR_P) <<< KI_FRAC;

  // Stage 1: error and error difference.
  logic signed [ERR_W-1:0]  err_q, err_prev;
  logic signed [ERR_W-1:0]  derr_q;
  logic                     s1_valid;
  // Stage 2: products.
  logic signed [PROD_W-1:0] prod_p, prod_i, prod_d;
  logic                     s2_valid;

  logic signed [ERR_W-1:0]  err_c;
  logic signed [ERR_W:0]    derr_wide;
  logic signed [ERR_W-1:0]  derr_c;

  always_comb begin
    err_c     = $signed({1'b0, vref}) - $signed({1'b0, v_sense});
    derr_wide = {err_c[ERR_W-1], err_c} - {err_prev[ERR_W-1], err_prev};
    if (derr_wide > $signed((ERR_W+1)'((1 << (ERR_W-1)) - 1)))
      derr_c = {1'b0, {(ERR_W-1){1'b1}}};
    else if (derr_wide < -$signed((ERR_W+1)'(1 << (ERR_W-1))))
      derr_c = {1'b1, {(ERR_W-1){1'b0}}};
    else
      derr_c = derr_wide[ERR_W-1:0];
  end

  // Stage 3 arithmetic.
  logic signed [ACC_W:0]   int_wide;
  logic signed [ACC_W-1:0] int_next;
  logic                    int_clamped;
  logic signed [SUM_W-1:0] sum_c;
  logic signed [SUM_W-1:0] sum_int;
  logic [UW-1:0]           u_c;
  logic                    u_clamped;

  always_comb begin
    int_wide = (ACC_W+1)'(u_int) + (ACC_W+1)'(prod_i);
    int_clamped = 1'b1;
    if (int_wide < 0)                          int_next = '0;
    else if (int_wide > (ACC_W+1)'(I_MAX))     int_next = I_MAX;
    else begin
      int_next    = int_wide[ACC_W-1:0];
      int_clamped = 1'b0;
    end
    sum_c   = (SUM_W'(prod_p) <<< P_SHIFT) + SUM_W'(int_next) + (SUM_W'(prod_d) <<< D_SHIFT);
    sum_int = sum_c >>> KI_FRAC;                     // floor to a DPWM count
    u_clamped = 1'b1;
    if (sum_int < 0)                        u_c = '0;
    else if (sum_int > SUM_W'(NR_P))        u_c = UW'(NR_P);
    else begin
      u_c       = sum_int[UW-1:0];
      u_clamped = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      err_q    <= '0;
      err_prev <= '0;
      derr_q   <= '0;
      s1_valid <= 1'b0;
      prod_p   <= '0;
      prod_i   <= '0;
      prod_d   <= '0;
      s2_valid <= 1'b0;
      u_int    <= '0;
      u_sum    <= '0;
      u        <= '0;
      u_valid  <= 1'b0;
      int_sat  <= 1'b0;
      out_sat  <= 1'b0;
    end else if (clear) begin
      err_q    <= '0;
      err_prev <= '0;
      derr_q   <= '0;
      s1_valid <= 1'b0;
      prod_p   <= '0;
      prod_i   <= '0;
      prod_d   <= '0;
      s2_valid <= 1'b0;
      u_int    <= '0;
      u_sum    <= '0;
      u        <= '0;
      u_valid  <= 1'b0;
      int_sat  <= 1'b0;
      out_sat  <= 1'b0;
    end else begin
      s1_valid <= valid;
      if (valid) begin
        err_q    <= err_c;
        derr_q   <= derr_c;
        err_prev <= err_c;
      end
      s2_valid <= s1_valid;
      if (s1_valid) begin
        prod_p <= $signed({1'b0, gains.kp}) * err_q;
        prod_i <= $signed({1'b0, gains.ki}) * err_q;
        prod_d <= $signed({1'b0, gains.kd}) * derr_q;
      end
      u_valid <= s2_valid;
      if (s2_valid) begin
        u_int   <= int_next;
        u_sum   <= sum_c;
        u       <= u_c;
        int_sat <= int_clamped;
        out_sat <= u_clamped;
      end
    end
  end

endmodule
