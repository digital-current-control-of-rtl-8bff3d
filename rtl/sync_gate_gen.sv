// sync_gate_gen: gate signals for a synchronous Boost stage.
//
// In the synchronous Boost converter the output diode is replaced by a
// MOSFET that must conduct when the diode would and be off otherwise, so it
// is driven in complement to the main (low-side) switch. Both edges are
// delayed by DEAD clocks so that the two switches are never on together:
// a counter measures the time since the PWM input last changed, and a gate
// only turns on once that time reaches DEAD. Turn-off is immediate. With
// sync_en low the rectifier MOSFET stays off and its body diode conducts
// (plain Boost). Outputs are registered: one clock of latency.
// The complementary drive follows the reference design; the dead time, its
// default of 5 clocks (100 ns at 50 MHz) and the sync_en input are this
// design's choice.
module sync_gate_gen #(
  parameter int unsigned DEAD = 5     // dead time in clocks
) (
  input  logic clk,
  input  logic rst_n,
  input  logic pwm,        // main switch command from the DPWM
  input  logic sync_en,    // drive the synchronous rectifier
  output logic gate_ls,    // main (low-side) switch
  output logic gate_hs     // synchronous rectifier (high-side) switch
);

  localparam int unsigned CW = $clog2(DEAD + 2);

  logic          pwm_q;
  logic [CW-1:0] since;     // clocks since the last pwm change, saturating
  logic [CW-1:0] since_next;

  always_comb begin
    if (pwm != pwm_q)               since_next = '0;
    else if (since < CW'(DEAD))     since_next = since + 1'b1;
    else                            since_next = since;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pwm_q   <= 1'b0;
      since   <= '0;
      gate_ls <= 1'b0;
      gate_hs <= 1'b0;
    end else begin
      pwm_q   <= pwm;
      since   <= since_next;
      gate_ls <=  pwm && (since_next >= CW'(DEAD));
      gate_hs <= !pwm && sync_en && (since_next >= CW'(DEAD));
    end
  end

  // The two switches are never on in the same clock.
  a_no_shoot_through: assert property (@(posedge clk) disable iff (!rst_n) !(gate_ls && gate_hs));

endmodule
