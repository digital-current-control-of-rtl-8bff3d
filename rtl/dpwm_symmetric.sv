// dpwm_symmetric: counter-based symmetrical (triangle-carrier) digital PWM.
//
// An up-down counter forms the carrier r. It counts 0, 1, ..., NR-1 on the
// up ramp and NR-1, ..., 1, 0 on the down ramp, so every value appears twice
// and one switching period lasts 2*NR clocks (400 clocks = 8 us = 125 kHz at
// 50 MHz for NR = 200). The gate is high while r >= NR - u, which gives an
// on-time of exactly 2*u clocks, a duty cycle d = u / NR, and an on-interval
// centred on the carrier peak. The command u is latched only at the carrier
// valley (start of the up ramp), so it is constant over a whole period.
//
// Strobes (one clock wide, aligned with the registered outputs):
//   valley - first clock of a period; the clock in which u_active changes.
//   peak   - first clock of the down ramp: the middle of the on-interval,
//            where the switch current equals the average inductor current.
//            Used as the A/D sampling instant.
// The symmetrical carrier, N_r = 200, the 50 MHz clock, the latch at the
// valley and the mid-on-time sampling follow the reference design. The exact
// counting sequence (each value twice, for an on-time of 2u clocks) and the
// clamping of u above NR are this design's choice. While en is low the
// counter, command and gate are held at reset values (gate low).
module dpwm_symmetric
  import boost_ctrl_pkg::*;
#(
  parameter int unsigned NR_P = NR,                 // carrier amplitude
  parameter int unsigned UW   = $clog2(NR_P + 1)    // command width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,          // modulator enable
  input  logic [UW-1:0] u_in,        // control command, sampled at the valley
  output logic          gate,        // main switch gate c(t)
  output logic [UW-1:0] carrier,     // carrier value r
  output logic          carrier_up,  // 1 on the up ramp
  output logic [UW-1:0] u_active,    // command in use this period
  output logic          valley,      // period start strobe
  output logic          peak         // mid on-time strobe (sample)
);

  logic [UW-1:0] cnt_next;
  logic          up_next;
  logic [UW-1:0] u_next;

  always_comb begin
    cnt_next = carrier;
    up_next  = carrier_up;
    if (carrier_up) begin
      if (carrier == UW'(NR_P - 1)) up_next = 1'b0;      // repeat the top value
      else                          cnt_next = carrier + 1'b1;
    end else begin
      if (carrier == '0)            up_next = 1'b1;      // repeat the bottom value
      else                          cnt_next = carrier - 1'b1;
    end
    u_next = u_active;
    if (up_next && cnt_next == '0)
      u_next = (u_in > UW'(NR_P)) ? UW'(NR_P) : u_in;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      carrier    <= '0;
      carrier_up <= 1'b0;   // first advance enters the up ramp at 0: a valley
      u_active   <= '0;
      gate       <= 1'b0;
      valley     <= 1'b0;
      peak       <= 1'b0;
    end else if (!en) begin
      carrier    <= '0;
      carrier_up <= 1'b0;
      u_active   <= '0;
      gate       <= 1'b0;
      valley     <= 1'b0;
      peak       <= 1'b0;
    end else begin
      carrier    <= cnt_next;
      carrier_up <= up_next;
      u_active   <= u_next;
      gate       <= ({1'b0, cnt_next} >= ({1'b0, UW'(NR_P)} - {1'b0, u_next}));
      valley     <= up_next && (cnt_next == '0);
      peak       <= !up_next && (cnt_next == UW'(NR_P - 1));
    end
  end

endmodule
