// adc_sampler: takes one A/D sample per switching period and reduces its
// resolution.
//
// The A/D converter on the power board converts the sensed switch current
// continuously at the FPGA clock rate; this block keeps the word present on
// the clock where the DPWM asserts its sampling strobe (the middle of the
// on-interval) and clears the n_reduce least significant bits. Clearing the
// LSBs makes the A/D step coarser than the current step caused by one DPWM
// count, which removes the limit cycle of the quantized loop; six bits
// (steps of 64 LSB) are needed for the reference converter. Output v_sense is
// registered and valid is a one-clock pulse in the clock after the strobe.
// The sampling instant, the 11-bit word and the LSB masking follow the
// reference design; the one-clock capture latency and the masking of the
// captured word (rather than rounding it) are this design's choice.
module adc_sampler
  import boost_ctrl_pkg::*;
#(
  parameter int unsigned W = ADC_W              // A/D word width
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   sample,     // sampling strobe
  input  logic [W-1:0]           adc_data,   // A/D output word
  input  logic [$clog2(W+1)-1:0] n_reduce,   // number of LSBs to clear (0..W)
  output logic [W-1:0]           v_sense,    // sampled, reduced word
  output logic                   valid       // v_sense updated
);

  logic [W-1:0] mask;

  always_comb begin
    mask = '1;
    for (int b = 0; b < W; b++)
      if (b < int'(n_reduce)) mask[b] = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_sense <= '0;
      valid   <= 1'b0;
    end else begin
      valid <= sample;
      if (sample) v_sense <= adc_data & mask;
    end
  end

endmodule
