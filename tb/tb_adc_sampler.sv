// tb_adc_sampler: self-checking test of the sampling and LSB-reduction stage.
//
// Drives a changing A/D word every clock and random sampling strobes. Checks
// that v_sense holds the word present at the strobe with the n_reduce LSBs
// cleared (for every n_reduce from 0 to 11), that valid follows the strobe by
// one clock, and that v_sense does not change between strobes.
module tb_adc_sampler;
  import boost_ctrl_pkg::*;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic             sample = 1'b0;
  logic [ADC_W-1:0] adc_data = '0;
  logic [3:0]       n_reduce = '0;
  logic [ADC_W-1:0] v_sense;
  logic             valid;

  int checks = 0;
  int failures = 0;

  adc_sampler dut (.*);

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [ADC_W-1:0] expect_v;
  logic [ADC_W-1:0] held;
  bit               was_sample;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(v_sense == '0 && !valid, "reset values");
    for (int n = 0; n <= ADC_W; n++) begin
      n_reduce = 4'(n);
      for (int k = 0; k < 40; k++) begin
        adc_data = ADC_W'($urandom);
        sample   = ($urandom_range(0, 2) == 0);
        was_sample = sample;
        // reference: integer division then multiplication by 2^n
        expect_v = ADC_W'((int'(adc_data) / (1 << n)) * (1 << n));
        held     = v_sense;
        @(posedge clk); #1;
        check(valid == was_sample, "valid one clock after the strobe");
        if (was_sample)
          check(v_sense == expect_v, $sformatf("n_reduce=%0d word %0d -> %0d, expected %0d",
                                               n, adc_data, v_sense, expect_v));
        else
          check(v_sense == held, "v_sense held between strobes");
      end
    end
    // The experimental case: 610 LSB with 6 bits removed reads as 576.
    n_reduce = 4'd6; adc_data = 11'd610; sample = 1'b1;
    @(posedge clk); #1 sample = 1'b0;
    check(v_sense == 11'd576, "610 LSB reduced to 576");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
