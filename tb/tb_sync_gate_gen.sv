// tb_sync_gate_gen: self-checking test of the complementary gate generator.
//
// Drives a random PWM pattern (pulse and gap lengths of 1 to 30 clocks) and
// compares both gates, clock by clock, with a reference that turns a gate
// on only after the PWM input has been stable for DEAD clocks. Also checks
// that the gates are never on together, that every edge has a gap of at
// least DEAD clocks, and that sync_en low keeps the rectifier off.
module tb_sync_gate_gen;

  localparam int unsigned DEAD = 5;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic pwm = 1'b0;
  logic sync_en = 1'b1;
  logic gate_ls, gate_hs;

  int checks = 0;
  int failures = 0;

  sync_gate_gen #(.DEAD(DEAD)) dut (.*);

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Reference: history of the pwm input sampled at each clock edge.
  int  stable = 0;
  bit  last_pwm = 0;
  bit  exp_ls = 0, exp_hs = 0;
  int  gap = 0;
  int  min_gap = 1000;
  bit  prev_any = 0;
  bit  prev_ls = 0, prev_hs = 0;

  always @(posedge clk) if (rst_n) begin
    if (pwm != last_pwm) stable = 0; else if (stable < DEAD) stable++;
    last_pwm = pwm;
    exp_ls = pwm && (stable >= DEAD);
    exp_hs = !pwm && sync_en && (stable >= DEAD);
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int s = 0; s < 400; s++) begin
      if (s == 300) sync_en = 1'b0;
      pwm = ~pwm;
      repeat ($urandom_range(1, 30)) begin
        @(posedge clk); #1;
        check(gate_ls == exp_ls && gate_hs == exp_hs,
              $sformatf("gates %0b%0b expected %0b%0b", gate_ls, gate_hs, exp_ls, exp_hs));
        check(!(gate_ls && gate_hs), "shoot-through");
        if (!sync_en) check(!gate_hs, "rectifier off when sync_en is low");
        // dead gap between one switch turning off and the other turning on
        if (!gate_ls && !gate_hs) gap++;
        else begin
          if ((gate_ls && prev_hs) || (gate_hs && prev_ls)) min_gap = 0;
          if (gap > 0 && ((gate_ls && !prev_ls) || (gate_hs && !prev_hs)) && sync_en)
            if (gap < min_gap) min_gap = gap;
          gap = 0;
        end
        prev_ls = gate_ls; prev_hs = gate_hs;
      end
    end
    check(min_gap >= DEAD && min_gap < 1000, $sformatf("smallest dead gap %0d clocks", min_gap));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
