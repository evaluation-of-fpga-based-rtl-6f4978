// pwm_arm_tb: self-checking test of one inverter arm's PWM at the full
// 10000-cycle (10 kHz) period.
//
// Checks, period by period, that the upper gate is on for exactly 2*max cycles
// in one pulse centred on the period boundary, that the lower gate is always
// the complement, that the period is 10000 cycles, that max = 0 and max = 5000
// give permanently off and on, and that a change of max in mid-period only
// takes effect at the next period start.
module pwm_arm_tb;
  import svpwm_pkg::*;

  logic   clock = 0, reset = 1;
  count_t max = '0;
  logic   pulse1, pulse_inverse;
  int     checks = 0, failures = 0;

  pwm_arm dut (.*);

  always #5 clock = ~clock;

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (max %0d)", what, got, exp, max);
    end
  endtask

  initial begin
    int on_cnt, comp_err, first_off, last_off, mx, rises;
    logic prev;
    repeat (3) @(posedge clock);
    #1 expect_eq(int'(pulse1), 0, "upper off in reset");
    expect_eq(int'(pulse_inverse), 1, "lower on in reset");
    for (int p = 0; p < 60; p++) begin
      case (p)
        0: mx = 0;
        1: mx = 5000;
        2: mx = 1;
        3: mx = 4999;
        default: mx = int'($urandom_range(5000));
      endcase
      @(negedge clock) max = count_t'(mx);
      if (p == 0) reset = 0;
      on_cnt = 0; comp_err = 0; first_off = -1; last_off = -1; rises = 0; prev = 1'b1;
      for (int i = 0; i < 10000; i++) begin
        @(posedge clock); #1;
        if (i == 5000) max = count_t'($urandom_range(5000));   // mid-period change
        if (pulse1) on_cnt++;
        else begin
          if (first_off < 0) first_off = i;
          last_off = i;
        end
        if (pulse1 && !prev) rises++;
        prev = pulse1;
        if (pulse1 == pulse_inverse) comp_err++;
      end
      expect_eq(on_cnt, 2 * mx, "on cycles per period");
      expect_eq(comp_err, 0, "complementary gates");
      expect_eq(rises, (mx > 0 && mx < 5000) ? 1 : 0, "single pulse around the period boundary");
      if (mx > 0 && mx < 5000) begin
        expect_eq(first_off, mx, "pulse ends after max cycles");
        expect_eq(last_off, 9999 - mx, "pulse restarts max cycles before period end");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clock);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
