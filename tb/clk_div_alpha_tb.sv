// clk_div_alpha_tb: self-checking test of the 10 kHz divider and angle
// accumulator at the full 10000-cycle division.
//
// Checks the tick period (10000 cycles, one cycle wide), the clk_out square
// wave (5000 cycles low, 5000 high), and that alpha advances by the step once
// per period and wraps at 3600, against an independent model.
module clk_div_alpha_tb;
  import svpwm_pkg::*;

  logic   clock = 0, reset = 1;
  step_t  variation = 8'd18;
  alpha_t alpha;
  logic   clk_out, tick;
  int     checks = 0, failures = 0;

  clk_div_alpha dut (.*);

  always #5 clock = ~clock;

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int model_alpha, last_tick, cyc, high_cnt, wraps;
    repeat (2) @(posedge clock);
    #1 reset = 0;
    model_alpha = 0; last_tick = -1; cyc = 0; high_cnt = 0; wraps = 0;
    expect_eq(int'(alpha), 0, "alpha after reset");
    for (int p = 0; p < 420; p++) begin
      if (p == 150) variation = 8'd7;
      if (p == 300) variation = 8'd200;
      high_cnt = 0;
      for (int i = 0; i < 10000; i++) begin
        @(posedge clock); #1;
        cyc++;
        if (clk_out) high_cnt++;
        if (tick) begin
          if (last_tick >= 0) expect_eq(cyc - last_tick, 10000, "tick period");
          last_tick = cyc;
        end
        if (i == 9998) expect_eq(int'(tick), 1, "tick at end of count");
        if (i == 9999) begin
          model_alpha = (model_alpha + int'(variation)) % 3600;
          if (model_alpha < int'(variation)) wraps++;
          expect_eq(int'(alpha), model_alpha, "alpha step");
        end
      end
      expect_eq(high_cnt, 5000, "clk_out duty");
    end
    if (wraps < 2) begin failures++; $display("FAIL alpha never wrapped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5_000_000) @(posedge clock);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
