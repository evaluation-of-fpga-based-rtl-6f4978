// vf_profile_tb: self-checking test of the constant V/f law.
//
// Sweeps the speed over 0 .. 2047 rpm and checks the registered modulation
// index and angle step against real-valued V/f ratios rounded to nearest,
// plus the rated point printed for 1500 rpm (index 928, step 18) and the one
// cycle latency.
module vf_profile_tb;
  import svpwm_pkg::*;

  logic   clock = 0, reset = 1;
  speed_t speed = '0;
  index_t index;
  step_t  variation;
  int     checks = 0, failures = 0;

  vf_profile dut (.*);

  always #5 clock = ~clock;

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (speed %0d)", what, got, exp, speed);
    end
  endtask

  initial begin
    int ei, es;
    repeat (2) @(posedge clock);
    expect_eq(int'(index), 0, "reset index");
    reset = 0;
    for (int s = 0; s < 2048; s++) begin
      @(negedge clock) speed = speed_t'(s);
      @(posedge clock); #1;
      ei = int'($floor(real'(s) * 928.0 / 1500.0 + 0.5));
      es = int'($floor(real'(s) * 18.0 / 1500.0 + 0.5));
      if (ei > 1023) ei = 1023;
      expect_eq(int'(index), ei, "index");
      expect_eq(int'(variation), es, "variation");
    end
    @(negedge clock) speed = 11'd1500;
    @(posedge clock); #1;
    expect_eq(int'(index), 928, "rated index");
    expect_eq(int'(variation), 18, "rated step");
    @(negedge clock) speed = 11'd300;
    #2 expect_eq(int'(index), 928, "latency: not yet updated");
    @(posedge clock); #1;
    expect_eq(int'(index), 186, "index at 300 rpm");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clock);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
