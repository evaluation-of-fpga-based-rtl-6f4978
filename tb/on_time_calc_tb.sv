// on_time_calc_tb: self-checking test of sector detection and the on-time
// equation, at the full Ts of 10000 cycles.
//
// For every angle 0 .. 359.9 degrees at the rated index 928, and for a spread
// of angles at other indices, it pulses en and compares the registered sector
// with 1 + floor(angle / 60 degrees) and Ta, Tb, To with the equation worked
// out in floating point, Ta = K sin(k*60 - alpha), Tb = K sin(alpha - (k-1)*60),
// K = sqrt(3)/pi * m/1024 * Ts, To = Ts/2 - Ta - Tb, allowing 3 cycles of
// fixed-point error. It also checks that outputs hold while en is low.
module on_time_calc_tb;
  import svpwm_pkg::*;

  localparam real PI = 3.14159265358979;

  logic    clock = 0, reset = 1, en = 0;
  alpha_t  alpha = '0;
  index_t  m = '0;
  count_t  count_ta, count_tb, count_to;
  sector_t sector;
  int      checks = 0, failures = 0;

  on_time_calc dut (.*);

  always #5 clock = ~clock;

  task automatic near(input int got, input real exp, input string what);
    checks++;
    if (real'(got) - exp > 3.0 || exp - real'(got) > 3.0) begin
      failures++;
      $display("FAIL %s: got %0d expected %0.2f (alpha %0d m %0d)", what, got, exp, alpha, m);
    end
  endtask

  task automatic run_one(input int a, input int mi);
    real k_cyc, ta, tb, to, ar;
    int  ks;
    @(negedge clock);
    alpha = alpha_t'(a); m = index_t'(mi); en = 1;
    @(negedge clock);
    en = 0;
    ks    = a / 600 + 1;
    ar    = real'(a) / 10.0 * PI / 180.0;
    k_cyc = $sqrt(3.0) / PI * real'(mi) / 1024.0 * 10000.0;
    ta    = k_cyc * $sin(real'(ks) * PI / 3.0 - ar);
    tb    = k_cyc * $sin(ar - real'(ks - 1) * PI / 3.0);
    to    = 5000.0 - ta - tb;
    if (to < 0.0) to = 0.0;
    checks++;
    if (int'(sector) != ks) begin
      failures++;
      $display("FAIL sector: got %0d expected %0d (alpha %0d)", sector, ks, a);
    end
    near(int'(count_ta), ta, "Ta");
    near(int'(count_tb), tb, "Tb");
    near(int'(count_to), to, "To");
  endtask

  initial begin
    int hold_ta;
    repeat (2) @(posedge clock);
    #1;
    checks++;
    if (sector != 3'd1 || count_ta != '0) begin failures++; $display("FAIL reset values"); end
    reset = 0;
    for (int a = 0; a < 3600; a++) run_one(a, 928);
    for (int i = 0; i < 2000; i++) run_one(int'($urandom_range(3599)), int'($urandom_range(928)));
    // no update without en
    run_one(450, 600);
    hold_ta = int'(count_ta);
    @(negedge clock) alpha = 12'd100; m = 10'd900;
    repeat (3) @(negedge clock);
    checks++;
    if (int'(count_ta) != hold_ta || sector != 3'd1) begin
      failures++; $display("FAIL outputs changed without en");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clock);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
