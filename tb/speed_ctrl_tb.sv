// speed_ctrl_tb: self-checking test of the push-button speed setting.
//
// Runs with a 4-cycle debounce. Checks the reset speed (1500), that a press of
// decrease gives 1490, that increase is refused above 1490, that the setting
// walks down in 10 rpm steps and stops at 300, walks back up and stops at
// 1490, that a glitch shorter than the debounce time is ignored, that holding
// a button counts as one press and that pressing both at once changes
// nothing. Every expected value comes from a reference count in the bench.
module speed_ctrl_tb;
  import svpwm_pkg::*;

  localparam int DB = 4;

  logic   clock = 0, reset = 1, inc = 0, dec = 0;
  speed_t speed;
  int     checks = 0, failures = 0;
  int     model;

  speed_ctrl #(.DEBOUNCE_CYCLES(DB)) dut (.*);

  always #5 clock = ~clock;

  task automatic check(input int exp, input string what);
    checks++;
    if (int'(speed) != exp) begin
      failures++;
      $display("FAIL %s: speed=%0d expected %0d", what, speed, exp);
    end
  endtask

  task automatic press(input bit up, input bit down, input int hold = DB + 6);
    inc = up; dec = down;
    repeat (hold) @(posedge clock);
    inc = 0; dec = 0;
    repeat (DB + 6) @(posedge clock);
  endtask

  initial begin
    repeat (3) @(posedge clock);
    reset = 0;
    @(posedge clock);
    model = 1500;
    check(model, "reset value");
    press(0, 1); model = 1490; check(model, "first decrease");
    press(1, 0); check(model, "increase refused at 1490");
    for (int i = 0; i < 125; i++) begin
      press(0, 1);
      if (model - 10 >= 300) model -= 10;
      check(model, "walk down");
    end
    check(300, "lower limit");
    for (int i = 0; i < 125; i++) begin
      press(1, 0);
      if (model + 10 <= 1490) model += 10;
      check(model, "walk up");
    end
    check(1490, "upper limit");
    press(0, 1); model -= 10;
    // glitch shorter than the debounce time
    press(0, 1, DB - 2); check(model, "glitch ignored");
    // long hold is one press
    press(0, 1, 20 * DB); model -= 10; check(model, "held button");
    press(1, 1); check(model, "both buttons");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clock);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
