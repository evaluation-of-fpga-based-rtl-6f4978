// svpwm_harmonics_tb: line-to-line voltage spectrum of the controller at the
// speeds of the harmonic measurements, 500, 1000 and 1490 rpm.
//
// The speed is set with the buttons (debounce shortened to 8 cycles). After
// the pipeline settles, the bench records for one full electrical revolution
// the period-average line voltage v_ab = (ON cycles of phase A - ON cycles of
// phase B) / 10000, in units of the DC bus, one value per 10 kHz period. A
// discrete Fourier transform over exactly one revolution (3600/step periods)
// gives harmonics 1, 3 and 5. Checks per speed:
//   * revolution length 3600/step periods, i.e. fundamental 10 kHz*step/3600
//     (16.67, 33.33 and 50 Hz);
//   * fundamental amplitude sqrt(3) * 2/pi * m of the bus voltage (linear
//     SVPWM; m = index/1024), within 2 %, so the V/f ratio is constant;
//   * 3rd and 5th harmonics below 1 % of the fundamental (an ideal modulator;
//     the motor, inverter and measurement chain add their own).
module svpwm_harmonics_tb;
  import svpwm_pkg::*;

  localparam int DB = 8;
  localparam real PI = 3.14159265358979;

  logic clock = 0, reset = 1, a = 0, b = 0, c = 0, d = 0;
  logic pulse_1, pulse_2, pulse_3, pulse_4, pulse_5, pulse_6;
  count_t Ta, Tb, To;
  sector_t sector;
  logic clk_10k;
  logic [4:0] step_value;

  int checks = 0, failures = 0;
  int speed_set = 1500;

  svpwm #(.DEBOUNCE_CYCLES(DB)) dut (.*);

  always #5 clock = ~clock;

  // cycle counter and per-period ON counts, PWM period = cycles 0 .. 9999
  int  cyc = 0;
  int  on_a = 0, on_b = 0;
  real vab_last = 0.0;
  event period_done;
  bit  run = 0;

  initial forever begin
    @(posedge clock); #1;
    if (run) begin
      if (cyc % 10000 == 0) begin on_a = 0; on_b = 0; end
      on_a += int'(pulse_1);
      on_b += int'(pulse_2);
      if (cyc % 10000 == 9999) begin
        vab_last = real'(on_a - on_b) / 10000.0;
        -> period_done;
      end
      cyc++;
    end
  end

  task automatic press(input bit up);
    while (cyc % 10000 != 3000) @(posedge clock);
    if (up) a = 1; else c = 1;
    repeat (DB + 4) @(posedge clock);
    a = 0; c = 0;
    repeat (DB + 6) @(posedge clock);
    speed_set += up ? 10 : -10;
  endtask

  task automatic measure(input int rpm);
    int  step, n, idx;
    real re[1:5], im[1:5], amp[1:5], m, expect1, v;
    while (speed_set > rpm) press(0);
    while (speed_set < rpm) press(1);
    checks++;
    if (int'(dut.u_speed.speed) != rpm) begin
      failures++; $display("FAIL speed %0d, expected %0d", dut.u_speed.speed, rpm);
    end
    step = (rpm * 18 + 750) / 1500;
    idx  = (rpm * 928 + 750) / 1500;
    n    = 3600 / step;
    checks++;
    if (int'(step_value) != step) begin
      failures++; $display("FAIL step %0d, expected %0d", step_value, step);
    end
    repeat (4) @(period_done);        // pipeline settles
    for (int h = 1; h <= 5; h++) begin re[h] = 0.0; im[h] = 0.0; end
    for (int p = 0; p < n; p++) begin
      @(period_done);
      v = vab_last;
      for (int h = 1; h <= 5; h++) begin
        re[h] += v * $cos(2.0 * PI * real'(h * p) / real'(n));
        im[h] -= v * $sin(2.0 * PI * real'(h * p) / real'(n));
      end
    end
    for (int h = 1; h <= 5; h++) amp[h] = 2.0 / real'(n) * $sqrt(re[h] * re[h] + im[h] * im[h]);
    m       = real'(idx) / 1024.0;
    expect1 = $sqrt(3.0) * 2.0 / PI * m;
    $display("%0d rpm: step %0d, %0d samples/rev = %0.2f Hz, V1 %0.4f (expected %0.4f), V3/V1 %0.5f, V5/V1 %0.5f",
             rpm, step, n, 10000.0 / real'(n), amp[1], expect1, amp[3] / amp[1], amp[5] / amp[1]);
    checks++;
    if (amp[1] < 0.98 * expect1 || amp[1] > 1.02 * expect1) begin
      failures++; $display("FAIL fundamental amplitude at %0d rpm", rpm);
    end
    checks++;
    if (amp[3] > 0.01 * amp[1]) begin failures++; $display("FAIL third harmonic at %0d rpm", rpm); end
    checks++;
    if (amp[5] > 0.01 * amp[1]) begin failures++; $display("FAIL fifth harmonic at %0d rpm", rpm); end
    // the fundamental must be in bin 1: a revolution is exactly n periods
    checks++;
    if (amp[2] > 0.01 * amp[1] || amp[4] > 0.01 * amp[1]) begin
      failures++; $display("FAIL even harmonics at %0d rpm: revolution length wrong", rpm);
    end
  endtask

  initial begin
    repeat (4) @(posedge clock);
    @(negedge clock);
    reset = 0; run = 1;
    measure(1490);
    measure(1000);
    measure(500);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000_000) @(posedge clock);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
