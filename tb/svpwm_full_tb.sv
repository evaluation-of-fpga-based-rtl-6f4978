// svpwm_full_tb: the SVPWM V/f controller with every parameter at its
// default (10 ms button debounce, 10000-cycle switching period), through one
// complete operation: one electrical revolution at the rated 1500 rpm after
// reset, one press of the decrease button (1490 rpm), a run at that speed, and
// one press of the increase button, which the 1490 rpm limit refuses.
//
// The checking is that of svpwm_tb: a floating-point model of the V/f law,
// the angle and the on-time equation predicts the ON cycles of each upper
// gate in every PWM period (two-period pipeline, 8 cycles tolerance), and
// upper and lower gates are checked to be complementary in every cycle.
module svpwm_full_tb;
  import svpwm_pkg::*;

  localparam int DB = 1_000_000;   // must equal the top's default debounce time

  logic clock = 0, reset = 1, a = 0, b = 0, c = 0, d = 0;
  logic pulse_1, pulse_2, pulse_3, pulse_4, pulse_5, pulse_6;
  count_t Ta, Tb, To;
  sector_t sector;
  logic clk_10k;
  logic [4:0] step_value;

  int checks = 0, failures = 0;

  svpwm dut (.*);

  always #5 clock = ~clock;

  localparam real PI = 3.14159265358979;

  // ---------------- reference model ----------------
  int  speed_model = 1500;
  int  alpha_model = 0;          // angle register of the model
  int  calc_alpha [0:2];         // angle / index sampled at the last three ticks
  int  calc_m     [0:2];
  bit  calc_valid [0:2];
  int  n_inc = 0, n_dec = 0, n_lo_clamp = 0, n_hi_clamp = 0, n_wrap = 0, n_step_change = 0;
  int  sector_seen [1:6];
  int  periods = 0;
  int  last_wrap_period = -1, wrap_len = 0, wrap_len_checked = 0;

  function automatic int idx_of(input int s);  return (s * 928 + 750) / 1500; endfunction
  function automatic int step_of(input int s); return (s * 18 + 750) / 1500; endfunction

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  function automatic logic [2:0] vec(input int v);
    case (((v - 1) % 6) + 1)
      1: return 3'b100;
      2: return 3'b110;
      3: return 3'b010;
      4: return 3'b011;
      5: return 3'b001;
      default: return 3'b101;
    endcase
  endfunction

  // expected ON cycles per half period for phase ph (2 = A, 1 = B, 0 = C)
  function automatic real exp_on(input int alpha, input int m, input int ph);
    real ar, kc, ta, tb, to, r;
    int  k;
    logic [2:0] v1, v2;
    k  = alpha / 600 + 1;
    ar = real'(alpha) / 10.0 * PI / 180.0;
    kc = $sqrt(3.0) / PI * real'(m) / 1024.0 * 10000.0;
    ta = kc * $sin(real'(k) * PI / 3.0 - ar);
    tb = kc * $sin(ar - real'(k - 1) * PI / 3.0);
    to = 5000.0 - ta - tb;
    v1 = vec(k); v2 = vec(k + 1);
    r  = to / 2.0;
    if (v1[ph]) r += ta;
    if (v2[ph]) r += tb;
    return r;
  endfunction

  // ---------------- cycle monitor ----------------
  bit run = 0;
  int cyc = 0;                 // cycles since the first clock edge out of reset
  int on_a, on_b, on_c;

  initial begin
    forever begin
      @(posedge clock); #1;
      if (run) begin
        int i;
        i = cyc % 10000;
        if (i == 0) begin on_a = 0; on_b = 0; on_c = 0; end
        on_a += int'(pulse_1); on_b += int'(pulse_2); on_c += int'(pulse_3);
        if (pulse_1 == pulse_4 || pulse_2 == pulse_5 || pulse_3 == pulse_6) begin
          checks++; fail($sformatf("gates not complementary at cycle %0d", cyc));
        end
        // tick edge: on-time and count registers load, angle advances
        if (i == 9999) begin
          int st;
          st = step_of(speed_model);
          checks++;
          if (int'(step_value) != (st & 31)) fail($sformatf("step_value %0d expected %0d", step_value, st));
          calc_alpha[2] = calc_alpha[1]; calc_m[2] = calc_m[1]; calc_valid[2] = calc_valid[1];
          calc_alpha[1] = calc_alpha[0]; calc_m[1] = calc_m[0]; calc_valid[1] = calc_valid[0];
          calc_alpha[0] = alpha_model;   calc_m[0] = idx_of(speed_model); calc_valid[0] = 1;
          sector_seen[alpha_model / 600 + 1]++;
          alpha_model += st;
          if (alpha_model >= 3600) begin
            alpha_model -= 3600;
            n_wrap++;
            if (last_wrap_period >= 0) wrap_len = periods - last_wrap_period;
            last_wrap_period = periods;
          end
        end
        if (i == 9999) begin
          // The period that ends now used the angle sampled three ticks ago,
          // counting the tick that ends it: on-time load, count load, period start.
          if (calc_valid[2] && periods >= 2) begin
            real ea, eb, ec;
            ea = exp_on(calc_alpha[2], calc_m[2], 2);
            eb = exp_on(calc_alpha[2], calc_m[2], 1);
            ec = exp_on(calc_alpha[2], calc_m[2], 0);
            checks++;
            if (real'(on_a) - 2.0 * ea > 8.0 || 2.0 * ea - real'(on_a) > 8.0 ||
                real'(on_b) - 2.0 * eb > 8.0 || 2.0 * eb - real'(on_b) > 8.0 ||
                real'(on_c) - 2.0 * ec > 8.0 || 2.0 * ec - real'(on_c) > 8.0)
              fail($sformatf("period %0d: on A/B/C %0d/%0d/%0d expected %0.1f/%0.1f/%0.1f (alpha %0d m %0d)",
                             periods, on_a, on_b, on_c, 2.0 * ea, 2.0 * eb, 2.0 * ec,
                             calc_alpha[2], calc_m[2]));
          end else if (periods < 2) begin
            checks++;
            if (on_a != 0 || on_b != 0 || on_c != 0) fail("gates on before the first counts");
          end
          periods++;
        end
        cyc++;
      end
    end
  end

  // ---------------- stimulus ----------------
  // Presses are placed in the middle of a PWM period, so the speed, index
  // and step settle well away from the sampling tick.
  task automatic wait_mid_period();
    while ((cyc % 10000) != 3000) @(posedge clock);
  endtask

  task automatic press(input bit up);
    int spd_prev;
    wait_mid_period();
    spd_prev = speed_model;
    if (up) begin a = 1; end else begin d = 1; end
    repeat (DB + 4) @(posedge clock);    // the press is taken DB + 3 cycles in
    if (up) begin
      if (speed_model + 10 <= 1490) begin speed_model += 10; n_inc++; end
      else n_hi_clamp++;
    end else begin
      if (speed_model - 10 >= 300) begin speed_model -= 10; n_dec++; end
      else n_lo_clamp++;
    end
    a = 0; d = 0;
    repeat (DB + 6) @(posedge clock);
    checks++;
    if (int'(dut.u_speed.speed) != speed_model)
      fail($sformatf("speed %0d expected %0d", dut.u_speed.speed, speed_model));
    if (step_of(speed_model) != step_of(spd_prev)) n_step_change++;
  endtask

  task automatic set_speed(input int target);
    while (speed_model > target) press(0);
    while (speed_model < target) press(1);
  endtask

  task automatic run_periods(input int n);
    int p0;
    p0 = periods;
    while (periods < p0 + n) @(posedge clock);
  endtask

  initial begin
    repeat (4) @(posedge clock);
    @(negedge clock);
    reset = 0; run = 1;
    run_periods(210);
    checks++;
    if (int'(dut.u_vf.index) != 928) fail("index at 1500 rpm");
    press(0);
    run_periods(30);
    press(1);
    run_periods(30);
    checks++; if (n_dec != 1)      fail("decrease press not taken");
    checks++; if (n_hi_clamp != 1) fail("increase above 1490 rpm not refused");
    checks++; if (n_wrap == 0)     fail("angle never wrapped");
    for (int s = 1; s <= 6; s++) begin
      checks++; if (sector_seen[s] == 0) fail($sformatf("sector %0d never used", s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (12_000_000) @(posedge clock);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
