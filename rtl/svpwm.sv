// svpwm: open-loop constant V/f speed controller for a three-phase induction
// motor using space-vector PWM, complete on one 100 MHz clock.
//
// Data flow, one stage per module of the design:
//   buttons a|b, c|d -> speed_ctrl    speed setting, 300 .. 1490 rpm, 10 rpm/press
//   speed            -> vf_profile    modulation index and angle step (V/f constant)
//   step             -> clk_div_alpha 10 kHz sampling enable, angle alpha += step
//   alpha, index     -> on_time_calc  sector, Ta, Tb, To (cycles of 100 MHz)
//   Ta, Tb, To       -> pulse_count   ON count of each phase from the sector table
//   ON counts        -> 3 x pwm_arm   center-aligned PWM, 10 kHz, six gate signals
// The module split, port names and widths follow the document's schematic;
// gate outputs are numbered as there: pulse_1/pulse_4 drive the upper/lower
// IGBT of phase A, pulse_2/pulse_5 phase B, pulse_3/pulse_6 phase C. The two OR
// gates that merge the button pairs are also the schematic's. Using the 10 kHz
// tick as a clock enable, rather than as a second clock, is this design's
// choice. The on-time and count registers both load on the same tick, so a
// new angle reaches the PWM counters one sampling period after it is computed,
// and is applied at the next PWM period start.
//
// Ports: clock (100 MHz), reset (active high, synchronous), a, b (increase
// speed), c, d (decrease speed), pulse_1 .. pulse_6 (IGBT gates, 1 = on),
// and the observation outputs Ta, Tb, To, sector, clk_10k and step_value.
module svpwm
  import svpwm_pkg::*;
#(
  parameter int unsigned DEBOUNCE_CYCLES = 1_000_000,   // 10 ms at 100 MHz
  parameter int unsigned SPEED_RESET     = 1500
) (
  input  logic    clock,
  input  logic    reset,
  input  logic    a,
  input  logic    b,
  input  logic    c,
  input  logic    d,
  output logic    pulse_1,
  output logic    pulse_2,
  output logic    pulse_3,
  output logic    pulse_4,
  output logic    pulse_5,
  output logic    pulse_6,
  output count_t  Ta,
  output count_t  Tb,
  output count_t  To,
  output sector_t sector,
  output logic    clk_10k,
  output logic [4:0] step_value
);

  logic    inc, dec, tick;
  speed_t  speed;
  index_t  mod_index;
  step_t   variation;
  alpha_t  alpha;
  count_t  maxa, maxb, maxc;

  assign inc = a | b;
  assign dec = c | d;

  speed_ctrl #(.DEBOUNCE_CYCLES(DEBOUNCE_CYCLES), .SPEED_RESET(SPEED_RESET)) u_speed (
    .clock(clock), .reset(reset), .inc(inc), .dec(dec), .speed(speed)
  );

  vf_profile u_vf (
    .clock(clock), .reset(reset), .speed(speed), .index(mod_index), .variation(variation)
  );

  clk_div_alpha u_div (
    .clock(clock), .reset(reset), .variation(variation), .alpha(alpha),
    .clk_out(clk_10k), .tick(tick)
  );

  on_time_calc u_ontime (
    .clock(clock), .reset(reset), .en(tick), .alpha(alpha), .m(mod_index),
    .count_ta(Ta), .count_tb(Tb), .count_to(To), .sector(sector)
  );

  pulse_count u_count (
    .clock(clock), .reset(reset), .en(tick), .count_ta(Ta), .count_tb(Tb),
    .count_to(To), .sector(sector), .maxa(maxa), .maxb(maxb), .maxc(maxc)
  );

  pwm_arm u_arm_a (.clock(clock), .reset(reset), .max(maxa), .pulse1(pulse_1), .pulse_inverse(pulse_4));
  pwm_arm u_arm_b (.clock(clock), .reset(reset), .max(maxb), .pulse1(pulse_2), .pulse_inverse(pulse_5));
  pwm_arm u_arm_c (.clock(clock), .reset(reset), .max(maxc), .pulse1(pulse_3), .pulse_inverse(pulse_6));

  assign step_value = variation[4:0];

  // The upper and lower IGBT of an arm are never driven on together.
  a_no_shoot_through: assert property (@(posedge clock) disable iff (reset)
      !(pulse_1 && pulse_4) && !(pulse_2 && pulse_5) && !(pulse_3 && pulse_6));

endmodule
