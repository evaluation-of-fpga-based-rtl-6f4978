// pwm_arm: PWM pattern for the two IGBTs of one inverter arm (modules 6-8).
//
// A counter runs through one switching period of PERIOD (10000) cycles of
// the 100 MHz clock and is folded into a symmetric triangle that rises from
// 0 to PERIOD/2-1 and falls back to 0. The upper switch is on (pulse1 high)
// while the triangle is below the ON count max, so it is on for exactly 2*max
// cycles per period, in one pulse centred on the period boundary; with max the
// ON time per half period (Ts/2 = 5000 cycles), this is center-aligned
// space-vector PWM. pulse_inverse, for the lower switch, is the complement.
// max is taken into a shadow register at the start of each period so a pulse
// is never cut by an update in mid-period. The document gives only the
// module's ports and purpose; the triangular counter, the compare direction
// and the shadow register are this design's choices. No dead time is
// inserted: the document does not mention one, and the power module used in
// the document's setup drives the IGBTs from these patterns.
//
// Interface: clock, active-high synchronous reset, max (ON cycles per half
// period, 0 .. 5000), pulse1 (upper IGBT), pulse_inverse (lower IGBT).
// Timing: the period restarts on the cycle after reset; outputs are
// registered. During reset both outputs drive the lower switch on.
module pwm_arm
  import svpwm_pkg::*;
#(
  parameter int unsigned PERIOD = TS_COUNTS
) (
  input  logic   clock,
  input  logic   reset,
  input  count_t max,
  output logic   pulse1,
  output logic   pulse_inverse
);

  localparam int unsigned HALF = PERIOD / 2;
  localparam int          CW   = $clog2(PERIOD);

  logic [CW-1:0] cnt, cnt_next;
  count_t        max_q;
  logic [CW-1:0] tri_v;
  logic          on_next;

  always_comb begin
    cnt_next = (32'(cnt) == PERIOD - 1) ? '0 : cnt + 1'b1;
    tri_v    = (32'(cnt_next) < HALF) ? cnt_next : CW'(PERIOD - 1 - 32'(cnt_next));
    on_next  = (32'(tri_v) < 32'(cnt_next == '0 ? max : max_q));
  end

  always_ff @(posedge clock) begin
    if (reset) begin
      cnt           <= CW'(PERIOD - 1);
      max_q         <= '0;
      pulse1        <= 1'b0;
      pulse_inverse <= 1'b1;
    end else begin
      cnt           <= cnt_next;
      if (cnt_next == '0) max_q <= max;
      pulse1        <= on_next;
      pulse_inverse <= ~on_next;
    end
  end

endmodule
