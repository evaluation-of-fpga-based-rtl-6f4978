// speed_ctrl: push-button speed setting (module 1 of the controller).
//
// Each press of the increase button raises the speed setting by STEP_RPM and
// each press of the decrease button lowers it by STEP_RPM. The setting is held
// between SPEED_MIN and SPEED_MAX (300 and 1490 rpm in the document) and a
// press that would leave that range is ignored. After reset the setting is
// SPEED_RESET; the document's simulation runs at 1500 rpm, which is the default
// here, so the first decrease brings it to 1490 and into the button range.
//
// Both buttons pass through a two-flop synchroniser and a debouncer that
// accepts a new level only after it has been stable for DEBOUNCE_CYCLES clock
// cycles; a press is the accepted rising edge of that level. The synchroniser
// and debouncer are this design's choice (the document says only that every
// single press changes the speed by 10 rpm). If both buttons are pressed in
// the same cycle nothing changes.
//
// Interface: clock, active-high synchronous reset, inc (the OR of buttons a
// and b), dec (the OR of buttons c and d), speed (rpm, 11 bits).
// Timing: speed changes DEBOUNCE_CYCLES + 3 cycles after a clean rising edge.
module speed_ctrl
  import svpwm_pkg::*;
#(
  parameter int unsigned SPEED_MIN       = 300,
  parameter int unsigned SPEED_MAX       = 1490,
  parameter int unsigned SPEED_RESET     = 1500,
  parameter int unsigned STEP_RPM        = 10,
  parameter int unsigned DEBOUNCE_CYCLES = 1_000_000   // 10 ms at 100 MHz
) (
  input  logic   clock,
  input  logic   reset,
  input  logic   inc,
  input  logic   dec,
  output speed_t speed
);

  localparam int DB_W = (DEBOUNCE_CYCLES > 1) ? $clog2(DEBOUNCE_CYCLES + 1) : 1;

  logic inc_press, dec_press;

  button_debounce #(.DEBOUNCE_CYCLES(DEBOUNCE_CYCLES), .CNT_W(DB_W)) u_inc (
    .clock(clock), .reset(reset), .button(inc), .press(inc_press)
  );
  button_debounce #(.DEBOUNCE_CYCLES(DEBOUNCE_CYCLES), .CNT_W(DB_W)) u_dec (
    .clock(clock), .reset(reset), .button(dec), .press(dec_press)
  );

  always_ff @(posedge clock) begin
    if (reset) begin
      speed <= speed_t'(SPEED_RESET);
    end else if (inc_press && !dec_press) begin
      if (32'(speed) + STEP_RPM <= SPEED_MAX) speed <= speed + speed_t'(STEP_RPM);
    end else if (dec_press && !inc_press) begin
      if (32'(speed) >= SPEED_MIN + STEP_RPM) speed <= speed - speed_t'(STEP_RPM);
    end
  end

endmodule
