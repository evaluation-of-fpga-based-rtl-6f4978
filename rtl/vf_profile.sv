// vf_profile: constant V/f law (module 2 of the controller).
//
// From the speed setting it derives the two quantities that keep the ratio of
// output voltage to output frequency constant:
//   index     = round(speed * INDEX_RATED / SPEED_RATED)   modulation index
//   variation = round(speed * STEP_RATED  / SPEED_RATED)   angle step per sample
// Both are proportional to speed, so the voltage (index) rises with frequency
// (variation). The rated point, 1500 rpm -> index 928 and step 18, is the one
// printed in the document's simulation. index is a fraction with 1024 = 1, so
// 928 is the largest index of linear space-vector modulation, pi/(2*sqrt(3)).
// The step is in tenths of a degree per 10 kHz sample: 18 gives 1.8 degrees,
// 200 samples per revolution, i.e. 50 Hz at the 1500 rpm synchronous speed of
// a 4-pole motor. Rounding to nearest (not truncation) is this design's choice;
// it gives 50 Hz at 1490 rpm, the fundamental the document measured there.
//
// Interface: clock, active-high synchronous reset, speed (rpm), index,
// variation. Timing: outputs are registered, one cycle after speed.
module vf_profile
  import svpwm_pkg::*;
#(
  parameter int unsigned SPEED_RATED = 1500,
  parameter int unsigned INDEX_RATED = 928,
  parameter int unsigned STEP_RATED  = 18
) (
  input  logic   clock,
  input  logic   reset,
  input  speed_t speed,
  output index_t index,
  output step_t  variation
);

  logic [31:0] index_calc, step_calc;

  always_comb begin
    index_calc = (32'(speed) * INDEX_RATED + SPEED_RATED / 2) / SPEED_RATED;
    step_calc  = (32'(speed) * STEP_RATED  + SPEED_RATED / 2) / SPEED_RATED;
  end

  always_ff @(posedge clock) begin
    if (reset) begin
      index     <= '0;
      variation <= '0;
    end else begin
      index     <= (index_calc > 32'(2**INDEX_W - 1)) ? '1 : index_t'(index_calc);
      variation <= (step_calc  > 32'(2**STEP_W  - 1)) ? '1 : step_t'(step_calc);
    end
  end

endmodule
