// clk_div_alpha: clock divider and reference-angle generator (module 3).
//
// A counter divides the 100 MHz clock by DIVIDE (10000) to the 10 kHz
// sampling rate. clk_out is the divided clock as a square wave, low for the
// first half of each period and high for the second half. Once per period, on
// the last cycle of the count, tick is high for one cycle and the angle of the
// reference vector advances by variation, wrapping at ALPHA_FULL (3600 tenths
// of a degree = 360 degrees).
//
// The document clocks the on-time and count modules with the divided clock.
// Here the whole design stays on the 100 MHz clock and those modules use tick
// as a clock enable instead; clk_out is still produced for observation. That
// single-clock structure is this design's choice.
//
// Interface: clock, active-high synchronous reset, variation (angle step),
// alpha (0 .. 3599), clk_out (10 kHz square wave), tick (one-cycle enable).
// Timing: alpha changes on the clock edge that ends a period, i.e. on the
// cycle after tick is seen high. Reset clears the counter and alpha.
module clk_div_alpha
  import svpwm_pkg::*;
#(
  parameter int unsigned DIVIDE = TS_COUNTS
) (
  input  logic   clock,
  input  logic   reset,
  input  step_t  variation,
  output alpha_t alpha,
  output logic   clk_out,
  output logic   tick
);

  localparam int DIV_W = $clog2(DIVIDE);

  logic [DIV_W-1:0] div_cnt;
  logic [ALPHA_W:0] alpha_sum;

  assign tick      = (32'(div_cnt) == DIVIDE - 1);
  assign clk_out   = (32'(div_cnt) >= DIVIDE / 2);
  assign alpha_sum = {1'b0, alpha} + (ALPHA_W+1)'(variation);

  always_ff @(posedge clock) begin
    if (reset) begin
      div_cnt <= '0;
      alpha   <= '0;
    end else begin
      if (tick) begin
        div_cnt <= '0;
        alpha   <= (32'(alpha_sum) >= ALPHA_FULL) ? alpha_t'(32'(alpha_sum) - ALPHA_FULL)
                                                 : alpha_t'(alpha_sum);
      end else begin
        div_cnt <= div_cnt + 1'b1;
      end
    end
  end

endmodule
