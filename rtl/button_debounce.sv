// button_debounce: synchroniser, debouncer and press detector for one button.
//
// The raw button level is synchronised with two flip-flops. The debounced
// level follows the synchronised level only after the latter has differed from
// it for DEBOUNCE_CYCLES consecutive cycles. press is a one-cycle pulse on each
// rising edge of the debounced level. Active-high synchronous reset; after
// reset the button is taken as released. Used by speed_ctrl; this filtering is
// this design's own addition.
module button_debounce #(
  parameter int unsigned DEBOUNCE_CYCLES = 1_000_000,
  parameter int          CNT_W           = 20
) (
  input  logic clock,
  input  logic reset,
  input  logic button,
  output logic press
);

  logic [1:0]       sync;
  logic             level;
  logic [CNT_W-1:0] cnt;

  always_ff @(posedge clock) begin
    if (reset) begin
      sync  <= '0;
      level <= 1'b0;
      cnt   <= '0;
      press <= 1'b0;
    end else begin
      sync  <= {sync[0], button};
      press <= 1'b0;
      if (sync[1] == level) begin
        cnt <= '0;
      end else if (32'(cnt) + 1 >= DEBOUNCE_CYCLES) begin
        cnt   <= '0;
        level <= sync[1];
        press <= sync[1];
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule
