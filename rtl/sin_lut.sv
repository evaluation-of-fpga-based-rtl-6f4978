// sin_lut: sine and cosine of the reference angle from a quarter-wave table.
//
// The table holds sin(i * 0.1 degree) for i = 0 .. 900 as unsigned Q15
// values, round(32767 * sin(i * 0.1 degree)), read from rtl/sin_quarter.hex.
// The quadrant of the angle (0 .. 3599 tenths of a degree) selects whether the
// table is read forward or backward and whether the result is negated; cos is
// read as sin(angle + 90 degrees) through a second read port. Outputs are
// signed Q15 (32767 = 1.0). The document states only that sin and cos come
// from a look-up table; the quarter-wave folding and the 0.1 degree
// resolution are this design's choice (the resolution matches the angle bus).
//
// Interface: alpha (0 .. 3599), sin_a, cos_a. Timing: combinational.
module sin_lut
  import svpwm_pkg::*;
(
  input  alpha_t             alpha,
  output logic signed [15:0] sin_a,
  output logic signed [15:0] cos_a
);

  localparam int unsigned QUARTER = ALPHA_FULL / 4;   // 900

  logic [15:0] table_q [0:QUARTER];

  initial $readmemh("rtl/sin_quarter.hex", table_q);

  function automatic logic signed [15:0] lookup(input logic [ALPHA_W:0] ang);
    logic [ALPHA_W:0] ang_w, r;
    logic [1:0]       quad;
    logic [15:0]      mag;
    ang_w = (32'(ang) >= ALPHA_FULL) ? (ALPHA_W+1)'(32'(ang) - ALPHA_FULL) : ang;
    if      (32'(ang_w) < QUARTER)     begin quad = 2'd0; r = ang_w; end
    else if (32'(ang_w) < 2 * QUARTER) begin quad = 2'd1; r = ang_w - (ALPHA_W+1)'(QUARTER); end
    else if (32'(ang_w) < 3 * QUARTER) begin quad = 2'd2; r = ang_w - (ALPHA_W+1)'(2 * QUARTER); end
    else                           begin quad = 2'd3; r = ang_w - (ALPHA_W+1)'(3 * QUARTER); end
    mag = quad[0] ? table_q[10'(QUARTER - 32'(r))] : table_q[10'(r)];
    return quad[1] ? -$signed(mag) : $signed(mag);
  endfunction

  always_comb begin
    sin_a = lookup({1'b0, alpha});
    cos_a = lookup({1'b0, alpha} + (ALPHA_W+1)'(QUARTER));
  end

endmodule
