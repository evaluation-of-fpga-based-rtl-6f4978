// pulse_count: per-phase ON count from the on-times and the sector (module 5).
//
// For each inverter phase it forms the number of 100 MHz cycles, within half
// a switching period, for which the upper switch of that phase is on:
//
//   sector   phase A        phase B        phase C
//     1      Ta+Tb+To/2     Tb+To/2        To/2
//     2      Ta+To/2        Ta+Tb+To/2     To/2
//     3      To/2           Ta+Tb+To/2     Tb+To/2
//     4      To/2           Ta+To/2        Ta+Tb+To/2
//     5      Tb+To/2        To/2           Ta+Tb+To/2
//     6      Ta+Tb+To/2     To/2           Ta+To/2
//
// Ta is the time of the first active vector of sector k (vector k) and Tb the
// time of the second (vector k+1), as the on-time equation defines them. The
// phase that is on in both active vectors gets Ta+Tb+To/2, the phase that is
// on in neither gets To/2, and the remaining phase gets the time of the one
// vector in which it is on. The document's sector table prints Tb+To/2 for
// that single-vector entry in every sector; in sectors 2, 4 and 6 this table
// uses Ta+To/2, which is what the on-time equation requires for a continuous
// output voltage (this is a deliberate departure from the printed table).
// To/2 is To shifted right by one bit.
//
// Interface: clock, active-high synchronous reset, en (sampling enable),
// count_ta, count_tb, count_to, sector, maxa, maxb, maxc.
// Timing: outputs are registered on the clock edge where en is high. Reset
// clears them, which keeps all six switches' upper devices off.
module pulse_count
  import svpwm_pkg::*;
(
  input  logic    clock,
  input  logic    reset,
  input  logic    en,
  input  count_t  count_ta,
  input  count_t  count_tb,
  input  count_t  count_to,
  input  sector_t sector,
  output count_t  maxa,
  output count_t  maxb,
  output count_t  maxc
);

  count_t half_to, t_a1, t_b1, t_ab;
  count_t a_c, b_c, c_c;

  always_comb begin
    half_to = count_to >> 1;
    t_a1    = count_ta + half_to;
    t_b1    = count_tb + half_to;
    t_ab    = count_ta + count_tb + half_to;
    unique case (sector)
      3'd1:    begin a_c = t_ab;    b_c = t_b1;    c_c = half_to; end
      3'd2:    begin a_c = t_a1;    b_c = t_ab;    c_c = half_to; end
      3'd3:    begin a_c = half_to; b_c = t_ab;    c_c = t_b1;    end
      3'd4:    begin a_c = half_to; b_c = t_a1;    c_c = t_ab;    end
      3'd5:    begin a_c = t_b1;    b_c = half_to; c_c = t_ab;    end
      3'd6:    begin a_c = t_ab;    b_c = half_to; c_c = t_a1;    end
      default: begin a_c = half_to; b_c = half_to; c_c = half_to; end
    endcase
  end

  always_ff @(posedge clock) begin
    if (reset) begin
      maxa <= '0;
      maxb <= '0;
      maxc <= '0;
    end else if (en) begin
      maxa <= a_c;
      maxb <= b_c;
      maxc <= c_c;
    end
  end

endmodule
