// on_time_calc: sector and active-vector on-times (module 4 of the controller).
//
// Once per sampling period (when en is high) it registers, for the reference
// angle alpha and modulation index m:
//   sector k = 1 + floor(alpha / 60 degrees)
//   [Ta]                  [ sin(k*pi/3)     -cos(k*pi/3)     ] [cos(alpha)]
//   [Tb] = sqrt(3)/pi*m*Ts [ -sin((k-1)*pi/3)  cos((k-1)*pi/3) ] [sin(alpha)]
//   To   = Ts/2 - (Ta + Tb)
// all in 100 MHz clock cycles (Ts = 10000, Ts/2 = 5000). This is the
// document's equation and flow: find the sector, read sin and cos from a
// table, apply the matrix, then form To. The matrix constants are the seven
// values sin/cos(k*pi/3), k = 0 .. 6, in Q15. The scale factor
// sqrt(3)/pi*Ts/1024 (m is a fraction of 1024) is applied as m * KSCALE / 4096.
// Every fixed-point product is rounded to nearest before it is shortened.
// Six multiplications are used: K = m*KSCALE, four for the matrix, and two
// for K times the matrix results.
//
// Ta and Tb are clamped to 0 .. Ts/2 and To to 0 when Ta + Tb exceeds Ts/2
// (only possible above m = 928, beyond linear modulation); the clamping is
// this design's choice, the document does not treat over-modulation.
//
// Interface: clock, active-high synchronous reset, en (sampling enable),
// alpha (0 .. 3599 tenths of a degree), m (modulation index, 1024 = 1),
// count_ta, count_tb, count_to (14-bit cycle counts), sector (1 .. 6).
// Timing: outputs change on the clock edge where en is high, from the alpha
// and m present in that cycle. Reset gives zero times and sector 1.
module on_time_calc
  import svpwm_pkg::*;
#(
  parameter int unsigned TS     = TS_COUNTS,
  // round(sqrt(3)/pi * TS * 4096 / 1024): K = m * KSCALE / 4096 cycles
  parameter int unsigned KSCALE = int'(0.5513288954217920 * real'(TS) * 4.0 + 0.5)
) (
  input  logic    clock,
  input  logic    reset,
  input  logic    en,
  input  alpha_t  alpha,
  input  index_t  m,
  output count_t  count_ta,
  output count_t  count_tb,
  output count_t  count_to,
  output sector_t sector
);

  localparam int unsigned HALF = TS / 2;
  localparam int signed   Q1   = 32767;   // 1.0
  localparam int signed   QS3  = 28377;   // sqrt(3)/2
  localparam int signed   QH   = 16384;   // 1/2

  function automatic int signed sin_k(input int k);   // sin(k*pi/3), Q15
    case (k)
      1, 2:    return QS3;
      4, 5:    return -QS3;
      default: return 0;
    endcase
  endfunction

  function automatic int signed cos_k(input int k);   // cos(k*pi/3), Q15
    case (k)
      0, 6:    return Q1;
      1, 5:    return QH;
      2, 4:    return -QH;
      default: return -Q1;
    endcase
  endfunction

  logic signed [15:0] sin_a, cos_a;
  int                 k;
  int signed          u_a, u_b;        // sin(k*pi/3 - alpha), sin(alpha - (k-1)*pi/3), Q15
  logic [31:0]        k_cyc;           // sqrt(3)/pi * m * Ts in cycles
  int signed          ta_raw, tb_raw;
  count_t             ta_c, tb_c, to_c;

  sin_lut u_lut (.alpha(alpha), .sin_a(sin_a), .cos_a(cos_a));

  always_comb begin
    if      (32'(alpha) < 1 * SECTOR_SPAN) k = 1;
    else if (32'(alpha) < 2 * SECTOR_SPAN) k = 2;
    else if (32'(alpha) < 3 * SECTOR_SPAN) k = 3;
    else if (32'(alpha) < 4 * SECTOR_SPAN) k = 4;
    else if (32'(alpha) < 5 * SECTOR_SPAN) k = 5;
    else                                   k = 6;

    u_a = (sin_k(k) * int'(cos_a) - cos_k(k) * int'(sin_a) + 16384) >>> 15;
    u_b = (cos_k(k - 1) * int'(sin_a) - sin_k(k - 1) * int'(cos_a) + 16384) >>> 15;

    k_cyc  = (32'(m) * KSCALE + 2048) >> 12;
    ta_raw = (int'(k_cyc) * u_a + 16384) >>> 15;
    tb_raw = (int'(k_cyc) * u_b + 16384) >>> 15;

    ta_c = (ta_raw < 0) ? '0 : (ta_raw > int'(HALF)) ? count_t'(HALF) : count_t'(ta_raw);
    tb_c = (tb_raw < 0) ? '0 : (tb_raw > int'(HALF)) ? count_t'(HALF) : count_t'(tb_raw);
    to_c = (32'(ta_c) + 32'(tb_c) >= HALF) ? '0 : count_t'(HALF - 32'(ta_c) - 32'(tb_c));
  end

  always_ff @(posedge clock) begin
    if (reset) begin
      count_ta <= '0;
      count_tb <= '0;
      count_to <= '0;
      sector   <= 3'd1;
    end else if (en) begin
      count_ta <= ta_c;
      count_tb <= tb_c;
      count_to <= to_c;
      sector   <= sector_t'(k);
    end
  end

endmodule
