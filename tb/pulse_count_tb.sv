// pulse_count_tb: self-checking test of the per-phase ON counts.
//
// For random Ta, Tb, To in every sector it checks maxa, maxb, maxc against the
// switching state of the two active vectors of the sector: a phase is on for
// To/2 (zero vector 111, half of To) plus the time of each active vector in
// which its upper switch is on. Vector k of the hexagon has the states
// 100, 110, 010, 011, 001, 101 (phases A B C) for k = 1 .. 6. The expected
// values come from that vector table, not from the sector table of the block.
module pulse_count_tb;
  import svpwm_pkg::*;

  logic    clock = 0, reset = 1, en = 0;
  count_t  count_ta = '0, count_tb = '0, count_to = '0;
  sector_t sector = 3'd1;
  count_t  maxa, maxb, maxc;
  int      checks = 0, failures = 0;

  pulse_count dut (.*);

  always #5 clock = ~clock;

  // upper-switch states (A,B,C) of active vector v = 1 .. 6
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

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (sector %0d)", what, got, exp, sector);
    end
  endtask

  initial begin
    int ta, tb, to, s;
    int ea, eb, ec;
    logic [2:0] v1, v2;
    repeat (2) @(posedge clock);
    #1 expect_eq(int'(maxa), 0, "reset");
    reset = 0;
    for (int i = 0; i < 3000; i++) begin
      s  = (i % 6) + 1;
      ta = int'($urandom_range(2500));
      tb = int'($urandom_range(2500));
      to = 5000 - ta - tb;
      @(negedge clock);
      count_ta = count_t'(ta); count_tb = count_t'(tb); count_to = count_t'(to);
      sector = sector_t'(s); en = 1;
      @(negedge clock) en = 0;
      v1 = vec(s); v2 = vec(s + 1);
      ea = to / 2 + (v1[2] ? ta : 0) + (v2[2] ? tb : 0);
      eb = to / 2 + (v1[1] ? ta : 0) + (v2[1] ? tb : 0);
      ec = to / 2 + (v1[0] ? ta : 0) + (v2[0] ? tb : 0);
      expect_eq(int'(maxa), ea, "maxa");
      expect_eq(int'(maxb), eb, "maxb");
      expect_eq(int'(maxc), ec, "maxc");
    end
    // hold without en
    @(negedge clock) count_ta = 14'd7; sector = 3'd4;
    repeat (2) @(negedge clock);
    expect_eq(int'(maxa), ea, "hold without en");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clock);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
