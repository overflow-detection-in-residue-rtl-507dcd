// End-to-end testbench for rns_ovf_top at its default width (n = 16,
// M = 2^48 - 2^16). Each vector is two binary integers X, Y in 0 .. M-1,
// converted to residues with %. The design must return the residues of
// (X + Y) mod M and ov = (X + Y >= M).
//
// Vectors: uniform random pairs (half of them overflow), pairs straddling M,
// pairs whose groups sum exactly to the indicator 2^2n - 2^n - 1 (decided by
// the G(Z) == 0 test), and operands with x3 = 0, x1 = 2^n (the special input
// of the A' reduction). The testbench counts, from its own integer arithmetic,
// how often each mechanism of the detector was exercised and fails if one never
// was: overflow and no overflow decided by the sign, each outcome of the
// equality path, the A' exception, the right-block carry (alpha) of the
// indicator comparator, and each select value of the carry-select group adder.
module rns_ovf_top_tb;
  import rns_ref_pkg::*;

  localparam int N = rns_ovf_pkg::N_DEFAULT;
  localparam int VECTORS = 40000;

  logic [N-1:0] x3, x2, y3, y2, z3, z2;
  logic [N:0]   x1, y1, z1;
  logic         ov;

  int checks = 0;
  int failures = 0;
  int n_above = 0, n_below = 0, n_eq_ov = 0, n_eq_no = 0;
  int n_exception = 0, n_alpha = 0, n_low_carry = 0, n_no_low_carry = 0;

  rns_ovf_top dut (.*);

  initial begin : watchdog
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit is_exception(u64_t v);
    return (v % m3(N) == 0) && (v % m1(N) == m2(N));
  endfunction

  task automatic check(u64_t x, u64_t y);
    u64_t z, gx, gy, gs;
    bit   expect_v;
    x3 = N'(x % m3(N)); x2 = N'(x % m2(N)); x1 = (N+1)'(x % m1(N));
    y3 = N'(y % m3(N)); y2 = N'(y % m2(N)); y1 = (N+1)'(y % m1(N));
    #1;
    z = (x + y) % range_m(N);
    expect_v = (x + y >= range_m(N));
    gx = group_of(x, N);
    gy = group_of(y, N);
    gs = gx + gy;
    if (gs > indicator(N)) n_above++;
    else if (gs < indicator(N)) n_below++;
    else if (expect_v) n_eq_ov++;
    else n_eq_no++;
    if (is_exception(x) || is_exception(y) || is_exception(z)) n_exception++;
    if (gs % m2(N) == m2(N) - 1) n_alpha++;
    if (gx % m2(N) + gy % m2(N) >= m2(N)) n_low_carry++;
    else n_no_low_carry++;
    checks++;
    if (ov !== expect_v || u64_t'(z3) != z % m3(N) || u64_t'(z2) != z % m2(N)
        || u64_t'(z1) != z % m1(N)) begin
      failures++;
      if (failures < 10)
        $display("X=%0d Y=%0d got z=(%0d,%0d,%0d) ov=%b expected Z=%0d ov=%b",
                 x, y, z3, z2, z1, ov, z, expect_v);
    end
  endtask

  // Numbers with x3 = 0 and x1 = 2^n, i.e. multiples of 2^n-1 that are
  // congruent to 2^n = -1 modulo 2^n+1: X = (2^n-1)(2^n+1)(2^n-1-j) ... found
  // by search from a random start.
  function automatic u64_t exception_operand();
    u64_t v;
    v = rand_below(range_m(N) / m3(N)) * m3(N);
    while (v % m1(N) != m2(N)) begin
      v += m3(N);
      if (v >= range_m(N)) v = 0;
    end
    return v;
  endfunction

  initial begin
    u64_t gx;
    check(0, 0);
    check(range_m(N) - 1, 1);
    check(range_m(N) - 1, 0);
    check(range_m(N) - 1, range_m(N) - 1);
    for (int i = 0; i < VECTORS; i++) begin
      check(rand_below(range_m(N)), rand_below(range_m(N)));
      check(range_m(N) - 1 - rand_below(4 * m1(N)), rand_below(4 * m1(N)));
      gx = rand_below(indicator(N) + 1);
      check(gx * m1(N) + rand_below(m1(N)), (indicator(N) - gx) * m1(N) + rand_below(m1(N)));
      if (i % 100 == 0) check(exception_operand(), rand_below(range_m(N)));
    end
    $display("mechanisms: above=%0d below=%0d equal_ov=%0d equal_no_ov=%0d exception=%0d alpha=%0d low_carry=%0d no_low_carry=%0d",
             n_above, n_below, n_eq_ov, n_eq_no, n_exception, n_alpha, n_low_carry, n_no_low_carry);
    if (n_above == 0) begin failures++; $display("sum of groups above the indicator never occurred"); end
    if (n_below == 0) begin failures++; $display("sum of groups below the indicator never occurred"); end
    if (n_eq_ov == 0) begin failures++; $display("equal with G(Z) = 0 never occurred"); end
    if (n_eq_no == 0) begin failures++; $display("equal with G(Z) != 0 never occurred"); end
    if (n_exception == 0) begin failures++; $display("the A' exception never occurred"); end
    if (n_alpha == 0) begin failures++; $display("alpha = 1 never occurred"); end
    if (n_low_carry == 0 || n_no_low_carry == 0) begin failures++; $display("a carry-select path was never used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
