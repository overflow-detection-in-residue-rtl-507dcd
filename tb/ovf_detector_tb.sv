// Testbench for ovf_detector: ov must be 1 exactly when X + Y >= M. X and Y
// are binary integers in 0 .. M-1; the testbench forms Z = (X + Y) mod M
// itself and converts all three to residues with %. n = 3 is exhaustive over
// every pair; n = 4 and n = 16 (default) use random pairs, pairs near the top
// of the range, and pairs built with G(X) + G(Y) equal to the indicator, where
// the decision falls to the G(Z) == 0 test. Each of the four decision cases
// (sum of groups above, below, equal with G(Z) = 0, equal otherwise) is counted
// and must occur.
module ovf_detector_tb;
  import rns_ref_pkg::*;

  localparam int NUM = 3;
  localparam int NS [NUM] = '{3, 4, 16};

  int checks = 0;
  int failures = 0;
  int done = 0;
  int n_above = 0, n_below = 0, n_eq_ov = 0, n_eq_no = 0;

  initial begin : watchdog
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar k = 0; k < NUM; k++) begin : g_n
    localparam int N = NS[k];
    logic [N-1:0] x3, x2, y3, y2, z3, z2;
    logic [N:0]   x1, y1, z1;
    logic         ov;

    ovf_detector #(.N(N)) dut (.*);

    task automatic check(u64_t x, u64_t y);
      u64_t z, gs;
      bit   expect_v;
      z = (x + y) % range_m(N);
      x3 = N'(x % m3(N)); x2 = N'(x % m2(N)); x1 = (N+1)'(x % m1(N));
      y3 = N'(y % m3(N)); y2 = N'(y % m2(N)); y1 = (N+1)'(y % m1(N));
      z3 = N'(z % m3(N)); z2 = N'(z % m2(N)); z1 = (N+1)'(z % m1(N));
      #1;
      expect_v = (x + y >= range_m(N));
      gs = group_of(x, N) + group_of(y, N);
      if (gs > indicator(N)) n_above++;
      else if (gs < indicator(N)) n_below++;
      else if (expect_v) n_eq_ov++;
      else n_eq_no++;
      checks++;
      if (ov !== expect_v) begin
        failures++;
        if (failures < 10) $display("N=%0d X=%0d Y=%0d got ov=%b expected %b", N, x, y, ov, expect_v);
      end
    endtask

    // A pair whose groups add up to the indicator exactly.
    task automatic check_at_indicator();
      u64_t gx;
      gx = rand_below(indicator(N) + 1);
      check(gx * m1(N) + rand_below(m1(N)), (indicator(N) - gx) * m1(N) + rand_below(m1(N)));
    endtask

    initial begin
      if (N <= 3) begin
        for (u64_t x = 0; x < range_m(N); x++)
          for (u64_t y = 0; y < range_m(N); y++) check(x, y);
      end else begin
        check(range_m(N) - 1, range_m(N) - 1);
        check(range_m(N) - 1, 1);
        check(range_m(N) - 1, 0);
        check(0, 0);
        for (int i = 0; i < 10000; i++) begin
          check(rand_below(range_m(N)), rand_below(range_m(N)));
          check_at_indicator();
          check(range_m(N) - 1 - rand_below(3 * m1(N)), rand_below(3 * m1(N)));
        end
      end
      done++;
    end
  end

  initial begin
    wait (done == NUM);
    $display("cases: above=%0d below=%0d equal_ov=%0d equal_no_ov=%0d", n_above, n_below, n_eq_ov, n_eq_no);
    if (n_above == 0 || n_below == 0 || n_eq_ov == 0 || n_eq_no == 0) begin
      failures++;
      $display("a decision case never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
