// Testbench for grouping_unit: g must equal floor(X / (2^n+1)) for every X in
// the dynamic range. X is drawn as a binary integer, converted to residues with
// the % operator and applied; the group is checked against integer division.
// n = 3 and n = 4 are exhaustive; n = 16 (default) uses random X, the range
// ends, and numbers whose residues make x3 - x1 = -2^n (x3 = 0, x1 = 2^n), the
// one input that needs the MUX of the A' unit.
module grouping_unit_tb;
  import rns_ref_pkg::*;

  localparam int NUM = 3;
  localparam int NS [NUM] = '{3, 4, 16};

  int checks = 0;
  int failures = 0;
  int done = 0;
  int exceptions = 0;

  initial begin : watchdog
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar k = 0; k < NUM; k++) begin : g_n
    localparam int N = NS[k];
    logic [N-1:0]   x3, x2;
    logic [N:0]     x1;
    logic [2*N-1:0] g;

    grouping_unit #(.N(N)) dut (.x3(x3), .x2(x2), .x1(x1), .g(g));

    task automatic check(u64_t x);
      x3 = N'(x % m3(N));
      x2 = N'(x % m2(N));
      x1 = (N+1)'(x % m1(N));
      #1;
      if (x3 == 0 && x1 == (N+1)'(m2(N))) exceptions++;
      checks++;
      if (u64_t'(g) != group_of(x, N)) begin
        failures++;
        if (failures < 10) $display("N=%0d X=%0d got %0d expected %0d", N, x, g, group_of(x, N));
      end
    endtask

    initial begin
      if (N <= 4) begin
        for (u64_t x = 0; x < range_m(N); x++) check(x);
      end else begin
        check(0); check(range_m(N) - 1); check(m1(N)); check(m1(N) - 1);
        // X = 2^n (2^n-1) * t: x3 = 0, and x1 = 2^n when t is chosen below.
        for (u64_t x = 0; x < range_m(N); x += m3(N)) begin
          if (x % m1(N) == m2(N)) begin
            check(x);
            if (exceptions > 20) break;
          end
        end
        for (int i = 0; i < 30000; i++) check(rand_below(range_m(N)));
      end
      done++;
    end
  end

  initial begin
    wait (done == NUM);
    if (exceptions == 0) begin
      failures++;
      $display("x3 - x1 = -2^n never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
