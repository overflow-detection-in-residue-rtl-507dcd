// Testbench for rns_adder: the residues of Z must be those of (X + Y) mod M.
// X and Y are drawn as binary integers and converted with %; the expected sum
// is formed in binary and converted the same way. n = 3 is exhaustive over all
// pairs; n = 16 (default) is random, with pairs forced near the top of the
// range so that the sum wraps.
module rns_adder_tb;
  import rns_ref_pkg::*;

  localparam int NUM = 2;
  localparam int NS [NUM] = '{3, 16};

  int checks = 0;
  int failures = 0;
  int done = 0;

  initial begin : watchdog
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar k = 0; k < NUM; k++) begin : g_n
    localparam int N = NS[k];
    logic [N-1:0] x3, x2, y3, y2, z3, z2;
    logic [N:0]   x1, y1, z1;

    rns_adder #(.N(N)) dut (.*);

    task automatic check(u64_t x, u64_t y);
      u64_t z;
      x3 = N'(x % m3(N)); x2 = N'(x % m2(N)); x1 = (N+1)'(x % m1(N));
      y3 = N'(y % m3(N)); y2 = N'(y % m2(N)); y1 = (N+1)'(y % m1(N));
      #1;
      z = (x + y) % range_m(N);
      checks++;
      if (u64_t'(z3) != z % m3(N) || u64_t'(z2) != z % m2(N) || u64_t'(z1) != z % m1(N)) begin
        failures++;
        if (failures < 10) $display("N=%0d X=%0d Y=%0d got (%0d,%0d,%0d)", N, x, y, z3, z2, z1);
      end
    endtask

    initial begin
      if (N <= 3) begin
        for (u64_t x = 0; x < range_m(N); x++)
          for (u64_t y = 0; y < range_m(N); y++) check(x, y);
      end else begin
        for (int i = 0; i < 20000; i++) begin
          check(rand_below(range_m(N)), rand_below(range_m(N)));
          check(range_m(N) - 1 - rand_below(1000), rand_below(2000));
        end
      end
      done++;
    end
  end

  initial begin
    wait (done == NUM);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
