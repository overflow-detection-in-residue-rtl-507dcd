// Testbench for indicator_comparator: sign must be 1 exactly when the sum of
// groups S is below I = 2^2n - 2^n - 1. n = 2, 3 and 4 are exhaustive over all
// 2n+1-bit S; n = 16 (default) uses random S, every S within 3 of I, and S
// with all-ones low blocks so that both values of the right-block carry
// (alpha) occur together with both left-block cases.
module indicator_comparator_tb;
  import rns_ref_pkg::*;

  localparam int NUM = 4;
  localparam int NS [NUM] = '{2, 3, 4, 16};

  int checks = 0;
  int failures = 0;
  int done = 0;
  int alpha_hits = 0;

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar k = 0; k < NUM; k++) begin : g_n
    localparam int N = NS[k];
    logic [2*N:0] s;
    logic         sign;

    indicator_comparator #(.N(N)) dut (.s(s), .sign(sign));

    task automatic check(u64_t v);
      s = (2*N+1)'(v);
      #1;
      if (&s[N-1:0]) alpha_hits++;
      checks++;
      if (sign !== (u64_t'(s) < indicator(N))) begin
        failures++;
        if (failures < 10) $display("N=%0d S=%0d got sign %b (I=%0d)", N, s, sign, indicator(N));
      end
    endtask

    initial begin
      if (N <= 4) begin
        for (u64_t v = 0; v < (u64_t'(1) << (2 * N + 1)); v++) check(v);
      end else begin
        for (longint d = -3; d <= 3; d++) check(u64_t'(longint'(indicator(N)) + d));
        for (int i = 0; i < 20000; i++) begin
          u64_t v;
          v = rand_below(u64_t'(1) << (2 * N + 1));
          check(v);
          check(v | m3(N));                          // alpha = 1
          check((v & ~(u64_t'(1) << N)) | m3(N));    // alpha = 1, S[n] = 0
        end
      end
      done++;
    end
  end

  initial begin
    wait (done == NUM);
    if (alpha_hits == 0) begin
      failures++;
      $display("alpha = 1 never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
