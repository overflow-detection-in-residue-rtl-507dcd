// Testbench for eq_comparator: eq must be 1 exactly when a == b. Widths 4
// (exhaustive), 16 (default) and 33 (the sum-of-groups width at n = 16).
// Equal words, words differing in one bit at every position, and random
// pairs are applied.
module eq_comparator_tb;

  localparam int NUM = 3;
  localparam int WS [NUM] = '{4, 16, 33};

  int checks = 0;
  int failures = 0;
  int done = 0;

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar k = 0; k < NUM; k++) begin : g_w
    localparam int W = WS[k];
    logic [W-1:0] a, b;
    logic         eq;

    eq_comparator #(.WIDTH(W)) dut (.a(a), .b(b), .eq(eq));

    task automatic check();
      #1;
      checks++;
      if (eq !== (a == b)) begin
        failures++;
        if (failures < 10) $display("W=%0d a=%h b=%h got %b", W, a, b, eq);
      end
    endtask

    initial begin
      if (W <= 4) begin
        for (int i = 0; i < (1 << W); i++)
          for (int j = 0; j < (1 << W); j++) begin
            a = W'(i); b = W'(j); check();
          end
      end
      for (int i = 0; i < 3000; i++) begin
        a = W'({$urandom, $urandom});
        b = a;
        check();
        b = b ^ (W'(1) << $urandom_range(W - 1));
        check();
        b = W'({$urandom, $urandom});
        check();
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
