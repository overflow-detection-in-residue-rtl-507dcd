// Testbench for group_adder: s must equal gx + gy (2n+1 bits). n = 3 is
// exhaustive; n = 16 (default) uses random groups plus pairs chosen so that the
// low half carries (high result taken from the carry-in-1 adder) and so that
// the full sum carries into bit 2n. Both select paths are counted.
module group_adder_tb;

  localparam int NUM = 2;
  localparam int NS [NUM] = '{3, 16};

  int checks = 0;
  int failures = 0;
  int done = 0;
  int low_carry = 0;
  int no_low_carry = 0;

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar k = 0; k < NUM; k++) begin : g_n
    localparam int N = NS[k];
    logic [2*N-1:0] gx, gy;
    logic [2*N:0]   s;

    group_adder #(.N(N)) dut (.gx(gx), .gy(gy), .s(s));

    task automatic check();
      longint unsigned expect_v;
      #1;
      expect_v = longint'(gx) + longint'(gy);
      if (longint'(gx[N-1:0]) + longint'(gy[N-1:0]) >= (longint'(1) << N)) low_carry++;
      else no_low_carry++;
      checks++;
      if (longint'(s) != expect_v) begin
        failures++;
        if (failures < 10) $display("N=%0d gx=%h gy=%h got %h expected %h", N, gx, gy, s, expect_v);
      end
    endtask

    initial begin
      if (N <= 4) begin
        for (int i = 0; i < (1 << (2 * N)); i++)
          for (int j = 0; j < (1 << (2 * N)); j++) begin
            gx = (2*N)'(i); gy = (2*N)'(j); check();
          end
      end else begin
        gx = '1; gy = '1; check();
        gx = '1; gy = 1; check();
        gx = {{N{1'b0}}, {N{1'b1}}}; gy = 1; check();
        for (int i = 0; i < 20000; i++) begin
          gx = (2*N)'({$urandom, $urandom});
          gy = (2*N)'({$urandom, $urandom});
          check();
        end
      end
      done++;
    end
  end

  initial begin
    wait (done == NUM);
    if (low_carry == 0 || no_low_carry == 0) begin
      failures++;
      $display("a carry-select path was never used");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
