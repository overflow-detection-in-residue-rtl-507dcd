// Testbench for mod_m3_corrector: r must be the residue of the signed input
// modulo 2^n-1, in 0 .. 2^n-2. Both forms are tested at n = 4 (every input of
// their range) and n = 16 (default; random inputs and the range ends):
//   with the exception MUX, d in -2^n .. 2^n-2 (the range of x3 - x1);
//   without it,             d in -(2^n-1) .. 2^n-2 (the range of A'' - B').
// The reference is the integer remainder, made non-negative.
module mod_m3_corrector_tb;

  localparam int NUM = 4;
  localparam int NS [NUM] = '{4, 4, 16, 16};
  localparam bit EX [NUM] = '{1'b1, 1'b0, 1'b1, 1'b0};

  int checks = 0;
  int failures = 0;
  int done = 0;
  int exceptions = 0;

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar k = 0; k < NUM; k++) begin : g_n
    localparam int N = NS[k];
    localparam bit E = EX[k];
    localparam longint M3 = (longint'(1) << N) - 1;
    localparam longint LO = E ? -(longint'(1) << N) : -M3;
    localparam longint HI = M3 - 1;

    logic [N:0]   d;
    logic [N-1:0] r;

    mod_m3_corrector #(.N(N), .EXCEPTION_MUX(E)) dut (.d(d), .r(r));

    task automatic check(longint v);
      longint expect_v;
      d = (N+1)'(v);
      #1;
      expect_v = v % M3;
      if (expect_v < 0) expect_v += M3;
      if (v == -(longint'(1) << N)) exceptions++;
      checks++;
      if (longint'(r) != expect_v) begin
        failures++;
        if (failures < 10) $display("N=%0d E=%0d d=%0d got %0d expected %0d", N, E, v, r, expect_v);
      end
    endtask

    initial begin
      if (N <= 8) begin
        for (longint v = LO; v <= HI; v++) check(v);
      end else begin
        check(LO); check(LO + 1); check(-1); check(0); check(HI); check(HI - 1);
        for (int i = 0; i < 20000; i++)
          check(LO + longint'(64'($urandom) % 64'(HI - LO + 1)));
      end
      done++;
    end
  end

  initial begin
    wait (done == NUM);
    if (exceptions == 0) begin
      failures++;
      $display("the -2^n input was never applied");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
