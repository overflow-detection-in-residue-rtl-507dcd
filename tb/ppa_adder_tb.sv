// Testbench for ppa_adder: {cout, sum} must equal a + b + cin, checked against
// the simulator's own addition. Widths 1, 5 and 16 (the default) are tested;
// width 5 exhaustively over a, b and cin, the others at random and at the
// all-ones/zero corners that make the carry ripple through the whole word.
module ppa_adder_tb;

  localparam int NUM = 3;
  localparam int WS [NUM] = '{1, 5, 16};

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
    logic [W-1:0] a, b, sum;
    logic         cin, cout;

    ppa_adder #(.WIDTH(W)) dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

    task automatic check();
      longint unsigned expect_v;
      #1;
      expect_v = longint'(a) + longint'(b) + longint'(cin);
      checks++;
      if ({cout, sum} !== (W+1)'(expect_v)) begin
        failures++;
        if (failures < 10)
          $display("W=%0d a=%h b=%h cin=%b got %b_%h expected %h", W, a, b, cin, cout, sum, expect_v);
      end
    endtask

    initial begin
      if (W <= 6) begin
        for (int i = 0; i < (1 << W); i++)
          for (int j = 0; j < (1 << W); j++)
            for (int c = 0; c < 2; c++) begin
              a = W'(i); b = W'(j); cin = c[0];
              check();
            end
      end else begin
        a = '1; b = '0; cin = 1'b1; check();
        a = '1; b = '1; cin = 1'b1; check();
        a = '0; b = '0; cin = 1'b0; check();
        a = '1; b = '0; cin = 1'b0; check();
        for (int i = 0; i < 20000; i++) begin
          a = W'($urandom); b = W'($urandom); cin = 1'($urandom);
          check();
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
