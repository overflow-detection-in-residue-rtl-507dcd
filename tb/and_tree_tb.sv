// Testbench for and_tree: y must equal the reduction AND of the inputs.
// Widths 1, 2, 3, 5, 7, 16 (default) and 17 cover power-of-two trees and trees
// with odd levels. Each width gets all ones, every single-zero pattern and
// random words (random words biased toward ones so both outputs occur).
module and_tree_tb;

  localparam int NUM = 7;
  localparam int WS [NUM] = '{1, 2, 3, 5, 7, 16, 17};

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
    logic [W-1:0] a;
    logic         y;

    and_tree #(.WIDTH(W)) dut (.a(a), .y(y));

    task automatic check();
      logic expect_v;
      #1;
      expect_v = 1'b1;
      for (int i = 0; i < W; i++) expect_v = expect_v & a[i];
      checks++;
      if (y !== expect_v) begin
        failures++;
        if (failures < 10) $display("W=%0d a=%b got %b expected %b", W, a, y, expect_v);
      end
    endtask

    initial begin
      a = '1; check();
      a = '0; check();
      for (int i = 0; i < W; i++) begin
        a = '1; a[i] = 1'b0; check();
      end
      for (int i = 0; i < 2000; i++) begin
        a = W'($urandom) | W'($urandom) | W'($urandom);
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
