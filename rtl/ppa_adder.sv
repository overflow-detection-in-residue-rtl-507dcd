// Parallel prefix (Kogge-Stone) adder: sum = a + b + cin, with carry-out.
//
// Every adder and subtractor of the overflow detector is this unit. The
// carry-in is folded into the prefix tree as an extra generate bit below bit 0,
// so the tree spans WIDTH+1 positions and has ceil(log2(WIDTH+1)) levels. At
// level l each position combines its (generate, propagate) pair with the one
// 2^l positions below it; after the last level g[i] is the carry into bit i.
// Using parallel prefix adders throughout follows the design's delay model;
// the Kogge-Stone network in particular is this implementation's choice.
//
// Interface: a, b (WIDTH bits), cin -> sum (WIDTH bits), cout.
// Timing: purely combinational.
module ppa_adder #(
  parameter int unsigned WIDTH = rns_ovf_pkg::N_DEFAULT
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int unsigned LEVELS = $clog2(WIDTH + 1);

  // Position 0 holds the carry-in, positions 1..WIDTH the operand bits.
  logic [WIDTH:0] g [LEVELS+1];
  logic [WIDTH:0] p [LEVELS+1];

  assign g[0] = {a & b, cin};
  assign p[0] = {a ^ b, 1'b0};

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int unsigned D = 1 << l;
    for (genvar i = 0; i <= WIDTH; i++) begin : g_pos
      if (i >= D) begin : g_merge
        assign g[l+1][i] = g[l][i] | (p[l][i] & g[l][i-D]);
        assign p[l+1][i] = p[l][i] & p[l][i-D];
      end else begin : g_pass
        assign g[l+1][i] = g[l][i];
        assign p[l+1][i] = p[l][i];
      end
    end
  end

  // g[LEVELS][i] is the carry into operand bit i (position i+1).
  assign sum  = p[0][WIDTH:1] ^ g[LEVELS][WIDTH-1:0];
  assign cout = g[LEVELS][WIDTH];

endmodule
