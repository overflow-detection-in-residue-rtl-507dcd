// WIDTH-input AND gate built only from 2-input AND gates in a binary tree.
//
// The detector is costed under the assumption that no gate has more than two
// inputs, so every wide AND (the alpha/beta terms of the indicator comparator,
// the equality and zero tests) is this tree: WIDTH-1 two-input gates in
// ceil(log2 WIDTH) levels. Level l+1 ANDs neighbouring pairs of level l; when a
// level has an odd count its last element passes up unchanged (the handling of
// widths that are not powers of two is this implementation's choice).
//
// Interface: a (WIDTH bits) -> y = &a. WIDTH >= 1.
// Timing: purely combinational.
module and_tree #(
  parameter int unsigned WIDTH = rns_ovf_pkg::N_DEFAULT
) (
  input  logic [WIDTH-1:0] a,
  output logic             y
);

  localparam int unsigned LEVELS = (WIDTH > 1) ? $clog2(WIDTH) : 0;

  // Number of live nodes at a level of the tree.
  function automatic int unsigned nodes(int unsigned level);
    return (WIDTH + (1 << level) - 1) >> level;
  endfunction

  logic [WIDTH-1:0] t [LEVELS+1];

  assign t[0] = a;

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    for (genvar i = 0; i < WIDTH; i++) begin : g_node
      if (i < nodes(l + 1)) begin : g_live
        if (2 * i + 1 < nodes(l)) begin : g_and
          assign t[l+1][i] = t[l][2*i] & t[l][2*i+1];
        end else begin : g_odd
          assign t[l+1][i] = t[l][2*i];
        end
      end else begin : g_idle
        assign t[l+1][i] = 1'b1;
      end
    end
  end

  assign y = t[LEVELS][0];

endmodule
