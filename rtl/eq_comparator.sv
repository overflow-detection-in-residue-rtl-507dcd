// Equality comparator: eq = (a == b).
//
// Each bit pair goes through an XNOR (1 when the bits agree) and the WIDTH
// results are combined by a tree of 2-input AND gates. The detector uses it
// twice: to test whether the sum of groups equals the indicator, and with b
// tied to zero to test whether the group of the sum is zero.
//
// Interface: a, b (WIDTH bits) -> eq.
// Timing: purely combinational.
module eq_comparator #(
  parameter int unsigned WIDTH = rns_ovf_pkg::N_DEFAULT
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic             eq
);

  logic [WIDTH-1:0] same;

  assign same = ~(a ^ b);

  and_tree #(.WIDTH(WIDTH)) u_and (
    .a (same),
    .y (eq)
  );

endmodule
