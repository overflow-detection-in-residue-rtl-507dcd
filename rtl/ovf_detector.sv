// Overflow detector for the addition of two unsigned RNS numbers,
// moduli set {2^n-1, 2^n, 2^n+1}, dynamic range M = 2^3n - 2^n.
//
// X, Y and their RNS sum Z = |X+Y|_M are each mapped to a group
// G = floor(value / (2^n+1)) by a grouping unit. With I = 2^2n - 2^n - 1 (one
// less than the number of groups):
//   G(X)+G(Y) >  I               -> overflow
//   G(X)+G(Y) <  I               -> no overflow
//   G(X)+G(Y) == I and G(Z) == 0 -> overflow (the sum wrapped into group 0)
//   G(X)+G(Y) == I otherwise     -> no overflow
// The sum of groups comes from the carry-select group adder; the indicator
// comparator gives its order against I as a sign bit, an equality comparator
// tests S == I and another tests G(Z) == 0. A 2-input MUX, selected by
// S == I, passes either "S > I" (the inverted sign) or "G(Z) == 0".
//
// Interface: residues of X, Y and Z (x3/x2: N bits, x1: N+1 bits; valid
// residues only) -> ov. Timing: purely combinational.
module ovf_detector #(
  parameter int unsigned N = rns_ovf_pkg::N_DEFAULT
) (
  input  logic [N-1:0] x3,
  input  logic [N-1:0] x2,
  input  logic [N:0]   x1,
  input  logic [N-1:0] y3,
  input  logic [N-1:0] y2,
  input  logic [N:0]   y1,
  input  logic [N-1:0] z3,
  input  logic [N-1:0] z2,
  input  logic [N:0]   z1,
  output logic         ov
);

  // I = 2^2n - 2^n - 1 = 0 1...1 0 1...1 (n-1 ones, a zero, n ones).
  localparam logic [2*N:0] INDICATOR = {1'b0, {(N-1){1'b1}}, 1'b0, {N{1'b1}}};

  logic [2*N-1:0] gx;
  logic [2*N-1:0] gy;
  logic [2*N-1:0] gz;
  logic [2*N:0]   gsum;
  logic           sign;
  logic           at_indicator;
  logic           gz_zero;

  grouping_unit #(.N(N)) u_group_x (.x3(x3), .x2(x2), .x1(x1), .g(gx));
  grouping_unit #(.N(N)) u_group_y (.x3(y3), .x2(y2), .x1(y1), .g(gy));
  grouping_unit #(.N(N)) u_group_z (.x3(z3), .x2(z2), .x1(z1), .g(gz));

  group_adder #(.N(N)) u_gadd (
    .gx (gx),
    .gy (gy),
    .s  (gsum)
  );

  indicator_comparator #(.N(N)) u_cmp (
    .s    (gsum),
    .sign (sign)
  );

  eq_comparator #(.WIDTH(2 * N + 1)) u_is_ind (
    .a  (gsum),
    .b  (INDICATOR),
    .eq (at_indicator)
  );

  eq_comparator #(.WIDTH(2 * N)) u_is_zero (
    .a  (gz),
    .b  ('0),
    .eq (gz_zero)
  );

  assign ov = at_indicator ? gz_zero : ~sign;

endmodule
