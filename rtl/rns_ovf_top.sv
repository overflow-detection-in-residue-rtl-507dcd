// RNS adder with overflow detection, moduli set {2^n-1, 2^n, 2^n+1}.
//
// Two unsigned numbers X, Y in 0 .. M-1 (M = 2^3n - 2^n), given as residues,
// are added channel by channel (rns_adder), and the overflow detector
// (ovf_detector) decides from X, Y and the wrapped sum Z whether X+Y >= M, in
// which case Z = X+Y-M is not the true sum and ov is set. The decision uses
// group numbers floor(value / (2^n+1)) of X, Y and Z, all obtained with n-bit
// and (n+1)-bit logic, and never converts back to binary.
//
// Interface: residues x3, x2, x1 and y3, y2, y1 (x3, x2: N bits, x1: N+1
// bits; must be valid residues) -> sum residues z3, z2, z1 and ov.
// Timing: purely combinational, no clock.
module rns_ovf_top #(
  parameter int unsigned N = rns_ovf_pkg::N_DEFAULT
) (
  input  logic [N-1:0] x3,
  input  logic [N-1:0] x2,
  input  logic [N:0]   x1,
  input  logic [N-1:0] y3,
  input  logic [N-1:0] y2,
  input  logic [N:0]   y1,
  output logic [N-1:0] z3,
  output logic [N-1:0] z2,
  output logic [N:0]   z1,
  output logic         ov
);

  rns_adder #(.N(N)) u_add (
    .x3 (x3), .x2 (x2), .x1 (x1),
    .y3 (y3), .y2 (y2), .y1 (y1),
    .z3 (z3), .z2 (z2), .z1 (z1)
  );

  ovf_detector #(.N(N)) u_det (
    .x3 (x3), .x2 (x2), .x1 (x1),
    .y3 (y3), .y2 (y2), .y1 (y1),
    .z3 (z3), .z2 (z2), .z1 (z1),
    .ov (ov)
  );

endmodule
