// Sign of (S - I) for a 2n+1-bit sum of groups S and the indicator
// I = 2^2n - 2^n - 1, found without a subtractor.
//
// In 2n+2 bits, -I is 1 1 | 0...0 1 | 0...0 1: two ones, then two n-bit
// blocks that each hold the value 1. Adding it to 0 S:
//   right block  S[n-1:0] + 1 carries out    iff alpha      = &S[n-1:0]
//   left block   S[2n-1:n] + 1 + alpha carries out
//                 for alpha = 0 iff beta_n   = &S[2n-1:n]
//                 for alpha = 1 iff beta_n-1 = &S[2n-1:n+1]
//   top bits     S[2n] + 1 + carry, then 0 + 1 + its carry: the sign bit is
//                 NOT(S[2n] OR carry).
// beta_n is formed as beta_n-1 AND S[n], so the wide ANDs are one n-input
// and one (n-1)-input tree of 2-input gates.
//
// Interface: s (2N+1 bits) -> sign: 1 when S < I, 0 when S >= I.
// Equality with I is not resolved here (see eq_comparator). N >= 2.
// Timing: purely combinational.
module indicator_comparator #(
  parameter int unsigned N = rns_ovf_pkg::N_DEFAULT
) (
  input  logic [2*N:0] s,
  output logic         sign
);

  logic alpha;
  logic beta_n;
  logic beta_n1;
  logic carry;

  and_tree #(.WIDTH(N)) u_alpha (
    .a (s[N-1:0]),
    .y (alpha)
  );

  and_tree #(.WIDTH(N - 1)) u_beta_n1 (
    .a (s[2*N-1:N+1]),
    .y (beta_n1)
  );

  assign beta_n = beta_n1 & s[N];
  assign carry  = alpha ? beta_n1 : beta_n;
  assign sign   = ~(s[2*N] | carry);

endmodule
