// Grouping function: maps an RNS number X = (x3, x2, x1) to its group G(X).
//
// The dynamic range 0 .. 2^3n-2^n-1 is cut into 2^2n-2^n groups of 2^n+1
// consecutive numbers, and G(X) = floor(X / (2^n+1)) is found from residue
// differences alone, without reverse conversion:
//   A'  = |x3 - x1| mod 2^n-1     (PPA subtractor + mod_m3_corrector with MUX)
//   B'  = |x2 - x1| mod 2^n       (n-bit PPA subtractor, low n bits)
//   A'' = A' rotated right by one bit, i.e. A' / 2 modulo 2^n-1
//   d'  = |A'' - B'| mod 2^n-1    (PPA subtractor + mod_m3_corrector, no MUX)
//   G   = d' * 2^n + B'           (concatenation {d', B'}, no logic)
// Why it works: with Q = floor(X/(2^n+1)) and X = Q(2^n+1) + x1, the residues
// give B' = Q mod 2^n and A' = 2Q mod 2^n-1, so A'' = Q mod 2^n-1, and the
// last two steps rebuild Q from those two residues (2^n = 1 mod 2^n-1).
// Subtractions are a + ~b + 1 on a parallel prefix adder.
//
// Interface: x3 (N), x2 (N), x1 (N+1) valid residues -> g (2N bits).
// Timing: purely combinational.
module grouping_unit #(
  parameter int unsigned N = rns_ovf_pkg::N_DEFAULT
) (
  input  logic [N-1:0]   x3,
  input  logic [N-1:0]   x2,
  input  logic [N:0]     x1,
  output logic [2*N-1:0] g
);

  logic [N:0]   a_diff;   // A  = x3 - x1, (n+1)-bit two's complement
  logic [N-1:0] a_res;    // A'
  logic [N-1:0] a_rot;    // A''
  logic [N-1:0] b_res;    // B'
  logic [N:0]   d_diff;   // A'' - B', (n+1)-bit two's complement
  logic [N-1:0] d_res;    // delta'

  ppa_adder #(.WIDTH(N + 1)) u_sub_a (
    .a    ({1'b0, x3}),
    .b    (~x1),
    .cin  (1'b1),
    .sum  (a_diff),
    .cout ()
  );

  mod_m3_corrector #(.N(N), .EXCEPTION_MUX(1'b1)) u_mod_a (
    .d (a_diff),
    .r (a_res)
  );

  // Only the low n bits of x1 matter modulo 2^n.
  ppa_adder #(.WIDTH(N)) u_sub_b (
    .a    (x2),
    .b    (~x1[N-1:0]),
    .cin  (1'b1),
    .sum  (b_res),
    .cout ()
  );

  assign a_rot = {a_res[0], a_res[N-1:1]};

  ppa_adder #(.WIDTH(N + 1)) u_sub_d (
    .a    ({1'b0, a_rot}),
    .b    (~{1'b0, b_res}),
    .cin  (1'b1),
    .sum  (d_diff),
    .cout ()
  );

  mod_m3_corrector #(.N(N), .EXCEPTION_MUX(1'b0)) u_mod_d (
    .d (d_diff),
    .r (d_res)
  );

  assign g = {d_res, b_res};

endmodule
