// Channel-wise RNS adder for the moduli set {2^n-1, 2^n, 2^n+1}:
//   z3 = |x3 + y3| mod 2^n-1,  z2 = |x2 + y2| mod 2^n,  z1 = |x1 + y1| mod 2^n+1.
// Each channel adds in binary and subtracts its modulus once when the sum
// reaches it (operands are valid residues, so one subtraction suffices). The
// result is |X+Y|_M, which wraps silently when X+Y >= M; that wrap is what the
// overflow detector reports. The plain add/compare/subtract structure is this
// design's choice; only the channel-wise rule is fixed by the RNS.
//
// Interface: x3, y3, x2, y2 (N bits), x1, y1 (N+1 bits) -> z3, z2 (N), z1 (N+1).
// Timing: purely combinational.
module rns_adder #(
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
  output logic [N:0]   z1
);

  localparam logic [N:0]   M3 = {1'b0, {N{1'b1}}};            // 2^n - 1
  localparam logic [N+1:0] M1 = {2'b01, {(N-1){1'b0}}, 1'b1}; // 2^n + 1

  logic [N:0]   s3;
  logic [N-1:0] s2;
  logic [N+1:0] s1;
  logic [N:0]   r3;
  logic [N+1:0] r1;

  always_comb begin
    s3 = {1'b0, x3} + {1'b0, y3};
    s2 = x2 + y2;
    s1 = {1'b0, x1} + {1'b0, y1};
    r3 = (s3 >= M3) ? s3 - M3 : s3;
    r1 = (s1 >= M1) ? s1 - M1 : s1;
  end

  assign z3 = r3[N-1:0];
  assign z2 = s2;
  assign z1 = r1[N:0];

endmodule
