// Group adder: s = gx + gy for two 2n-bit group numbers, 2n+1-bit result.
//
// No adder wider than n bits is used. The low halves are added by one n-bit
// adder; the high halves are added twice in parallel, with carry-in 0 and with
// carry-in 1, and the low adder's carry-out selects which high result (n sum
// bits plus its carry-out as bit 2n) is passed on. This is a carry-select
// adder that trades a third adder for a shorter carry path.
//
// Interface: gx, gy (2N bits) -> s (2N+1 bits).
// Timing: purely combinational.
module group_adder #(
  parameter int unsigned N = rns_ovf_pkg::N_DEFAULT
) (
  input  logic [2*N-1:0] gx,
  input  logic [2*N-1:0] gy,
  output logic [2*N:0]   s
);

  logic         c_lo;
  logic [N-1:0] hi0;
  logic [N-1:0] hi1;
  logic         c0;
  logic         c1;

  ppa_adder #(.WIDTH(N)) u_lo (
    .a    (gx[N-1:0]),
    .b    (gy[N-1:0]),
    .cin  (1'b0),
    .sum  (s[N-1:0]),
    .cout (c_lo)
  );

  ppa_adder #(.WIDTH(N)) u_hi0 (
    .a    (gx[2*N-1:N]),
    .b    (gy[2*N-1:N]),
    .cin  (1'b0),
    .sum  (hi0),
    .cout (c0)
  );

  ppa_adder #(.WIDTH(N)) u_hi1 (
    .a    (gx[2*N-1:N]),
    .b    (gy[2*N-1:N]),
    .cin  (1'b1),
    .sum  (hi1),
    .cout (c1)
  );

  assign s[2*N:N] = c_lo ? {c1, hi1} : {c0, hi0};

endmodule
