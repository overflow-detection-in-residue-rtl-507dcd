// Reduction of a small signed difference modulo m3 = 2^n-1.
//
// Input d is an (n+1)-bit two's complement difference. When it is
// non-negative it is already a residue (0 .. 2^n-2) and 0 is added; when it
// is negative, 2^n-1 is added (the sign bit d[n] ANDed into every offset bit),
// which lifts -(2^n-1) .. -1 to 0 .. 2^n-2. An (n+1)-bit adder forms
// d + offset and its low n bits are the residue.
//
// One input falls outside that rule: d = -2^n (bit pattern 1 0...0), where the
// adder would give the all-ones word, the redundant form of zero, instead of
// the true residue 2^n-2 (1...1 0). With EXCEPTION_MUX = 1 a detector of that
// pattern switches a 2-input MUX to the constant 1...1 0. This is the unit that
// reduces x3 - x1, which can reach -2^n. With EXCEPTION_MUX = 0 the MUX is
// omitted; that is the unit that reduces A'' - B', which never goes below
// -(2^n-1). The two forms also differ in offset bit n (0 in the first, the
// sign bit in the second), which does not reach the n-bit output.
//
// Interface: d (N+1 bits, two's complement) -> r (N bits, 0 .. 2^n-2).
// Timing: purely combinational.
module mod_m3_corrector #(
  parameter int unsigned N             = rns_ovf_pkg::N_DEFAULT,
  parameter bit          EXCEPTION_MUX = 1'b1
) (
  input  logic [N:0]   d,
  output logic [N-1:0] r
);

  logic [N:0]   offset;
  logic [N:0]   s;

  assign offset[N-1:0] = {N{d[N]}};
  assign offset[N]     = EXCEPTION_MUX ? 1'b0 : d[N];

  ppa_adder #(.WIDTH(N + 1)) u_add (
    .a    (d),
    .b    (offset),
    .cin  (1'b0),
    .sum  (s),
    .cout ()
  );

  if (EXCEPTION_MUX) begin : g_exception
    logic is_min;

    // is_min = 1 exactly for d = 1 0...0 (-2^n).
    and_tree #(.WIDTH(N + 1)) u_detect (
      .a ({d[N], ~d[N-1:0]}),
      .y (is_min)
    );

    assign r = is_min ? {{(N-1){1'b1}}, 1'b0} : s[N-1:0];
  end else begin : g_plain
    assign r = s[N-1:0];
  end

endmodule
