// Shared constants for the RNS overflow detector, moduli set {2^n-1, 2^n, 2^n+1}.
//
// N_DEFAULT is the residue width n used as the default of every module. The
// method itself works for any n >= 2; 16 is this design's choice (it makes the
// n-input AND gates of the comparators 16-input trees).
//
// An RNS number is carried on three ports in every module:
//   x3 : residue modulo m3 = 2^n-1, n bits, 0 .. 2^n-2
//   x2 : residue modulo m2 = 2^n,   n bits, 0 .. 2^n-1
//   x1 : residue modulo m1 = 2^n+1, n+1 bits, 0 .. 2^n
// The dynamic range is M = m1*m2*m3 = 2^3n - 2^n.
package rns_ovf_pkg;

  localparam int unsigned N_DEFAULT = 16;

endpackage
