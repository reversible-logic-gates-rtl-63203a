// Universal Reversible Gate (URG), a 3x3 reversible gate.
//
//   P = C xor (A and B)
//   Q = B
//   R = C xor (A or B)
//
// The gate is a permutation of the eight input patterns. With C tied to 0 it
// delivers A AND B on P and A OR B on R while passing B through on Q, which
// is how the BCD/Excess-3 converters obtain their AND and OR terms; with C
// fed by a live signal it folds an XOR into the same gate.
//
// Interface: single-bit a, b, c in; single-bit p, q, r out. Purely
// combinational, no clock or reset.
module urg_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  always_comb begin
    p = c ^ (a & b);
    q = b;
    r = c ^ (a | b);
  end

endmodule
