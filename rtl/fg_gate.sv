// Feynman gate (FG), the 2x2 reversible gate also known as controlled-NOT.
//
// The control input A is passed through unchanged on P, and the target
// output Q is A xor B. The mapping (A,B) -> (P,Q) is a permutation of the
// four input patterns, so the inputs can always be recovered from the
// outputs. Two idioms recur in the converters built from it: with B tied to
// 0 the gate copies A onto both outputs (a reversible fan-out, counted as a
// buffer), and with B tied to 1 it gives A and NOT A.
//
// Interface: single-bit a, b in; single-bit p, q out. Purely
// combinational, one gate delay, no clock or reset.
module fg_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);

  always_comb begin
    p = a;
    q = a ^ b;
  end

endmodule
