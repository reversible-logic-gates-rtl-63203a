// Reversible BCD to Excess-3 code converter.
//
// Excess-3 represents a decimal digit n by the 4-bit value n + 3. For a BCD
// digit {A,B,C,D} (A most significant) the sum reduces to
//   W = A ^ B(C + D)
//   X = B ^ (C + D)
//   Y = ~(C ^ D)
//   Z = ~D
// (for digits 0-9, A and B(C+D) are never both 1, so the xor in W acts as the
// carry OR). That is three xors, one buffer, two inversions, one OR and one
// AND, realised with five URG and three Feynman gates:
//   URG(C,D,0)      R = C + D                     P, Q -> G7, G8
//   FG(C+D,0)       two copies of C + D (the buffer)
//   URG(B,C+D,0)    P = B(C+D)                    Q, R -> G3, G4
//   URG(A,1,B(C+D)) P = W                         Q, R -> G1, G2
//   URG(B,1,C+D)    P = X                         Q, R -> G5, G6
//   URG(C,1,D)      P = C ^ D                     Q, R -> G10, G11
//   FG(C^D,1)       Q = Y                         P    -> G9
//   FG(D,1)         Q = Z                         P    -> G12
// The primary input lines B, C and D each feed more than one gate, as in the
// published circuit. Cost figures: 8 gates, 8 constant inputs, 12 garbage
// outputs.
//
// The gates, their constants and their connections follow the published
// circuit, with one departure: there the first URG hands its top output,
// C AND D, to the buffer, which would make X wrong for the digits 1, 2, 5,
// 6 and 9, and W wrong for 5 and 6. This design takes the gate's R output, C OR D, which the
// conversion needs and which the circuit's operation count (one OR, one AND)
// also implies.
//
// Valid inputs are the BCD digits 0-9; codes 10-15 produce the values of the
// equations above and have no meaning.
//
// Interface: code_in = {A,B,C,D} (BCD), code_out = {W,X,Y,Z} (Excess-3),
// garbage = {G12..G1}. Combinational, no clock.
module bcd2xs3
  import code_conv_pkg::*;
(
  input  code4_t                          code_in,
  output code4_t                          code_out,
  output logic [BCD2XS3_COST.garbage-1:0] garbage
);

  logic a, b, c, d;
  logic c_or_d, or_to_and, or_to_x;  // C + D and its two copies
  logic b_and_or;                    // B(C + D)
  logic c_xor_d;

  assign {a, b, c, d} = code_in;

  urg_gate u_urg_or  (.a(c), .b(d), .c(1'b0),
                      .p(garbage[6]),  .q(garbage[7]),  .r(c_or_d));
  fg_gate  u_fg_buf  (.a(c_or_d), .b(1'b0), .p(or_to_and), .q(or_to_x));
  urg_gate u_urg_and (.a(b), .b(or_to_and), .c(1'b0),
                      .p(b_and_or),    .q(garbage[2]),  .r(garbage[3]));
  urg_gate u_urg_w   (.a(a), .b(1'b1), .c(b_and_or),
                      .p(code_out[3]), .q(garbage[0]),  .r(garbage[1]));
  urg_gate u_urg_x   (.a(b), .b(1'b1), .c(or_to_x),
                      .p(code_out[2]), .q(garbage[4]),  .r(garbage[5]));
  urg_gate u_urg_xor (.a(c), .b(1'b1), .c(d),
                      .p(c_xor_d),     .q(garbage[9]),  .r(garbage[10]));
  fg_gate  u_fg_y    (.a(c_xor_d), .b(1'b1), .p(garbage[8]),  .q(code_out[1]));
  fg_gate  u_fg_z    (.a(d),       .b(1'b1), .p(garbage[11]), .q(code_out[0]));

endmodule
