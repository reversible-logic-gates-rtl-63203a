// Reversible Excess-3 to BCD code converter.
//
// The converter subtracts 3 from an Excess-3 code {A,B,C,D} (A most
// significant). For the valid codes 3-12 the difference reduces to
//   W = A(B + CD)
//   X = ~(B ^ CD)
//   Y = C ^ D
//   Z = ~D
// realised with five URG and three Feynman gates:
//   URG(C,D,0)      P = CD                        Q, R -> G5, G6
//   FG(CD,1)        P = CD, Q = ~CD
//   URG(B,CD,0)     R = B + CD                    P, Q -> G3, G4
//   URG(A,B+CD,0)   P = W                         Q, R -> G1, G2
//   URG(B,1,~CD)    P = X                         Q, R -> G7, G8
//   URG(C,1,D)      P = C ^ D                     Q, R -> G9, G10
//   FG(C^D,0)       Q = Y                         P    -> G11
//   FG(D,1)         Q = Z                         P    -> G12
// The primary input lines B, C and D each feed more than one gate, as in the
// published circuit. Cost figures: 8 gates, 8 constant inputs, 12 garbage
// outputs.
//
// The gates and their connections follow the published circuit, with one
// departure: there the Feynman gate that delivers Y has its second input
// tied to 1, which inverts Y and gives a wrong result for every code. Here
// that input is tied to 0, so the gate passes C ^ D through as a buffer,
// and the circuit has two inversions rather than the three its operation
// count lists.
//
// Codes 0-2 and 13-15 are not Excess-3 digits; they produce the values of
// the equations above and have no meaning.
//
// Interface: code_in = {A,B,C,D} (Excess-3), code_out = {W,X,Y,Z} (BCD),
// garbage = {G12..G1}. Combinational, no clock.
module xs32bcd
  import code_conv_pkg::*;
(
  input  code4_t                          code_in,
  output code4_t                          code_out,
  output logic [XS32BCD_COST.garbage-1:0] garbage
);

  logic a, b, c, d;
  logic c_and_d, cd_to_or, cd_n;  // CD, its copy and its inverse
  logic b_or_cd;                  // B + CD
  logic c_xor_d;

  assign {a, b, c, d} = code_in;

  urg_gate u_urg_and (.a(c), .b(d), .c(1'b0),
                      .p(c_and_d),     .q(garbage[4]),  .r(garbage[5]));
  fg_gate  u_fg_inv  (.a(c_and_d), .b(1'b1), .p(cd_to_or), .q(cd_n));
  urg_gate u_urg_or  (.a(b), .b(cd_to_or), .c(1'b0),
                      .p(garbage[2]),  .q(garbage[3]),  .r(b_or_cd));
  urg_gate u_urg_w   (.a(a), .b(b_or_cd), .c(1'b0),
                      .p(code_out[3]), .q(garbage[0]),  .r(garbage[1]));
  urg_gate u_urg_x   (.a(b), .b(1'b1), .c(cd_n),
                      .p(code_out[2]), .q(garbage[6]),  .r(garbage[7]));
  urg_gate u_urg_xor (.a(c), .b(1'b1), .c(d),
                      .p(c_xor_d),     .q(garbage[8]),  .r(garbage[9]));
  fg_gate  u_fg_y    (.a(c_xor_d), .b(1'b0), .p(garbage[10]), .q(code_out[1]));
  fg_gate  u_fg_z    (.a(d),       .b(1'b1), .p(garbage[11]), .q(code_out[0]));

endmodule
