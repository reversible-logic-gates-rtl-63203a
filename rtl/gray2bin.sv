// Reversible 4-bit Gray code to binary converter.
//
// Each binary bit is the xor of the Gray bit in its position with the
// binary bit just above it, so the conversion ripples down from the most
// significant line:
//   W = A,  X = W ^ B,  Y = X ^ C,  Z = Y ^ D
// X and Y are each needed twice, as an output and as an operand of the next
// xor. A reversible circuit may not fan a signal out, so a Feynman gate with
// its B input tied to 0 makes the second copy. The circuit is a chain of
// five Feynman gates, three xors and two copies, with two constant-0 inputs.
// The P outputs of the three xor gates leave unused as garbage. Cost
// figures: 5 gates, 2 constant inputs, 3 garbage outputs; three xors and
// two buffers.
//
// The chain of five gates, alternating xor and copy, and its two constant-0
// inputs follow the published circuit. That circuit starts its ripple at
// the least significant line; here it starts at A, the most significant
// line as in the other three converters, so that this converter undoes
// bin2gray.
//
// Interface: code_in = {A,B,C,D} (Gray), code_out = {W,X,Y,Z} (binary),
// garbage = {G3,G2,G1}. Combinational; the ripple is five gates deep.
module gray2bin
  import code_conv_pkg::*;
(
  input  code4_t                           code_in,
  output code4_t                           code_out,
  output logic [GRAY2BIN_COST.garbage-1:0] garbage
);

  logic a, b, c, d;
  logic x_raw, x_copy, y_raw, y_copy;

  assign {a, b, c, d} = code_in;
  assign code_out[3] = a;

  // X = A ^ B, then copied so that it can both leave and feed the next xor.
  fg_gate u_fg_x   (.a(b),      .b(a),    .p(garbage[0]),  .q(x_raw));
  fg_gate u_fg_xcp (.a(x_raw),  .b(1'b0), .p(x_copy),      .q(code_out[2]));
  // Y = X ^ C, copied the same way.
  fg_gate u_fg_y   (.a(c),      .b(x_copy), .p(garbage[1]), .q(y_raw));
  fg_gate u_fg_ycp (.a(y_raw),  .b(1'b0), .p(y_copy),      .q(code_out[1]));
  // Z = Y ^ D.
  fg_gate u_fg_z   (.a(y_copy), .b(d),    .p(garbage[2]),  .q(code_out[0]));

endmodule
