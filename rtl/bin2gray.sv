// Reversible 4-bit binary to Gray code converter.
//
// Gray code changes a single bit between consecutive values. The most
// significant bit passes straight through and every other Gray bit is the
// xor of two neighbouring binary bits:
//   W = A,  X = A ^ B,  Y = B ^ C,  Z = C ^ D
// Each xor is one Feynman gate whose control is the more significant line.
// The control lines also run on to their own output or to the next gate,
// and the P outputs of the gates, copies of A, B and C, leave the circuit
// unused as the garbage lines G1..G3. Cost figures: 3 gates, 0 constant
// inputs, 3 garbage outputs, and the only logic is three xors.
//
// The netlist follows the published circuit gate for gate.
//
// Interface: code_in = {A,B,C,D} (binary), code_out = {W,X,Y,Z} (Gray),
// garbage = {G3,G2,G1}. Combinational, one gate delay, no clock.
module bin2gray
  import code_conv_pkg::*;
(
  input  code4_t                           code_in,
  output code4_t                           code_out,
  output logic [BIN2GRAY_COST.garbage-1:0] garbage
);

  logic a, b, c, d;
  assign {a, b, c, d} = code_in;

  // W: the most significant line goes straight through.
  assign code_out[3] = a;

  fg_gate u_fg1 (.a(a), .b(b), .p(garbage[0]), .q(code_out[2]));  // X, G1
  fg_gate u_fg2 (.a(b), .b(c), .p(garbage[1]), .q(code_out[1]));  // Y, G2
  fg_gate u_fg3 (.a(c), .b(d), .p(garbage[2]), .q(code_out[0]));  // Z, G3

endmodule
