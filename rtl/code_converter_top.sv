// Reversible 4-bit code converter set.
//
// Four independent reversible converters built only from Feynman and URG
// gates, placed side by side: binary to Gray, Gray to binary, BCD to
// Excess-3 and Excess-3 to BCD. Each has its own input, output and garbage
// ports; the top adds no logic of its own and the converters share nothing.
// Chaining bin2gray into gray2bin, or bcd2xs3 into xs32bcd, outside this
// module returns the original code.
//
// All paths are combinational; there is no clock or reset. Code words are
// {A,B,C,D} on the inputs and {W,X,Y,Z} on the outputs, A and W most
// significant. The garbage outputs are the unused outputs of the reversible
// gates and are brought out so that the full output vector of each circuit
// can be observed.
module code_converter_top
  import code_conv_pkg::*;
(
  input  code4_t                          bin_in,
  output code4_t                          gray_out,
  output logic [BIN2GRAY_COST.garbage-1:0] b2g_garbage,

  input  code4_t                          gray_in,
  output code4_t                          bin_out,
  output logic [GRAY2BIN_COST.garbage-1:0] g2b_garbage,

  input  code4_t                          bcd_in,
  output code4_t                          xs3_out,
  output logic [BCD2XS3_COST.garbage-1:0]  b2x_garbage,

  input  code4_t                          xs3_in,
  output code4_t                          bcd_out,
  output logic [XS32BCD_COST.garbage-1:0]  x2b_garbage
);

  bin2gray u_bin2gray (.code_in(bin_in),  .code_out(gray_out), .garbage(b2g_garbage));
  gray2bin u_gray2bin (.code_in(gray_in), .code_out(bin_out),  .garbage(g2b_garbage));
  bcd2xs3  u_bcd2xs3  (.code_in(bcd_in),  .code_out(xs3_out),  .garbage(b2x_garbage));
  xs32bcd  u_xs32bcd  (.code_in(xs3_in),  .code_out(bcd_out),  .garbage(x2b_garbage));

endmodule
