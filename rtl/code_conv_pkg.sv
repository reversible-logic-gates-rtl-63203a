// Shared types and figures of merit for the reversible 4-bit code converters.
//
// code4_t is the 4-bit code word on every converter port. The input lines
// are named A, B, C, D and the output lines W, X, Y, Z, from the most
// significant bit down: code_in = {A,B,C,D}, code_out = {W,X,Y,Z}.
//
// rev_cost_t records the figures by which reversible circuits are compared:
// the number of reversible gates, the number of constant inputs and the
// number of garbage (unused) outputs. The constants below hold the figures
// of the four converter netlists in this package's companion modules; each
// converter sizes its garbage port from its own entry.
package code_conv_pkg;

  typedef logic [3:0] code4_t;

  typedef struct packed {
    int unsigned gates;
    int unsigned constants;
    int unsigned garbage;
  } rev_cost_t;

  localparam rev_cost_t BIN2GRAY_COST = '{gates: 3, constants: 0, garbage: 3};
  localparam rev_cost_t GRAY2BIN_COST = '{gates: 5, constants: 2, garbage: 3};
  localparam rev_cost_t BCD2XS3_COST  = '{gates: 8, constants: 8, garbage: 12};
  localparam rev_cost_t XS32BCD_COST  = '{gates: 8, constants: 8, garbage: 12};

endpackage
