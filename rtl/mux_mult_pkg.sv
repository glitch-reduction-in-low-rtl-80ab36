// Shared definitions for the multiplexer-based multiplier.
//
// The multiplier forms, for every bit position j, the term
//   Z_j = x_j*Y_j + y_j*X_j
// where X_j and Y_j are the j low-order bits of the operands. Z_j is picked
// by a 4-to-1 multiplexer controlled by the bit pair {x_j, y_j}:
//   {0,0} -> 0,  {0,1} -> X_j,  {1,0} -> Y_j,  {1,1} -> S_j = X_j + Y_j.
// This is the document's truth table for Z_j; the enum below names the four
// select codes so the cells and the testbenches use the same encoding.
package mux_mult_pkg;

  typedef enum logic [1:0] {
    ZSEL_ZERO = 2'b00,  // x_j = 0, y_j = 0 : Z_j = 0
    ZSEL_X    = 2'b01,  // x_j = 0, y_j = 1 : Z_j = X_j
    ZSEL_Y    = 2'b10,  // x_j = 1, y_j = 0 : Z_j = Y_j
    ZSEL_SUM  = 2'b11   // x_j = 1, y_j = 1 : Z_j = X_j + Y_j
  } zsel_e;

endpackage
