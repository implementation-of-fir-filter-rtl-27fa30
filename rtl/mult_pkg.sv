// mult_pkg: cell kinds of the two's complement array multiplier.
//
// Every cell adds three bits, some of which carry a negative weight, and
// produces a carry bit c (weight 2) and a sum bit s (weight 1):
//   CELL_I   :  2c + s = x + y + z   (plain full adder)
//   CELL_II  :  2c - s = x + y - z   (z and s have negative weight)
//   CELL_IIP :  s - 2c = x - y - z   (y, z and c have negative weight)
package mult_pkg;
  typedef enum logic [1:0] {
    CELL_I   = 2'd0,
    CELL_II  = 2'd1,
    CELL_IIP = 2'd2
  } cell_kind_t;
endpackage
