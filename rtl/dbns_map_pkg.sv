// dbns_map_pkg -- shared definitions of the 2-D DBNS map arithmetic.
//
// A number is drawn as a map of cells: cell (row j, column i) stands for
// 2^i * 3^j, and the number is the sum of its active cells. Columns are powers
// of two, rows powers of three, both starting at 0, as in the published
// description. Inside the adder and the multiplier a cell holds a small count
// (0..3) rather than a bit, so that two maps can be laid over each other
// before the result is reduced back to one bit per cell.
//
// rule_t names the rewrite that dbns_reduce_step applied in a cycle:
//   RULE_CARRY  two equal cells 2 * 2^i 3^j      -> one cell 2^(i+1) 3^j
//   RULE_I      2^i 3^j + 2^(i+1) 3^j            -> 2^i 3^(j+1)
//   RULE_II     2^i 3^j + 2^i 3^(j+1)            -> 2^(i+2) 3^j
//   RULE_III    2^i 3^j + 2^(i+1) 3^j + 2^i 3^(j+1) -> 2^(i+1) 3^(j+1)
//   RULE_OVF    a carry would leave the map: the value cannot be held
// The three rules are the published reduction rules; the carry is the
// published treatment of super-imposed cells ("shifted by 1 towards the right
// side of the same row"). The encoding is this design's own.
package dbns_map_pkg;

  typedef enum logic [2:0] {
    RULE_NONE  = 3'd0,
    RULE_CARRY = 3'd1,
    RULE_I     = 3'd2,
    RULE_II    = 3'd3,
    RULE_III   = 3'd4,
    RULE_OVF   = 3'd5
  } rule_t;

  // Value of cell (row j, column i): 2^i * 3^j.
  function automatic longint unsigned cell_value(int j, int i);
    longint unsigned v;
    v = longint'(1) << i;
    for (int k = 0; k < j; k++) v = v * 3;
    return v;
  endfunction

endpackage
