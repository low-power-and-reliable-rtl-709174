// sub_pkg: types and helpers shared by the approximate subtractor datapaths.
//
// cell_kind_e names the three 1-bit subtractor cells the datapaths can use:
// the exact full subtractor and the two approximate cells, Proposed-1 and
// Proposed-2. repl_pattern_e names the four ways of placing approximate
// cells in the non-restoring array divider (vertical, horizontal, square and
// triangular). The four pattern names come from the source design; how each
// pattern maps onto cells (row_depth below) is this implementation's
// definition.
//
// Every divider pattern here makes a number of the least significant cells
// of a row approximate, so a pattern reduces to one depth per row:
//   VERTICAL   : the DEPTH least significant columns of every row
//   HORIZONTAL : every cell of the DEPTH bottom rows
//   SQUARE     : the DEPTH x DEPTH corner of bottom rows and low columns
//   TRIANGLE   : the corner triangle with legs of DEPTH cells, i.e. the row
//                k rows above the bottom gets DEPTH-k approximate cells
package sub_pkg;

  typedef enum logic [1:0] {
    CELL_EXACT     = 2'd0,
    CELL_PROPOSED1 = 2'd1,
    CELL_PROPOSED2 = 2'd2
  } cell_kind_e;

  typedef enum logic [1:0] {
    PAT_VERTICAL   = 2'd0,
    PAT_HORIZONTAL = 2'd1,
    PAT_SQUARE     = 2'd2,
    PAT_TRIANGLE   = 2'd3
  } repl_pattern_e;

  // Number of approximate cells (counted from the LSB) in divider row `row`
  // (0 = top row, which produces the quotient MSB) of a divider with `rows`
  // rows of `width` cells.
  function automatic int unsigned row_depth(repl_pattern_e pat, int unsigned depth,
                                            int unsigned row, int unsigned rows,
                                            int unsigned width);
    int unsigned from_bottom;
    int unsigned d;
    from_bottom = rows - 1 - row;
    case (pat)
      PAT_VERTICAL:   d = depth;
      PAT_HORIZONTAL: d = (from_bottom < depth) ? width : 0;
      PAT_SQUARE:     d = (from_bottom < depth) ? depth : 0;
      default:        d = (from_bottom < depth) ? depth - from_bottom : 0;
    endcase
    return (d > width) ? width : d;
  endfunction

endpackage
