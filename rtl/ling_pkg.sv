// ling_pkg: shared types and elaboration-time helpers for the modified-Ling
// parallel prefix adder.
//
// The adder splits its WIDTH bit columns into an even tree (columns 0,2,4,...)
// and an odd tree (columns 1,3,5,...). Inside each tree, column b is element
// e = b/2, and the elements are combined by a Sklansky (divide-and-conquer)
// prefix network of log2(WIDTH/2) levels. The functions below place the cells of
// that network. They follow the cell placement drawn for the 8-, 16- and 32-bit
// adders. The general rule for other widths is this design's own choice.
package ling_pkg;

  // Which cell finishes an element whose pseudo carry is complete.
  //  CELLSTYLE_FIG_8_16 : a hexagon (real-carry cell) is used wherever the
  //                       pseudo carry is not needed by a later level; where it
  //                       is needed, a full black cell is followed by an AND cell.
  //  CELLSTYLE_FIG_32   : hexagons only on the last level; every earlier finished
  //                       element uses a generate-only grey cell plus an AND cell.
  typedef enum logic [0:0] {
    CELLSTYLE_FIG_8_16 = 1'b0,
    CELLSTYLE_FIG_32   = 1'b1
  } cellstyle_e;

  // Default cell style for a given width, as drawn for 8, 16 and 32 bits.
  function automatic cellstyle_e default_style(input int width);
    return (width >= 32) ? CELLSTYLE_FIG_32 : CELLSTYLE_FIG_8_16;
  endfunction

  // Number of prefix levels of each (odd or even) tree: log2(WIDTH/2).
  function automatic int tree_levels(input int width);
    return $clog2(width / 2);
  endfunction

  // Level after which element e holds its complete pseudo carry (0 for e = 0).
  function automatic int done_level(input int e);
    return $clog2(e + 1);
  endfunction

  // True when element e gets a prefix cell on level l (1-based).
  function automatic bit has_node(input int e, input int l);
    return ((e >> (l - 1)) & 1) == 1;
  endfunction

  // Element that element e is combined with on level l: the last element of the
  // lower half of its 2^l-element block.
  function automatic int partner(input int e, input int l);
    return ((e >> (l - 1)) << (l - 1)) - 1;
  endfunction

  // True when the pseudo carry of element e is an operand of some later level,
  // i.e. e = 2^k - 1 finished before the last level.
  function automatic bit h_reused(input int e, input int levels);
    return (e > 0) && (((e + 1) & e) == 0) && (done_level(e) < levels);
  endfunction

  // True when element e (e >= 1) ends in a hexagon real-carry cell.
  function automatic bit use_hex(input int e, input int levels, input cellstyle_e style);
    if (e == 0) return 1'b0;
    if (style == CELLSTYLE_FIG_32) return done_level(e) == levels;
    return !h_reused(e, levels);
  endfunction

endpackage
