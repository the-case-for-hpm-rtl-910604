// hpm_pkg: constants and elaboration-time helpers shared by the multiplier
// blocks.
//
// The reduction tree compresses the partial-product columns in stages of
// 3:2 full adders (and 2:2 half adders). The logic depth of such a tree
// grows with the logarithm of the tallest column: a column of height h needs
// as many adder levels as it takes the series 2, 3, 4, 6, 9, 13, 19, 28, 42,
// 63, 94, ... (each term the previous one times 3/2, rounded down) to reach
// h. These are the depth steps listed for the tree in the design's depth
// table; the functions below give them to the RTL and the testbenches.
package hpm_pkg;

  // Height limit after the last j adder levels counted from the tree's
  // output: 2 for j = 0, then floor(3/2 * previous).
  function automatic int unsigned stage_limit(input int unsigned j);
    int unsigned d;
    d = 2;
    for (int unsigned k = 0; k < j; k++) d = (d * 3) / 2;
    return d;
  endfunction

  // Number of full-adder levels needed to reduce a column of height h to
  // two rows (0 when h <= 2).
  function automatic int unsigned tree_depth(input int unsigned h);
    int unsigned j;
    j = 0;
    while (stage_limit(j) < h) j++;
    return j;
  endfunction

  // Logic depth for a column holding at most A adders (depth table of the
  // design): a column with A adders starts out A + 2 signals high.
  function automatic int unsigned depth_for_adders(input int unsigned a);
    return tree_depth(a + 2);
  endfunction

endpackage
