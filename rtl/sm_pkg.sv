// sm_pkg: constants and helpers shared by the two-minimum searching module.
//
// The comparison bits of a K-input comparator tree are kept in one flat
// vector of K-1 bits, ordered level by level from the leaves upward:
// level 0 holds the K/2 leaf comparisons (c0_0 .. c0_{K/2-1}), level 1 the
// K/4 comparisons above them, and the last bit, index K-2, is the root.
// Within a level, bit j belongs to the j-th comparator from the low-index
// side. cmp_level_offset() gives where a level starts in that vector.
// The default width of 6 bits is this design's choice; the default input
// count of 8 is the configuration the searching module is presented in.
package sm_pkg;

  localparam int unsigned DEFAULT_W = 6;  // magnitude width of one message
  localparam int unsigned DEFAULT_N = 8;  // number of inputs searched

  // Start of tree level `lvl` in the flat comparison vector of a K-input tree.
  function automatic int unsigned cmp_level_offset(int unsigned k, int unsigned lvl);
    return k - (k >> lvl);
  endfunction

endpackage
