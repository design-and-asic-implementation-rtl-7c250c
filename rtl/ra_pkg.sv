// ra_pkg: constants shared by the redundant-arithmetic shift-and-add rotator.
//
// DATA_W is the word width of the datapath: 16 bits, the width of the stage-2 comparators.
// Plain words are unsigned and wrap modulo 2^DATA_W. Inside the rotators a value is held in
// borrow-save form, a pair of words (p, n) whose value is p - n, also modulo 2^DATA_W; the
// modules carry the two rails as separate ports or as a local struct so that their width can be
// changed with a parameter. The borrow-save format is this design's choice of redundant number
// system.
package ra_pkg;

  localparam int unsigned DATA_W = 16;

endpackage
