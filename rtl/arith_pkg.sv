// arith_pkg: types shared by the multiplier and the adders.
//
// adder_kind_e selects the adder that performs the last step of the Wallace
// tree multiplier, the addition of the two rows left by the reduction tree.
// The four kinds are the adders this design family is built from: a ripple of
// full adders, the two-level carry look-ahead adder and the Kogge-Stone and
// Brent-Kung parallel prefix adders.
package arith_pkg;

  typedef enum logic [1:0] {
    ADD_RIPPLE = 2'd0,  // chain of full adders
    ADD_CLA    = 2'd1,  // four 4-bit look-ahead blocks and a carry unit (16 bits only)
    ADD_KSA    = 2'd2,  // Kogge-Stone prefix tree
    ADD_BKA    = 2'd3   // Brent-Kung prefix tree (16 bits only)
  } adder_kind_e;

endpackage
