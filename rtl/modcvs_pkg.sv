// Shared constants of the MODCVS carry look-ahead adder.
//
// The adder is built from four-bit look-ahead slices: a single dynamic
// look-ahead gate spans four bit positions, the practical limit for a
// series NMOS chain in precharged logic. Wider adders chain slices through
// their dual-rail carries. Every dual-rail signal in the design is a pair
// (true rail, complement rail); in the precharge phase (clk low) both
// rails are 0, in the evaluate phase (clk high) exactly one of them is 1.
package modcvs_pkg;

  // Bit positions covered by one look-ahead gate.
  localparam int unsigned SLICE_BITS = 4;

  // Number of slices of the default wide adder (32 bits).
  localparam int unsigned WIDE_SLICES = 8;

  // The two rails of a dual-rail pair are never high together: both are
  // low in precharge (and in evaluate until the gate has switched), and
  // then exactly one of them rises.
  function automatic logic rails_exclusive(input logic t, input logic f);
    return !(t && f);
  endfunction

endpackage
