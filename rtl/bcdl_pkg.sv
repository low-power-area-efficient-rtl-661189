// Shared constants for the BEC-based carry-select adders.
//
// ADDER_WIDTH and GROUP_WIDTH are the 64-bit adder's word size and the size
// of its ripple-carry subsections (8 bits), both as described for the design.
// The 16-bit modified carry-select adder splits its word into groups of
// 2, 2, 3, 4 and 5 bits, least significant first; CSLA16_GW holds those widths
// and csla16_lsb() gives the position of a group's lowest bit.
package bcdl_pkg;

  localparam int unsigned ADDER_WIDTH = 64;
  localparam int unsigned GROUP_WIDTH = 8;

  localparam int unsigned CSLA16_GROUPS = 5;
  localparam int unsigned CSLA16_GW [CSLA16_GROUPS] = '{2, 2, 3, 4, 5};

  // Lowest bit index of group g of the 16-bit adder.
  function automatic int unsigned csla16_lsb(int unsigned g);
    int unsigned lsb = 0;
    for (int unsigned i = 0; i < g; i++) lsb += CSLA16_GW[i];
    return lsb;
  endfunction

endpackage
