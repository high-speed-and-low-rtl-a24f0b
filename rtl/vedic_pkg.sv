// vedic_pkg: constants shared by the Vedic multiplier hierarchy.
//
// CSLA_BLOCK is the group width of every carry select adder: the 4-bit carry
// select adder splits into a 2-bit ripple group for bits 1:0 and a duplicated
// 2-bit group for bits 3:2, and the wider adders of the multiplier keep that
// 2-bit grouping (the wider grouping is this design's choice).
package vedic_pkg;
  localparam int unsigned CSLA_BLOCK = 2;
endpackage
