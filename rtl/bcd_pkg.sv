// bcd_pkg: types and constants shared by the BCD counter design.
//
// A BCD digit is a 4-bit value that only ever holds 0..9. The package also
// fixes the bit order of the 7-segment bus used between the display
// multiplexer and the top level: bit 0 is segment a, bit 6 is segment g, and
// a 1 means the segment is lit. No timing; declarations only.
package bcd_pkg;

  typedef logic [3:0] bcd_t;

  localparam bcd_t BCD_MAX = 4'd9;

  // Segment bus {g,f,e,d,c,b,a}, active high.
  typedef logic [6:0] seg7_t;

endpackage : bcd_pkg
