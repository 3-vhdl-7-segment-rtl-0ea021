// ssd_pkg: types shared by the seven-segment display blocks.
//
// A seven-segment pattern is a 7-bit vector ordered g-f-e-d-c-b-a: bit 6 is
// segment g (the middle bar) and bit 0 is segment a (the top bar); a 1 lights
// the segment. The segment map is the standard one: a top, b upper right,
// c lower right, d bottom, e lower left, f upper left, g middle. A BCD digit
// is a 4-bit code holding 0..9.
package ssd_pkg;

  typedef logic [3:0] bcd_t;   // one binary-coded decimal digit, 0..9
  typedef logic [6:0] seg7_t;  // {g,f,e,d,c,b,a}, 1 = segment lit

endpackage
