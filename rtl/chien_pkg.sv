// chien_pkg: field and code constants shared by the Chien search modules.
//
// The default configuration is the Reed-Solomon RS(255,239) code: 8-bit symbols in
// GF(2^8) and an error locator polynomial of degree up to t = 8. The field is built
// from the primitive polynomial x^8 + x^4 + x^3 + x^2 + 1 (0x11D), the one whose powers
// of alpha run 1, 2, 4, ..., 128, 29. The small worked example, RS(15,11) over GF(2^4)
// with x^4 + x + 1 (0x13) and a degree-2 locator, is given here too so that
// testbenches and users can select it by name.
package chien_pkg;

  // RS(255,239): GF(2^8), t = 8
  localparam int unsigned RS255_M    = 8;
  localparam logic [8:0]  RS255_PRIM = 9'h11D;
  localparam int unsigned RS255_T    = 8;

  // RS(15,11): GF(2^4), t = 2
  localparam int unsigned RS15_M    = 4;
  localparam logic [4:0]  RS15_PRIM = 5'h13;
  localparam int unsigned RS15_T    = 2;

endpackage
