// chien_search_block: Chien search for Reed-Solomon (and BCH) decoding, built with a
// reduced number of Galois-field multipliers.
//
// The block tries every field element x = alpha^j, j = 1, 2, ..., as a root of the error
// locator polynomial Lambda. Lambda(alpha^j) = 0 means that the code word symbol at
// position n - j (position i, with x = alpha^-i) is in error. An alpha_stepper makes the
// trial points and a chien_eval computes Lambda(x) in the factored form
// x^7(A x + B) + x^5(C x + D) + x^3(E x + F) + x(G x + H) + I, which needs about half
// the multipliers of the usual one-multiplier-per-coefficient circuit.
//
// Interface (defaults: RS(255,239), GF(2^8) with primitive polynomial 0x11D, degree 8):
//   clk, ctr      the clock and control input of the design. Hold ctr low for at least
//                 one clock to start a search, then high: every clock advances x.
//   rst_n         asynchronous active-low reset (this design's addition); it clears the
//                 x register to 0, so ep shows the constant coefficient until the start.
//   coef          coef[k] is the coefficient of x^k; hold it steady during a search.
//   ep            the 'error position' value Lambda(x) for the x now in the register.
//   root          ep == 0: this design's zero detector marking an error position.
// Timing: after the rising edge that loads alpha^j (the j-th edge counted from the
// first edge with ctr low), ep and root give Lambda(alpha^j) combinationally, one
// value per clock; a whole RS(255,239) search takes 255 clocks. The root flag and the
// reset are this design's choices; the rest follows the design's datapath drawings.
module chien_search_block #(
  parameter int unsigned M    = chien_pkg::RS255_M,
  parameter logic [M:0]  PRIM = chien_pkg::RS255_PRIM,
  parameter int unsigned T    = chien_pkg::RS255_T
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  ctr,
  input  logic [T:0][M-1:0]     coef,
  output logic [M-1:0]          ep,
  output logic                  root
);

  logic [M-1:0] x;

  alpha_stepper #(.M(M), .PRIM(PRIM)) u_stepper (
    .clk  (clk),
    .rst_n(rst_n),
    .ctr  (ctr),
    .x    (x)
  );

  chien_eval #(.M(M), .PRIM(PRIM), .T(T)) u_eval (
    .x   (x),
    .coef(coef),
    .ep  (ep)
  );

  assign root = (ep == '0);

endmodule
