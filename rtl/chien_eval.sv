// chien_eval: evaluation of the error locator polynomial Lambda(x) in factored form.
//
// Instead of one multiplier per coefficient, the polynomial of degree T is regrouped
// into pairs of neighbouring coefficients, Lambda = sum_k x^p(k) * (Hi_k x + Lo_k) (+ c0),
// with odd powers x, x^3, ..., x^(T-1) for even T (the constant coefficient is added
// on its own) and even powers 1, x^2, ..., x^(T-1) for odd T. For T = 8 this is
//   Lambda = x^7(A x + B) + x^5(C x + D) + x^3(E x + F) + x(G x + H) + I
// and for T = 3 it is x^2(A x + B) + (C x + D). The power_chain makes the powers, one
// pair_term per pair forms each product, and a chain of XORs adds the terms, in the
// order the degree-8 drawing shows (highest pair first, constant last).
//
// Interface: x and coef in, ep = Lambda(x) out. coef[k] is the coefficient of x^k, so
// coef[T] is A and coef[0] is the constant term. Purely combinational; a lower-degree
// polynomial is evaluated by setting its unused upper coefficients to zero.
module chien_eval #(
  parameter int unsigned M    = chien_pkg::RS255_M,
  parameter logic [M:0]  PRIM = chien_pkg::RS255_PRIM,
  parameter int unsigned T    = chien_pkg::RS255_T
) (
  input  logic [M-1:0]          x,
  input  logic [T:0][M-1:0]     coef,
  output logic [M-1:0]          ep
);

  localparam int unsigned NP = (T + 1) / 2;
  localparam bit          EVEN = (T % 2 == 0);

  logic [NP-1:0][M-1:0] pw;
  logic [NP-1:0][M-1:0] term;

  power_chain #(.M(M), .PRIM(PRIM), .T(T)) u_powers (
    .x (x),
    .pw(pw)
  );

  for (genvar k = 0; k < NP; k++) begin : g_pair
    // even T: pair k is (coef[2k+2] x + coef[2k+1]) * x^(2k+1)
    // odd  T: pair k is (coef[2k+1] x + coef[2k])   * x^(2k)
    localparam int unsigned LO = EVEN ? 2 * k + 1 : 2 * k;
    pair_term #(.M(M), .PRIM(PRIM), .HAS_POW(EVEN || k != 0)) u_pair (
      .x   (x),
      .hi  (coef[LO+1]),
      .lo  (coef[LO]),
      .pw  (pw[k]),
      .term(term[k])
    );
  end

  always_comb begin
    logic [M-1:0] acc;
    acc = '0;
    for (int k = int'(NP) - 1; k >= 0; k--) acc ^= term[k];
    if (EVEN) acc ^= coef[0];
    ep = acc;
  end

endmodule
