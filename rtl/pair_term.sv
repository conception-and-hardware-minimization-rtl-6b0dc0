// pair_term: one factored term (Hi*x + Lo) * x^k of the error locator polynomial.
//
// Two neighbouring coefficients form a first-degree polynomial: Hi is multiplied by x,
// Lo is added (XOR in GF(2^M)), and the sum is multiplied by the power of x supplied by
// the power chain. This is the multiplier-adder-multiplier group that each coefficient
// pair (A/B, C/D, E/F, G/H) feeds in the design's datapath drawings. For the lowest pair
// of an odd-degree polynomial the power is x^0 = 1; HAS_POW = 0 then leaves out the
// second multiplier, as the degree-3 drawing does.
//
// Interface: x, hi, lo, pw in; term out, all M bits. Purely combinational.
module pair_term #(
  parameter int unsigned M       = chien_pkg::RS255_M,
  parameter logic [M:0]  PRIM    = chien_pkg::RS255_PRIM,
  parameter bit          HAS_POW = 1'b1
) (
  input  logic [M-1:0] x,
  input  logic [M-1:0] hi,
  input  logic [M-1:0] lo,
  input  logic [M-1:0] pw,
  output logic [M-1:0] term
);

  logic [M-1:0] hx;
  logic [M-1:0] lin;

  gf_mul #(.M(M), .PRIM(PRIM)) u_hi_mul (
    .a(hi),
    .b(x),
    .p(hx)
  );

  assign lin = hx ^ lo;

  if (HAS_POW) begin : g_pow
    gf_mul #(.M(M), .PRIM(PRIM)) u_pow_mul (
      .a(lin),
      .b(pw),
      .p(term)
    );
  end else begin : g_no_pow
    assign term = lin;
  end

endmodule
