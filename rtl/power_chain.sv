// power_chain: the powers of x that scale each coefficient pair of the factored
// error locator polynomial.
//
// The polynomial of degree T is split into pairs of neighbouring coefficients, each
// pair forming a first-degree polynomial (Hi*x + Lo) that is multiplied by a power of x:
//   even T:  Lambda = x^(T-1)(A x + B) + ... + x^3(. x + .) + x(. x + .) + c0
//   odd  T:  Lambda = x^(T-1)(A x + B) + ... + x^2(. x + .) + (. x + .)
// so even T needs x, x^3, ..., x^(T-1) and odd T needs 1, x^2, ..., x^(T-1).
// One multiplier squares x; each further power is the previous one times x^2, giving
// T/2 multipliers for even T and (T-1)/2 for odd T, as in the degree-3 and degree-8
// drawings of the design.
//
// Interface: x in; pw[k] out for k = 0 .. (T+1)/2 - 1, where pw[k] = x^(2k+1) for even T
// and x^(2k) for odd T (pw[0] = 1 then and is not used by the evaluator).
// Purely combinational; the depth of the chain grows with T.
module power_chain #(
  parameter int unsigned M    = chien_pkg::RS255_M,
  parameter logic [M:0]  PRIM = chien_pkg::RS255_PRIM,
  parameter int unsigned T    = chien_pkg::RS255_T
) (
  input  logic [M-1:0]               x,
  output logic [(T+1)/2-1:0][M-1:0]  pw
);

  localparam int unsigned NP = (T + 1) / 2;

  if (T < 2) begin : g_bad_degree
    $error("power_chain: degree T must be at least 2");
  end

  logic [M-1:0] sq;

  gf_mul #(.M(M), .PRIM(PRIM)) u_square (
    .a(x),
    .b(x),
    .p(sq)
  );

  if (T % 2 == 0) begin : g_even
    assign pw[0] = x;
    for (genvar k = 1; k < NP; k++) begin : g_step
      gf_mul #(.M(M), .PRIM(PRIM)) u_mul (
        .a(pw[k-1]),
        .b(sq),
        .p(pw[k])
      );
    end
  end else begin : g_odd
    assign pw[0] = M'(1);
    assign pw[1] = sq;
    for (genvar k = 2; k < NP; k++) begin : g_step
      gf_mul #(.M(M), .PRIM(PRIM)) u_mul (
        .a(pw[k-1]),
        .b(sq),
        .p(pw[k])
      );
    end
  end

endmodule
