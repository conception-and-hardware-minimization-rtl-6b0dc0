// gf_mul: combinational multiplier in GF(2^M).
//
// This is the multiplier symbol of the Chien search datapath. The product is formed
// by shift-and-add: operand a is doubled (multiplied by alpha) once per bit of b, with
// the primitive polynomial folded back in whenever the top bit falls out, and the
// doubled copies selected by the bits of b are XORed together. When one operand is a
// constant, synthesis reduces the array to a small XOR network.
//
// Interface: a, b in, p = a * b out, all M bits, purely combinational (no clock).
// PRIM holds the full primitive polynomial including the x^M term; only its low M bits
// are used. The default is the GF(2^8) field of RS(255,239).
module gf_mul #(
  parameter int unsigned M    = chien_pkg::RS255_M,
  parameter logic [M:0]  PRIM = chien_pkg::RS255_PRIM
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic [M-1:0] p
);

  always_comb begin
    logic [M-1:0] acc;
    logic [M-1:0] sh;
    acc = '0;
    sh  = a;
    for (int i = 0; i < int'(M); i++) begin
      if (b[i]) acc ^= sh;
      sh = sh[M-1] ? ((sh << 1) ^ PRIM[M-1:0]) : (sh << 1);
    end
    p = acc;
  end

endmodule
