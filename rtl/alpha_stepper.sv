// alpha_stepper: generator of the Chien search trial points x = alpha^j.
//
// A two-input multiplexer picks either the constant 1 (ctr = 0) or the register's own
// output (ctr = 1); the pick is multiplied by alpha and stored in the register D on the
// rising clock edge. So one clock with ctr low starts the search at x = alpha^1, and
// each later clock with ctr high advances x to the next power: alpha^2, alpha^3, ...,
// wrapping to alpha^0 = 1 after 2^M - 1 steps. Keeping ctr low holds x at alpha.
//
// The mux, the alpha multiplier and the register follow the datapath drawings of the
// design; which mux input ctr selects is read from the simulated waveforms (ctr low for
// the first clock, then the values for alpha^1, alpha^2, ...). The asynchronous
// active-low reset that clears the register to 0 is this design's choice; it gives the
// power-up state in which the evaluator outputs the constant coefficient.
//
// Timing: x changes only on the rising edge of clk; one new trial point per clock.
module alpha_stepper #(
  parameter int unsigned M    = chien_pkg::RS255_M,
  parameter logic [M:0]  PRIM = chien_pkg::RS255_PRIM
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ctr,
  output logic [M-1:0] x
);

  localparam logic [M-1:0] ONE   = M'(1);
  localparam logic [M-1:0] ALPHA = M'(2);

  logic [M-1:0] mux_o;
  logic [M-1:0] nxt;

  assign mux_o = ctr ? x : ONE;

  gf_mul #(.M(M), .PRIM(PRIM)) u_alpha_mul (
    .a(mux_o),
    .b(ALPHA),
    .p(nxt)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) x <= '0;
    else        x <= nxt;
  end

endmodule
