// tb_pair_term: checks one factored term (hi*x + lo) * pw.
//
// Two instances, with and without the power multiplier, driven with random
// operands in GF(2^8); the result is compared with the reference arithmetic.
module tb_pair_term;
  import gf_ref_pkg::*;

  int checks = 0;
  int failures = 0;

  logic [7:0] x, hi, lo, pw, t1, t0;

  pair_term dut1 (.x(x), .hi(hi), .lo(lo), .pw(pw), .term(t1));
  pair_term #(.HAS_POW(1'b0)) dut0 (.x(x), .hi(hi), .lo(lo), .pw(pw), .term(t0));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    gf_ref r;
    int lin;
    r = new(8, 'h11D);
    for (int i = 0; i < 5000; i++) begin
      x = 8'($urandom);
      hi = 8'($urandom);
      lo = 8'($urandom);
      pw = 8'($urandom);
      #1;
      lin = r.mul(int'(hi), int'(x)) ^ int'(lo);
      checks += 2;
      if (int'(t1) != r.mul(lin, int'(pw))) begin
        failures++;
        if (failures < 10) $display("with power: got %0d expected %0d", t1, r.mul(lin, int'(pw)));
      end
      if (int'(t0) != lin) begin
        failures++;
        if (failures < 10) $display("without power: got %0d expected %0d", t0, lin);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
