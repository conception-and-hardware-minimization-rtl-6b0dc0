// tb_chien_eval: checks the factored evaluation of Lambda(x).
//
// Instances for degrees 8, 7, 3 in GF(2^8) and degree 2 in GF(2^4). Random
// polynomials are evaluated at every field element and compared with a plain
// Horner evaluation. The degree-8 polynomial of the design's simulation
// (A..I = 127, 127, 254, 128, 14, 14, 0, 32, 1) must give 254, 163, 63, 4, 160,
// 24, 112, 232, 169, 8, 25, 162, 79, 124, 3 at x = alpha^1 .. alpha^15.
module tb_chien_eval;
  import gf_ref_pkg::*;

  int checks = 0;
  int failures = 0;

  logic [7:0]      x8;
  logic [3:0]      x4;
  logic [8:0][7:0] c8;
  logic [7:0][7:0] c7;
  logic [3:0][7:0] c3;
  logic [2:0][3:0] c2;
  logic [7:0]      e8, e7, e3;
  logic [3:0]      e2;

  chien_eval dut8 (.x(x8), .coef(c8), .ep(e8));
  chien_eval #(.T(7)) dut7 (.x(x8), .coef(c7), .ep(e7));
  chien_eval #(.T(3)) dut3 (.x(x8), .coef(c3), .ep(e3));
  chien_eval #(.M(4), .PRIM(5'h13), .T(2)) dut2 (.x(x4), .coef(c2), .ep(e2));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(int got, int want, string what);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 20) $display("%s: got %0d, expected %0d", what, got, want);
    end
  endtask

  initial begin
    gf_ref r8, r4;
    int p8[], p7[], p3[], p2[];
    static int fig[15] = '{254, 163, 63, 4, 160, 24, 112, 232, 169, 8, 25, 162, 79, 124, 3};
    static int abc[9] = '{127, 127, 254, 128, 14, 14, 0, 32, 1};
    r8 = new(8, 'h11D);
    r4 = new(4, 'h13);
    p8 = new[9];
    p7 = new[8];
    p3 = new[4];
    p2 = new[3];
    // worked degree-8 example: abc[0] is A, the x^8 coefficient
    for (int k = 0; k <= 8; k++) c8[k] = 8'(abc[8 - k]);
    for (int j = 1; j <= 15; j++) begin
      x8 = 8'(r8.apow(j));
      #1;
      chk(int'(e8), fig[j-1], $sformatf("example at alpha^%0d", j));
    end
    for (int trial = 0; trial < 20; trial++) begin
      foreach (p8[k]) begin p8[k] = int'($urandom % 256); c8[k] = 8'(p8[k]); end
      foreach (p7[k]) begin p7[k] = int'($urandom % 256); c7[k] = 8'(p7[k]); end
      foreach (p3[k]) begin p3[k] = int'($urandom % 256); c3[k] = 8'(p3[k]); end
      foreach (p2[k]) begin p2[k] = int'($urandom % 16);  c2[k] = 4'(p2[k]); end
      for (int v = 0; v < 256; v++) begin
        x8 = 8'(v);
        x4 = 4'(v);
        #1;
        chk(int'(e8), r8.eval(p8, v), $sformatf("T=8 x=%0d", v));
        chk(int'(e7), r8.eval(p7, v), $sformatf("T=7 x=%0d", v));
        chk(int'(e3), r8.eval(p3, v), $sformatf("T=3 x=%0d", v));
        if (v < 16) chk(int'(e2), r4.eval(p2, v), $sformatf("T=2 x=%0d", v));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
