// tb_gf_mul: exhaustive check of the GF(2^M) multiplier.
//
// Two instances: the default GF(2^8) field (0x11D) and GF(2^4) (0x13). Every pair
// of operands is applied and the product compared with the log/antilog reference
// of gf_ref_pkg. The powers alpha^0..alpha^8 = 1, 2, 4, ..., 128, 29 of the
// GF(2^8) field are also checked by repeated multiplication by alpha.
module tb_gf_mul;
  import gf_ref_pkg::*;

  int checks = 0;
  int failures = 0;

  logic [7:0] a8, b8, p8;
  logic [3:0] a4, b4, p4;

  gf_mul dut8 (.a(a8), .b(b8), .p(p8));
  gf_mul #(.M(4), .PRIM(5'h13)) dut4 (.a(a4), .b(b4), .p(p4));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    gf_ref r8, r4;
    int pw;
    static int exp_alpha[9] = '{1, 2, 4, 8, 16, 32, 64, 128, 29};
    r8 = new(8, 'h11D);
    r4 = new(4, 'h13);
    for (int a = 0; a < 256; a++) begin
      for (int b = 0; b < 256; b++) begin
        a8 = 8'(a);
        b8 = 8'(b);
        #1;
        checks++;
        if (int'(p8) != r8.mul(a, b)) begin
          failures++;
          if (failures < 10) $display("GF256 %0d*%0d = %0d, expected %0d", a, b, p8, r8.mul(a, b));
        end
      end
    end
    for (int a = 0; a < 16; a++) begin
      for (int b = 0; b < 16; b++) begin
        a4 = 4'(a);
        b4 = 4'(b);
        #1;
        checks++;
        if (int'(p4) != r4.mul(a, b)) begin
          failures++;
          if (failures < 10) $display("GF16 %0d*%0d = %0d, expected %0d", a, b, p4, r4.mul(a, b));
        end
      end
    end
    pw = 1;
    for (int k = 0; k <= 8; k++) begin
      checks++;
      if (pw != exp_alpha[k]) begin
        failures++;
        $display("alpha^%0d = %0d, expected %0d", k, pw, exp_alpha[k]);
      end
      a8 = 8'(pw);
      b8 = 8'd2;
      #1;
      pw = int'(p8);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
