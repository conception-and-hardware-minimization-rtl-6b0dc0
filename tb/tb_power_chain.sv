// tb_power_chain: checks the powers of x for even and odd degrees.
//
// Instances for degree 8 and 3 in GF(2^8) and degree 5 and 2 in GF(2^4). For every
// field element x, output k must be x^(2k+1) (even degree) or x^(2k) (odd degree,
// output 0 being 1), compared with the log/antilog reference.
module tb_power_chain;
  import gf_ref_pkg::*;

  int checks = 0;
  int failures = 0;

  logic [7:0]      x8;
  logic [3:0]      x4;
  logic [3:0][7:0] pw8e;
  logic [1:0][7:0] pw8o;
  logic [2:0][3:0] pw4o;
  logic [0:0][3:0] pw4e;

  power_chain #(.T(8)) dut8e (.x(x8), .pw(pw8e));
  power_chain #(.T(3)) dut8o (.x(x8), .pw(pw8o));
  power_chain #(.M(4), .PRIM(5'h13), .T(5)) dut4o (.x(x4), .pw(pw4o));
  power_chain #(.M(4), .PRIM(5'h13), .T(2)) dut4e (.x(x4), .pw(pw4e));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rpow(gf_ref r, int x, int e);
    int v = 1;
    for (int i = 0; i < e; i++) v = r.mul(v, x);
    return v;
  endfunction

  task automatic chk(int got, int want, string what);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 20) $display("%s: got %0d, expected %0d", what, got, want);
    end
  endtask

  initial begin
    gf_ref r8, r4;
    r8 = new(8, 'h11D);
    r4 = new(4, 'h13);
    for (int v = 0; v < 256; v++) begin
      x8 = 8'(v);
      x4 = 4'(v);
      #1;
      for (int k = 0; k < 4; k++) chk(int'(pw8e[k]), rpow(r8, v, 2 * k + 1), $sformatf("T=8 x=%0d k=%0d", v, k));
      for (int k = 0; k < 2; k++) chk(int'(pw8o[k]), rpow(r8, v, 2 * k), $sformatf("T=3 x=%0d k=%0d", v, k));
      if (v < 16) begin
        for (int k = 0; k < 3; k++) chk(int'(pw4o[k]), rpow(r4, v, 2 * k), $sformatf("T=5 x=%0d k=%0d", v, k));
        chk(int'(pw4e[0]), v, $sformatf("T=2 x=%0d", v));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
