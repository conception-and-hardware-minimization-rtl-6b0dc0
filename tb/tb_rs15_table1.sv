// tb_rs15_table1: the RS(15,11) worked example over GF(2^4) (x^4 + x + 1).
//
// The block is built with M = 4, T = 2 and fed Lambda(x) = 14 x^2 + 14 x + 1. Stepping
// x = alpha^-14, alpha^-13, ..., alpha^-0 (which equals alpha^1 .. alpha^15), the
// values must be 3, 13, 12, 3, 15, 0, 14, 13, 14, 15, 2, 2, 0, 12, 1: the two zeros at
// the 6th and 13th steps mark errors at code word positions 9 and 2. The search is run
// twice, to see that it restarts, and ep is checked at every clock.
module tb_rs15_table1;

  int checks = 0;
  int failures = 0;

  logic            clk = 1'b0;
  logic            rst_n;
  logic            ctr;
  logic [2:0][3:0] coef;
  logic [3:0]      ep;
  logic            root;

  chien_search_block #(
    .M   (chien_pkg::RS15_M),
    .PRIM(chien_pkg::RS15_PRIM),
    .T   (chien_pkg::RS15_T)
  ) dut (
    .clk  (clk),
    .rst_n(rst_n),
    .ctr  (ctr),
    .coef (coef),
    .ep   (ep),
    .root (root)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static int sums[15] = '{3, 13, 12, 3, 15, 0, 14, 13, 14, 15, 2, 2, 0, 12, 1};
    int roots[$];
    coef[2] = 4'd14;
    coef[1] = 4'd14;
    coef[0] = 4'd1;
    rst_n = 1'b0;
    ctr = 1'b0;
    #12 rst_n = 1'b1;
    for (int run = 0; run < 2; run++) begin
      ctr = 1'b0;
      roots.delete();
      for (int j = 1; j <= 15; j++) begin
        @(negedge clk);
        ctr = 1'b1;
        checks++;
        if (int'(ep) != sums[j-1]) begin
          failures++;
          $display("run %0d step %0d: Lambda = %0d, expected %0d", run, j, ep, sums[j-1]);
        end
        if (root) roots.push_back(15 - j);
      end
      checks++;
      if (roots != '{9, 2}) begin
        failures++;
        $display("run %0d: error positions %p, expected 9 and 2", run, roots);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
