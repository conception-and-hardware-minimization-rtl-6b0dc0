// tb_chien_search_block: end-to-end test of the Chien search at its default size,
// RS(255,239) over GF(2^8) with a degree-8 error locator polynomial.
//
// 1. The degree-8 example polynomial (A..I = 127, 127, 254, 128, 14, 14, 0, 32, 1):
//    after reset ep shows I = 1; after the first clock with ctr low and then one value
//    per clock with ctr high, ep must run 254, 163, 63, 4, 160, 24, 112, 232, 169, 8,
//    25, 162, 79, 124, 3.
// 2. Error locator polynomials built from random sets of 1 to 8 error positions e_i
//    (Lambda = prod (1 + alpha^e_i x)), and the error-free Lambda = 1. Over a full
//    search of 255 clocks, ep must equal the Horner reference at every clock and root
//    must be high exactly at clock j = 255 - e_i, i.e. at x = alpha^-e_i.
// Each mechanism of the block is counted: search start (ctr low for one clock), hold
// (ctr low for several clocks), advance, root found, wrap past alpha^255 and reset in
// the middle of a search. One that never happens counts as a failure.
module tb_chien_search_block;
  import gf_ref_pkg::*;

  int checks = 0;
  int failures = 0;

  logic            clk = 1'b0;
  logic            rst_n;
  logic            ctr;
  logic [8:0][7:0] coef;
  logic [7:0]      ep;
  logic            root;

  chien_search_block dut (
    .clk  (clk),
    .rst_n(rst_n),
    .ctr  (ctr),
    .coef (coef),
    .ep   (ep),
    .root (root)
  );

  always #5 clk = ~clk;

  int n_start = 0, n_hold = 0, n_advance = 0, n_root = 0, n_wrap = 0, n_reset = 0;

  initial begin
    repeat (50000) @(posedge clk);
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

  // one clock with ctr low (plus extra hold clocks), then 'steps' advancing clocks;
  // checks ep and root against the reference after every clock
  task automatic search(gf_ref r, int p[], int holds, int steps, ref int hits[$]);
    ctr = 1'b0;
    @(negedge clk);
    n_start++;
    chk(int'(ep), r.eval(p, 2), "value at alpha^1");
    for (int h = 0; h < holds; h++) begin
      @(negedge clk);
      n_hold++;
      chk(int'(ep), r.eval(p, 2), "value while held");
    end
    ctr = 1'b1;
    if (root) hits.push_back(1);
    for (int j = 2; j <= steps; j++) begin
      @(negedge clk);
      n_advance++;
      if (j > 255) n_wrap++;
      chk(int'(ep), r.eval(p, r.apow(j)), $sformatf("value at alpha^%0d", j));
      chk(int'(root), int'(r.eval(p, r.apow(j)) == 0), $sformatf("root flag at alpha^%0d", j));
      if (root && j <= 255) hits.push_back(j);
    end
  endtask

  initial begin
    gf_ref r;
    int p[];
    int xs[];
    int pos[];
    int hits[$];
    int want[$];
    static int fig[15] = '{254, 163, 63, 4, 160, 24, 112, 232, 169, 8, 25, 162, 79, 124, 3};
    static int abc[9] = '{127, 127, 254, 128, 14, 14, 0, 32, 1};
    r = new(8, 'h11D);

    // 1. worked example
    for (int k = 0; k <= 8; k++) coef[k] = 8'(abc[8 - k]);
    rst_n = 1'b0;
    ctr = 1'b0;
    #12;
    n_reset++;
    chk(int'(ep), 1, "after reset");
    @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    n_start++;
    ctr = 1'b1;
    chk(int'(ep), fig[0], "example at alpha^1");
    for (int j = 2; j <= 15; j++) begin
      @(negedge clk);
      n_advance++;
      chk(int'(ep), fig[j-1], $sformatf("example at alpha^%0d", j));
    end

    // reset in the middle of the search
    #1 rst_n = 1'b0;
    #1;
    n_reset++;
    chk(int'(ep), 1, "after reset in a search");
    @(negedge clk);
    rst_n = 1'b1;

    // 2. locator polynomials from known error positions
    for (int trial = 0; trial < 12; trial++) begin
      int nerr;
      nerr = (trial == 0) ? 0 : (trial == 1) ? 8 : 1 + int'($urandom % 8);
      pos = new[nerr];
      xs = new[nerr];
      for (int i = 0; i < nerr; i++) begin
        bit dup;
        do begin
          pos[i] = int'($urandom % 255);
          dup = 1'b0;
          for (int q = 0; q < i; q++) if (pos[q] == pos[i]) dup = 1'b1;
        end while (dup);
        xs[i] = r.apow(pos[i]);
      end
      r.locator(xs, 8, p);
      for (int k = 0; k <= 8; k++) coef[k] = 8'(p[k]);
      hits.delete();
      want.delete();
      foreach (pos[i]) want.push_back(255 - pos[i]);
      want.sort();
      search(r, p, trial % 3, (trial == 2) ? 300 : 255, hits);
      hits.sort();
      checks++;
      if (hits != want) begin
        failures++;
        $display("trial %0d: roots at %p, expected %p", trial, hits, want);
      end
      n_root += hits.size();
    end

    checks++;
    if (n_start == 0 || n_hold == 0 || n_advance == 0 || n_root == 0 || n_wrap == 0 || n_reset == 0) begin
      failures++;
      $display("mechanism not exercised");
    end
    $display("mechanisms: start=%0d hold=%0d advance=%0d root=%0d wrap=%0d reset=%0d",
             n_start, n_hold, n_advance, n_root, n_wrap, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
