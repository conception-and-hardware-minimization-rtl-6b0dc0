// tb_alpha_stepper: checks the trial-point generator of the Chien search.
//
// After reset the register holds 0. One clock with ctr low loads alpha; further
// clocks with ctr low keep it at alpha. With ctr high, clock j (counted from the
// load) must hold alpha^j, wrapping to alpha^0 = 1 after 255 steps. A reset in
// the middle of a run clears the register again. Reference values come from the
// log/antilog tables of gf_ref_pkg.
module tb_alpha_stepper;
  import gf_ref_pkg::*;

  int checks = 0;
  int failures = 0;

  logic       clk = 1'b0;
  logic       rst_n;
  logic       ctr;
  logic [7:0] x;

  alpha_stepper dut (.clk(clk), .rst_n(rst_n), .ctr(ctr), .x(x));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_x(int want, string what);
    checks++;
    if (int'(x) != want) begin
      failures++;
      $display("%s: x = %0d, expected %0d", what, x, want);
    end
  endtask

  initial begin
    gf_ref r;
    r = new(8, 'h11D);
    rst_n = 1'b0;
    ctr = 1'b1;
    #12;
    expect_x(0, "reset");
    @(negedge clk);
    rst_n = 1'b1;
    ctr = 1'b0;
    @(negedge clk);
    expect_x(2, "load");
    repeat (3) begin
      @(negedge clk);
      expect_x(2, "hold with ctr low");
    end
    ctr = 1'b1;
    for (int j = 2; j <= 300; j++) begin
      @(negedge clk);
      expect_x(r.apow(j), $sformatf("step %0d", j));
    end
    // reset during a run
    #1 rst_n = 1'b0;
    #1 expect_x(0, "asynchronous reset");
    @(negedge clk);
    expect_x(0, "held in reset");
    rst_n = 1'b1;
    ctr = 1'b0;
    @(negedge clk);
    ctr = 1'b1;
    expect_x(2, "restart");
    @(negedge clk);
    expect_x(4, "restart step 2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
