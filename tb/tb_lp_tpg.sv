// Self-checking testbench for lp_tpg. Two generators run side by side: the
// 16-bit one with 4-bit X and Y slices and the one with 3-bit X and 5-bit Y
// slices. Every cycle their operands are compared with the reference model,
// successive vectors must differ in at most one bit, and the final-load flag
// must come after exactly 2^8 x (number of slices) loads: 2048 and 2560. The
// test is run with pauses of run, then cleared and run again.
module tb_lp_tpg;
  import lp_tpg_model_pkg::*;
  localparam int unsigned N = 16;

  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, run = 1'b0;
  logic [N-1:0] xa, ya, xb, yb, pxa, pya, pxb, pyb;
  logic [7:0] ga, gb;
  logic [7:0] ea;
  logic [9:0] eb;
  logic lasta, lastb;
  int checks = 0, failures = 0;

  lp_tpg #(.N(N), .XSW(4), .YSW(4)) dut_a (.clk, .rst_n, .clr, .run, .x(xa), .y(ya), .gray(ga), .e(ea), .last(lasta));
  lp_tpg #(.N(N), .XSW(3), .YSW(5)) dut_b (.clk, .rst_n, .clr, .run, .x(xb), .y(yb), .gray(gb), .e(eb), .last(lastb));

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tpg_model ma, mb;
    int loads, fin_a, fin_b;
    bit fa, fb;
    ma = new(N, 4, 4);
    mb = new(N, 3, 5);
    check(ma.nvec() == 256 * N / 2, "test set size 256 x N/2");
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int pass = 0; pass < 2; pass++) begin
      clr = 1'b1;
      @(negedge clk);
      clr = 1'b0;
      ma.clear();
      mb.clear();
      loads = 0;
      fin_a = -1;
      fin_b = -1;
      check(xa == 0 && ya == 0 && xb == 0 && yb == 0, "cleared operands");
      while (fin_b < 0) begin
        run = (pass == 0) ? ($urandom_range(0, 7) != 0) : 1'b1;
        pxa = xa; pya = ya; pxb = xb; pyb = yb;
        #1;
        check($countones(ea) == (run ? 1 : 0) && $countones(eb) == (run ? 1 : 0), "one enable at a time");
        if (run) begin
          check(lasta == (loads == ma.nvec() - 1), "last flag of 4/4 generator");
          check(lastb == (loads == mb.nvec() - 1), "last flag of 3/5 generator");
        end
        @(posedge clk);
        if (run) begin
          fa = ma.step();
          fb = mb.step();
          loads++;
          if (fa && fin_a < 0) fin_a = loads;
          if (fb && fin_b < 0) fin_b = loads;
        end
        @(negedge clk);
        check(xa == ma.x[N-1:0] && ya == ma.y[N-1:0], "4/4 operands");
        check(xb == mb.x[N-1:0] && yb == mb.y[N-1:0], "3/5 operands");
        check($countones({xa, ya} ^ {pxa, pya}) <= 1, "4/4 one-bit change");
        check($countones({xb, yb} ^ {pxb, pyb}) <= 1, "3/5 one-bit change");
      end
      run = 1'b0;
      check(fin_a == 2048, "4/4 test length 2048");
      check(fin_b == 2560, "3/5 test length 2560");
      $display("pass %0d: 4/4 generator %0d loads, 3/5 generator %0d loads", pass, fin_a, fin_b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
