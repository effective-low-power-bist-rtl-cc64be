// Self-checking testbench for bist_controller: the pattern generator's
// final-load flag is emulated after a chosen number of run cycles, and the
// controller's outputs are compared with the expected sequence: one clear
// cycle, run cycles with accumulation, one drain cycle with done, idle. A
// start during a test is ignored; starts in idle are accepted.
module tb_bist_controller;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, tpg_last = 1'b0;
  logic clr, tpg_run, acc_en, busy, done;
  int checks = 0, failures = 0;
  int runs;

  bist_controller dut (.clk, .rst_n, .start, .tpg_last, .clr, .tpg_run, .acc_en, .busy, .done);

  always #5 clk = ~clk;

  task automatic expect_out(bit c, bit r, bit a, bit b, bit d, string what);
    checks++;
    if ({clr, tpg_run, acc_en, busy, done} !== {c, r, a, b, d}) begin
      failures++;
      $display("FAIL %s: clr=%0d run=%0d acc_en=%0d busy=%0d done=%0d", what, clr, tpg_run, acc_en, busy, done);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    expect_out(0, 0, 0, 0, 0, "idle after reset");
    for (int t = 0; t < 5; t++) begin
      runs = 1 + $urandom_range(0, 40) + t * 50;
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      expect_out(1, 0, 0, 1, 0, "clear");
      for (int i = 0; i < runs; i++) begin
        @(negedge clk);
        // A start during the test must not disturb it.
        start = (i == 0);
        tpg_last = (i == runs - 1);
        expect_out(0, 1, 1, 1, 0, "run");
      end
      @(negedge clk);
      start = 1'b0;
      tpg_last = 1'b0;
      expect_out(0, 0, 1, 1, 1, "drain");
      @(negedge clk);
      expect_out(0, 0, 0, 0, 0, "idle");
      repeat ($urandom_range(0, 3)) begin
        @(negedge clk);
        expect_out(0, 0, 0, 0, 0, "idle wait");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
