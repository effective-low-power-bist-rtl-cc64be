// Self-checking testbench for gray_counter: steps the 8-bit counter through
// two full cycles with random pauses, and checks every value against the
// Gray code of an independent binary count, the one-bit change between
// successive values, the last flag, the wrap to zero and the clear.
module tb_gray_counter;
  localparam int unsigned W = 8;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, en = 1'b0;
  logic [W-1:0] q, prev;
  logic last;
  int unsigned count;
  int checks = 0, failures = 0, steps = 0, wraps = 0;

  gray_counter #(.W(W)) dut (.clk, .rst_n, .clr, .en, .q, .last);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (count=%0d q=%h)", what, count, q);
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
    count = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(q == '0, "reset value");
    while (steps < 2 * (1 << W) + 5) begin
      prev = q;
      en = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (en) begin
        count = (count + 1) % (1 << W);
        steps++;
        if (count == 0) wraps++;
      end
      @(negedge clk);
      check(q == W'(count ^ (count >> 1)), "Gray value");
      check($countones(q ^ prev) == (en ? 1 : 0), "one-bit step");
      check(last == (count == (1 << W) - 1), "last flag");
      if (count == (1 << W) - 1) check(q == W'(1 << (W - 1)), "final code");
    end
    check(wraps == 2, "two wraps");
    en  = 1'b0;
    clr = 1'b1;
    @(negedge clk);
    clr = 1'b0;
    check(q == '0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
