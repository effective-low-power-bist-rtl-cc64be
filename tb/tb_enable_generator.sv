// Self-checking testbench for enable_generator: runs the 8-enable ring with
// random pauses and clears and checks that exactly one enable is active per
// running cycle, in the order E1..E8, and that the counter advance comes with
// E8 only.
module tb_enable_generator;
  localparam int unsigned NE = 8;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, run = 1'b0;
  logic [NE-1:0] e;
  logic cnt_en;
  int pos;
  int checks = 0, failures = 0, advances = 0;

  enable_generator #(.NE(NE)) dut (.clk, .rst_n, .clr, .run, .e, .cnt_en);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pos = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      run = ($urandom_range(0, 4) != 0);
      clr = ($urandom_range(0, 99) == 0);
      #1;
      checks++;
      if (e !== (run ? NE'(1) << pos : '0)) begin
        failures++;
        $display("FAIL enables %b, expected position %0d run %0d", e, pos, run);
      end
      checks++;
      if (cnt_en !== (run && pos == NE - 1)) begin
        failures++;
        $display("FAIL cnt_en %0d at position %0d", cnt_en, pos);
      end
      if (cnt_en) advances++;
      @(posedge clk);
      if (clr) pos = 0;
      else if (run) pos = (pos + 1) % NE;
    end
    checks++;
    if (advances < 10) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
