// Self-checking testbench for cla_adder: the 32-bit adder is checked against
// the reference sum and carry on carry-chain corner cases and 20000 random
// operand pairs with random carry in, and an 8-bit instance exhaustively.
module tb_cla_adder;
  logic [31:0] a, b, s;
  logic cin, cout;
  logic [7:0] a8, b8, s8;
  logic cin8, cout8;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  cla_adder #(.W(32)) dut   (.a(a),  .b(b),  .cin(cin),  .s(s),  .cout(cout));
  cla_adder #(.W(8))  dut_8 (.a(a8), .b(b8), .cin(cin8), .s(s8), .cout(cout8));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check32(logic [31:0] x, logic [31:0] y, logic c);
    logic [32:0] ref_s;
    a = x;
    b = y;
    cin = c;
    #1;
    ref_s = 33'(x) + 33'(y) + 33'(c);
    checks++;
    if ({cout, s} !== ref_s) begin
      failures++;
      if (failures < 10) $display("FAIL %h + %h + %0d = %0d:%h, expected %h", x, y, c, cout, s, ref_s);
    end
  endtask

  initial begin
    logic [31:0] corner [6] = '{32'h0, 32'h1, 32'hffffffff, 32'h80000000, 32'h7fffffff, 32'h0000ffff};
    foreach (corner[i]) foreach (corner[j]) for (int c = 0; c < 2; c++) check32(corner[i], corner[j], 1'(c));
    for (int i = 0; i < 20000; i++) check32($urandom, $urandom, 1'($urandom));
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        for (int c = 0; c < 2; c++) begin
          a8 = 8'(i);
          b8 = 8'(j);
          cin8 = 1'(c);
          #1;
          checks++;
          if ({cout8, s8} !== 9'(i + j + c)) begin
            failures++;
            if (failures < 10) $display("FAIL 8-bit %0d + %0d + %0d", i, j, c);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
