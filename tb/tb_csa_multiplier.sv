// Self-checking testbench for csa_multiplier: the 16-bit multiplier is checked
// against the reference product on corner operands and 20000 random pairs,
// and an 8-bit instance is checked exhaustively over all 65536 pairs.
module tb_csa_multiplier;
  logic [15:0] a, b;
  logic [31:0] p;
  logic [7:0]  a8, b8;
  logic [15:0] p8;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  csa_multiplier #(.N(16)) dut   (.a(a),  .b(b),  .p(p));
  csa_multiplier #(.N(8))  dut_8 (.a(a8), .b(b8), .p(p8));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check16(logic [15:0] x, logic [15:0] y);
    logic [31:0] ref_p;
    a = x;
    b = y;
    #1;
    ref_p = 32'(x) * 32'(y);
    checks++;
    if (p !== ref_p) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h = %h, expected %h", x, y, p, ref_p);
    end
  endtask

  initial begin
    logic [15:0] corner [6] = '{16'h0000, 16'h0001, 16'hffff, 16'h8000, 16'haaaa, 16'h5555};
    foreach (corner[i]) foreach (corner[j]) check16(corner[i], corner[j]);
    for (int i = 0; i < 20000; i++) check16(16'($urandom), 16'($urandom));
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i);
        b8 = 8'(j);
        #1;
        checks++;
        if (p8 !== 16'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL 8-bit %0d * %0d = %0d", i, j, p8);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
