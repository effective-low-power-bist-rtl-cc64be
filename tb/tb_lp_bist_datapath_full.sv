// Full-size testbench for lp_bist_datapath with every parameter at its
// default (16-bit carry-save array multiplier, carry lookahead accumulator
// adder). It runs normal multiply-accumulate traffic, one complete
// self-test of 2048 vectors, and normal traffic again. Each test vector is
// compared with the reference pattern generator and must differ from the
// previous one in at most one operand bit. The start-to-done time must be
// 2050 cycles, and the signature must match the reference. Afterwards the
// accumulator must work normally.
module tb_lp_bist_datapath_full;
  import lp_tpg_model_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, bist_start = 1'b0, mac_en = 1'b0, acc_clr = 1'b0;
  logic [15:0] a_in = '0, b_in = '0, op_x, op_y, px, py;
  logic [31:0] acc_out, model_acc, sig_ref;
  logic test_mode, bist_done;
  int checks = 0, failures = 0, cycles = 0, changed = 0, unchanged = 0;

  lp_bist_datapath dut (.clk, .rst_n, .bist_start, .a_in, .b_in, .mac_en, .acc_clr,
                        .op_x, .op_y, .acc_out, .test_mode, .bist_done);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic normal_ops(int n);
    for (int i = 0; i < n; i++) begin
      a_in    = 16'($urandom);
      b_in    = 16'($urandom);
      mac_en  = ($urandom_range(0, 3) != 0);
      acc_clr = (i == 0);
      @(posedge clk);
      if (acc_clr) model_acc = '0;
      else if (mac_en) model_acc += 32'(a_in) * 32'(b_in);
      @(negedge clk);
      check(acc_out == model_acc && !test_mode, "normal multiply-accumulate");
    end
    mac_en  = 1'b0;
    acc_clr = 1'b0;
  endtask

  initial begin
    tpg_model m;
    m = new(16, 4, 4);
    sig_ref = m.signature();
    model_acc = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    normal_ops(100);
    bist_start = 1'b1;
    @(posedge clk);
    cycles = 1;
    @(negedge clk);
    bist_start = 1'b0;
    check(test_mode, "test mode");
    @(negedge clk);
    cycles++;
    check(op_x == 0 && op_y == 0 && acc_out == 0, "cleared at test start");
    while (!bist_done) begin
      px = op_x;
      py = op_y;
      @(posedge clk);
      void'(m.step());
      @(negedge clk);
      cycles++;
      check(op_x == m.x[15:0] && op_y == m.y[15:0], "test operands");
      check($countones({op_x, op_y} ^ {px, py}) <= 1, "one-bit change");
      if ({op_x, op_y} != {px, py}) changed++; else unchanged++;
    end
    check(cycles == 2050, "2050 cycles from start to done");
    @(negedge clk);
    check(acc_out == sig_ref && !test_mode, "signature");
    $display("self-test: %0d cycles, %0d vectors changed one bit, %0d none, signature %h (reference %h)",
             cycles, changed, unchanged, acc_out, sig_ref);
    check(changed > 0 && unchanged > 0, "both kinds of load happened");
    normal_ops(100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
