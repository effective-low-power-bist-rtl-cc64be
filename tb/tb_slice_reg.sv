// Self-checking testbench for slice_reg: random load enables, data and
// clears against a reference register kept in the testbench.
module tb_slice_reg;
  localparam int unsigned W = 4;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, en = 1'b0;
  logic [W-1:0] d = '0, q, model;
  int checks = 0, failures = 0;

  slice_reg #(.W(W)) dut (.clk, .rst_n, .clr, .en, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0;
    repeat (2) @(negedge clk);
    checks++; if (q !== '0) failures++;
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      en  = ($urandom_range(0, 3) == 0);
      clr = ($urandom_range(0, 15) == 0);
      d   = W'($urandom);
      @(posedge clk);
      if (clr) model = '0; else if (en) model = d;
      @(negedge clk);
      checks++;
      if (q !== model) begin
        failures++;
        $display("mismatch at %0d: q=%h expected %h", i, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
