// Self-checking testbench for mac_accumulator: instances with the carry
// lookahead and the Brent-Kung adder take the same random sequence of
// accumulate, hold and clear cycles and are compared with a reference sum.
module tb_mac_accumulator;
  import lp_bist_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, en = 1'b0;
  logic [31:0] addend = '0, acc_cla, acc_bka, model;
  int checks = 0, failures = 0;

  mac_accumulator #(.W(32), .ADD_ARCH(ADD_CLA)) dut_cla (.clk, .rst_n, .clr, .en, .addend, .acc(acc_cla));
  mac_accumulator #(.W(32), .ADD_ARCH(ADD_BKA)) dut_bka (.clk, .rst_n, .clr, .en, .addend, .acc(acc_bka));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      en     = ($urandom_range(0, 3) != 0);
      clr    = ($urandom_range(0, 63) == 0);
      addend = (i % 7 == 0) ? 32'hffffffff : $urandom;
      @(posedge clk);
      if (clr) model = '0; else if (en) model = model + addend;
      @(negedge clk);
      checks += 2;
      if (acc_cla !== model) begin failures++; $display("FAIL CLA %h expected %h", acc_cla, model); end
      if (acc_bka !== model) begin failures++; $display("FAIL BKA %h expected %h", acc_bka, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
