// Operand slice register of the low power test pattern generator.
// One W-bit part of a multiplier operand. It loads d on the rising clock edge
// when en is high and otherwise holds, so an operand only changes in the slice
// whose enable is active. The EN/D/CLK/Q ports follow the pattern generator's
// register drawing; the asynchronous reset and the synchronous clear (clr has
// priority over en) are additions of this design so that a self-test always
// starts from an all-zero operand.
module slice_reg #(
  parameter int unsigned W = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   q <= '0;
    else if (clr) q <= '0;
    else if (en)  q <= d;
  end

endmodule
