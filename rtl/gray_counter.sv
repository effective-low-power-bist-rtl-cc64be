// W-bit Gray code counter of the low power test pattern generator.
// Steps once per clock while en is high through all 2^W reflected binary Gray
// codes, so successive values differ in exactly one bit, then wraps to 0. It
// holds a binary count b and a registered Gray output q = b ^ (b >> 1) of the
// same step, so q has no decode glitches. last is high while q holds the final
// code of the sequence (a one followed by zeros); the step from it wraps to 0.
// The counter's width and its use of Gray code follow the TPG description;
// the binary-plus-register structure, reset to 0 and synchronous clear are
// choices of this design.
module gray_counter #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  output logic [W-1:0] q,
  output logic         last
);

  logic [W-1:0] bin_q;
  logic [W-1:0] bin_d;

  always_comb bin_d = bin_q + 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bin_q <= '0;
      q     <= '0;
    end else if (clr) begin
      bin_q <= '0;
      q     <= '0;
    end else if (en) begin
      bin_q <= bin_d;
      q     <= bin_d ^ (bin_d >> 1);
    end
  end

  assign last = &bin_q;

endmodule
