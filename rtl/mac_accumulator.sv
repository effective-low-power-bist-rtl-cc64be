// Accumulator of the multiplier-accumulator datapath, also the test response
// compactor. On each clock with en high the W-bit register takes acc + addend
// (modulo 2^W) through the selected adder: the carry lookahead adder
// (ADD_CLA) or the Brent-Kung adder (ADD_BKA). clr sets it to zero and wins
// over en. In normal operation it accumulates products; during self-test it
// accumulates every product the test patterns cause, and its final value is
// the test signature. Using the existing accumulator as the compactor follows
// the document; plain modulo addition as the compaction function is this
// design's choice.
module mac_accumulator
  import lp_bist_pkg::*;
#(
  parameter int unsigned W        = 32,
  parameter add_arch_e   ADD_ARCH = ADD_CLA
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  input  logic [W-1:0] addend,
  output logic [W-1:0] acc
);

  logic [W-1:0] sum;

  if (ADD_ARCH == ADD_BKA) begin : g_bka
    brent_kung_adder #(.W(W)) u_add (.a(acc), .b(addend), .cin(1'b0), .s(sum), .cout());
  end else begin : g_cla
    cla_adder #(.W(W)) u_add (.a(acc), .b(addend), .cin(1'b0), .s(sum), .cout());
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   acc <= '0;
    else if (clr) acc <= '0;
    else if (en)  acc <= sum;
  end

endmodule
