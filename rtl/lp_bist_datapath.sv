// Multiplier-accumulator datapath with low power built-in self-test.
// Normal mode: the multiplier computes a_in * b_in and, when mac_en is high,
// the accumulator adds the product on the clock edge (acc_clr clears it).
// Test mode, started by a bist_start pulse: the sequencer clears the pattern
// generator and the accumulator, then the pattern generator drives the
// multiplier operands. It repeats one Gray counter code across the operand
// slices and reloads one slice per clock, so successive test vectors differ
// in at most one operand bit, which keeps the switching in the multiplier
// array and the adder low. The accumulator compacts every product into the
// AW-bit signature on acc_out; bist_done pulses in the cycle before the
// signature is final (it is valid from the next cycle on and stays until the
// accumulator is used again). test_mode is high for the whole self-test, and
// a_in, b_in, mac_en and acc_clr are ignored meanwhile.
//
// MULT_ARCH selects the carry-save array (4-bit X and Y patterns) or the
// Booth encoded Wallace tree multiplier (3-bit X and 5-bit Y patterns);
// ADD_ARCH selects the carry lookahead or the Brent-Kung accumulator adder.
// With the defaults (N = 16, carry-save array, carry lookahead) a self-test
// applies 256 * 8 = 2048 vectors and takes 2050 cycles from start to done.
// The pattern generator, its slice geometries and the use of the accumulator
// as compactor follow the document; the operand multiplexer, the accumulator
// width AW = 2N and the start/done handshake are this design's choices.
module lp_bist_datapath
  import lp_bist_pkg::*;
#(
  parameter int unsigned N         = 16,
  parameter mult_arch_e  MULT_ARCH = MULT_CSA,
  parameter add_arch_e   ADD_ARCH  = ADD_CLA,
  parameter int unsigned AW        = 2 * N
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          bist_start,
  input  logic [N-1:0]  a_in,
  input  logic [N-1:0]  b_in,
  input  logic          mac_en,
  input  logic          acc_clr,
  output logic [N-1:0]  op_x,
  output logic [N-1:0]  op_y,
  output logic [AW-1:0] acc_out,
  output logic          test_mode,
  output logic          bist_done
);

  localparam int unsigned XSW = x_slice_width(MULT_ARCH);
  localparam int unsigned YSW = y_slice_width(MULT_ARCH);

  // ------------------------------------------------------------ sequencing
  logic bist_clr, tpg_run, bist_acc_en, tpg_last;

  bist_controller u_ctrl (
    .clk, .rst_n,
    .start   (bist_start),
    .tpg_last,
    .clr     (bist_clr),
    .tpg_run,
    .acc_en  (bist_acc_en),
    .busy    (test_mode),
    .done    (bist_done)
  );

  // ------------------------------------------------------ pattern generator
  logic [N-1:0] tpg_x, tpg_y;

  lp_tpg #(.N(N), .XSW(XSW), .YSW(YSW)) u_tpg (
    .clk, .rst_n,
    .clr  (bist_clr),
    .run  (tpg_run),
    .x    (tpg_x),
    .y    (tpg_y),
    .gray (),
    .e    (),
    .last (tpg_last)
  );

  // ------------------------------------------------------------ multiplier
  assign op_x = test_mode ? tpg_x : a_in;
  assign op_y = test_mode ? tpg_y : b_in;

  logic [2*N-1:0] product;

  if (MULT_ARCH == MULT_BWM) begin : g_bwm
    booth_wallace_multiplier #(.N(N)) u_mult (.a(op_x), .b(op_y), .p(product));
  end else begin : g_csa
    csa_multiplier #(.N(N)) u_mult (.a(op_x), .b(op_y), .p(product));
  end

  // ----------------------------------------------- accumulator / compactor
  logic acc_clr_i, acc_en_i;
  assign acc_clr_i = test_mode ? bist_clr    : acc_clr;
  assign acc_en_i  = test_mode ? bist_acc_en : mac_en;

  mac_accumulator #(.W(AW), .ADD_ARCH(ADD_ARCH)) u_acc (
    .clk, .rst_n,
    .clr    (acc_clr_i),
    .en     (acc_en_i),
    .addend (AW'(product)),
    .acc    (acc_out)
  );

endmodule
