// Low power test pattern generator (TPG) for a multiplier.
// A (XSW+YSW)-bit Gray counter supplies a pattern: its high XSW bits for the X
// operand and its low YSW bits for the Y operand. Each operand is a row of
// slice registers, and the pattern is repeated across it, so X[i] takes
// Gray bit YSW + (i mod XSW) and Y[i] takes Gray bit (i mod YSW). The enable
// generator loads one slice per clock: E1..ENY are the Y slices from the least
// significant up, then the X slices likewise. After the last slice is loaded
// the counter steps, and the one bit that changed reaches the operands one
// slice at a time. Between two successive vectors at most one operand bit
// changes. A whole test is 2^(XSW+YSW) codes times NX+NY loads; with
// N = 16 and 4-bit slices that is 256 x 8 = 2048 vectors.
//
// Interface: run advances one load per clock; clr returns counter, ring and
// registers to zero; last is high in the cycle whose load is the final one of
// the test (the last slice of the last code); e shows the enables.
//
// The counter, the enable generator, the 4-bit slices, the high/low split
// between X and Y and the 3/5-bit alternative follow the TPG description. The
// order of the enables, the handling of a narrower top slice (it keeps the low
// pattern bits) and the clear are this design's choices.
module lp_tpg #(
  parameter int unsigned N   = 16,
  parameter int unsigned XSW = 4,
  parameter int unsigned YSW = 4,
  localparam int unsigned NX = (N + XSW - 1) / XSW,
  localparam int unsigned NY = (N + YSW - 1) / YSW,
  localparam int unsigned NE = NX + NY,
  localparam int unsigned CW = XSW + YSW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic          run,
  output logic [N-1:0]  x,
  output logic [N-1:0]  y,
  output logic [CW-1:0] gray,
  output logic [NE-1:0] e,
  output logic          last
);

  logic cnt_en;
  logic gray_last;

  gray_counter #(.W(CW)) u_cnt (
    .clk, .rst_n, .clr,
    .en  (cnt_en),
    .q   (gray),
    .last(gray_last)
  );

  enable_generator #(.NE(NE)) u_engen (
    .clk, .rst_n, .clr, .run,
    .e,
    .cnt_en
  );

  assign last = cnt_en & gray_last;

  logic [XSW-1:0] xpat;
  logic [YSW-1:0] ypat;
  assign xpat = gray[CW-1:YSW];
  assign ypat = gray[YSW-1:0];

  for (genvar j = 0; j < NY; j++) begin : g_y
    localparam int unsigned LO = j * YSW;
    localparam int unsigned SW = (LO + YSW > N) ? N - LO : YSW;
    slice_reg #(.W(SW)) u_reg (
      .clk, .rst_n, .clr,
      .en(e[j]),
      .d (ypat[SW-1:0]),
      .q (y[LO +: SW])
    );
  end

  for (genvar i = 0; i < NX; i++) begin : g_x
    localparam int unsigned LO = i * XSW;
    localparam int unsigned SW = (LO + XSW > N) ? N - LO : XSW;
    slice_reg #(.W(SW)) u_reg (
      .clk, .rst_n, .clr,
      .en(e[NY+i]),
      .d (xpat[SW-1:0]),
      .q (x[LO +: SW])
    );
  end

endmodule
