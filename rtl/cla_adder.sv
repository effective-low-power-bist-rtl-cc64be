// W-bit two-level carry lookahead adder.
// Every bit forms generate g = a & b and propagate p = a ^ b. Bits are grouped
// GW at a time; each group forms a group generate and propagate, and the carry
// into every group is computed at once from the group signals and cin in
// sum-of-products (lookahead) form. Inside a group the bit carries are
// likewise expanded from the group's carry in. s = a + b + cin, cout is the
// carry out. Combinational. The document names the adder type only; the group
// size and the two-level form are this design's choices. W must be a
// multiple of GW.
module cla_adder #(
  parameter int unsigned W  = 32,
  parameter int unsigned GW = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  localparam int unsigned NG = W / GW;

  logic [W-1:0]  g, p;
  logic [NG-1:0] gg, gp;   // group generate and propagate
  logic [NG:0]   gc;       // carry into each group, gc[NG] = cout
  logic [W-1:0]  c;        // carry into each bit

  assign g = a & b;
  assign p = a ^ b;

  // Group generate/propagate.
  always_comb begin
    for (int j = 0; j < NG; j++) begin
      logic pr;
      gg[j] = 1'b0;
      gp[j] = 1'b1;
      for (int i = 0; i < GW; i++) gp[j] &= p[j*GW+i];
      for (int i = 0; i < GW; i++) begin
        pr = g[j*GW+i];
        for (int k = i + 1; k < GW; k++) pr &= p[j*GW+k];
        gg[j] |= pr;
      end
    end
  end

  // Second level: carry into every group straight from cin and group signals.
  always_comb begin
    for (int j = 0; j <= NG; j++) begin
      logic t;
      t = cin;
      for (int k = 0; k < j; k++) t &= gp[k];
      gc[j] = t;
      for (int m = 0; m < j; m++) begin
        t = gg[m];
        for (int k = m + 1; k < j; k++) t &= gp[k];
        gc[j] |= t;
      end
    end
  end

  // First level: carries inside each group from the group's carry in.
  always_comb begin
    for (int j = 0; j < NG; j++) begin
      for (int i = 0; i < GW; i++) begin
        logic t;
        t = gc[j];
        for (int k = 0; k < i; k++) t &= p[j*GW+k];
        c[j*GW+i] = t;
        for (int m = 0; m < i; m++) begin
          t = g[j*GW+m];
          for (int k = m + 1; k < i; k++) t &= p[j*GW+k];
          c[j*GW+i] |= t;
        end
      end
    end
  end

  assign s    = p ^ c;
  assign cout = gc[NG];

endmodule
