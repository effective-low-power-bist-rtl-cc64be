// W-bit Brent-Kung parallel prefix adder (W a power of two).
// Bit generate/propagate pairs, with cin folded into bit 0, are combined by
// the Brent-Kung prefix network: an up-sweep of log2(W) levels builds the
// group terms at positions 2^(d+1)-1 (mod 2^(d+1)), then a down-sweep of
// log2(W)-1 levels fills in the remaining positions, giving the carry out of
// every bit prefix. s = a + b + cin, cout is the carry out. Combinational.
// The document names the adder type only; the network is the standard one.
module brent_kung_adder #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  localparam int unsigned LG = $clog2(W);

  logic [W-1:0] p;
  logic [W-1:0] gpre;   // gpre[i]: carry out of bits i..0 (with cin)

  assign p = a ^ b;

  always_comb begin
    logic [W-1:0] gv, pv;
    gv    = a & b;
    pv    = p;
    gv[0] = gv[0] | (pv[0] & cin);
    // Up-sweep.
    for (int d = 0; d < LG; d++) begin
      for (int i = 0; i < W; i++) begin
        if ((i + 1) % (1 << (d + 1)) == 0) begin
          gv[i] = gv[i] | (pv[i] & gv[i - (1 << d)]);
          pv[i] = pv[i] & pv[i - (1 << d)];
        end
      end
    end
    // Down-sweep.
    for (int d = LG - 2; d >= 0; d--) begin
      for (int i = 0; i < W; i++) begin
        if ((i + 1) % (1 << (d + 1)) == (1 << d) && i >= (1 << (d + 1))) begin
          gv[i] = gv[i] | (pv[i] & gv[i - (1 << d)]);
          pv[i] = pv[i] & pv[i - (1 << d)];
        end
      end
    end
    gpre = gv;
  end

  assign s    = p ^ {gpre[W-2:0], cin};
  assign cout = gpre[W-1];

endmodule
