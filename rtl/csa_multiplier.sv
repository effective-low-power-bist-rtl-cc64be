// N x N unsigned carry-save array multiplier.
// Partial products are AND gates a[j] & b[i]. Row 0 holds the first partial
// product; each further row i is a line of full adders that adds partial
// product i to the sum bits of row i-1 (shifted one place) and to the carries
// of row i-1, which pass straight down without rippling sideways. The least
// significant sum bit of each row is a final product bit. A ripple-carry
// vector merging row adds the last row's sums and carries into the upper half
// of the product. Purely combinational: product p = a * b after the array's
// settling delay. The document names this multiplier type only; the
// structure is the textbook array, and unsigned operands are this design's
// choice.
module csa_multiplier #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  // s[i][j] has weight 2^(i+j), c[i][j] weight 2^(i+j+1).
  logic [N-1:0] s [N];
  logic [N-1:0] c [N];

  assign s[0] = a & {N{b[0]}};
  assign c[0] = '0;

  for (genvar i = 1; i < N; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_cell
      logic pp, sin, cin;
      assign pp  = a[j] & b[i];
      assign sin = (j < N - 1) ? s[i-1][(j+1) % N] : 1'b0;
      assign cin = c[i-1][j];
      full_adder u_fa (.a(pp), .b(sin), .ci(cin), .s(s[i][j]), .co(c[i][j]));
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_low
    assign p[i] = s[i][0];
  end

  // Vector merging adder: ripple carry over the upper N product bits.
  logic [N-1:0] ms;
  logic [N-1:0] mc;
  assign ms    = {1'b0, s[N-1][N-1:1]};
  assign mc[0] = 1'b0;
  for (genvar j = 0; j < N - 1; j++) begin : g_merge
    full_adder u_fa (.a(ms[j]), .b(c[N-1][j]), .ci(mc[j]), .s(p[N+j]), .co(mc[j+1]));
  end
  // The product fits in 2N bits, so the top cell needs no carry out.
  assign p[2*N-1] = ms[N-1] ^ c[N-1][N-1] ^ mc[N-1];

endmodule
