// N x N unsigned radix-4 Booth encoded Wallace tree multiplier.
// b is zero-extended by two bits and recoded in overlapping triplets
// (b[2k+1], b[2k], b[2k-1]) into NPP = N/2 + 1 digits in {-2,-1,0,+1,+2}.
// Each digit selects 0, a or 2a; a negative digit inverts the 2N-bit row and
// places the +1 of the two's complement in one extra row of negation bits.
// A Wallace tree of word-wide 3:2 counters (carry-save adders) then reduces
// the NPP+1 rows to two in as few levels as possible, and a final
// carry-propagate addition gives p = a * b, modulo 2^2N (the exact product,
// since it fits). Purely combinational. The document names this multiplier
// type only; the radix-4 recoding, the word-level tree, the behavioural final
// adder and unsigned operands are this design's choices.
module booth_wallace_multiplier #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  localparam int unsigned PW  = 2 * N;
  localparam int unsigned NPP = N / 2 + 1;
  localparam int unsigned NR  = NPP + 1;          // rows into the tree

  // Rows left after l levels of 3:2 reduction.
  function automatic int unsigned rows_at(int unsigned l);
    int unsigned n = NR;
    for (int unsigned k = 0; k < l; k++) n = 2 * (n / 3) + n % 3;
    return n;
  endfunction

  function automatic int unsigned num_levels();
    int unsigned n = NR;
    int unsigned l = 0;
    while (n > 2) begin
      n = 2 * (n / 3) + n % 3;
      l++;
    end
    return l;
  endfunction

  localparam int unsigned LEVELS = num_levels();

  // ---------------------------------------------------------------- recoding
  logic [2*NPP:0] bx;                              // {zeros, b, 0}
  assign bx = {{(2*NPP - N){1'b0}}, b, 1'b0};

  logic [PW-1:0] pp [NR];
  logic [PW-1:0] negrow;

  always_comb begin
    negrow = '0;
    for (int k = 0; k < NPP; k++) begin
      logic [2:0]    t;
      logic          neg, one, two;
      logic [PW-1:0] mag;
      t   = bx[2*k +: 3];
      one = t[0] ^ t[1];
      two = (t == 3'b011) || (t == 3'b100);
      neg = t[2] & ~(t[1] & t[0]);
      mag = one ? PW'(a) : (two ? PW'(a) << 1 : '0);
      if (neg) begin
        pp[k] = (~mag) << (2 * k);
        negrow[2*k] = 1'b1;
      end else begin
        pp[k] = mag << (2 * k);
      end
    end
    pp[NPP] = negrow;
  end

  // ------------------------------------------------------------ Wallace tree
  // g_lvl[l].r holds the rows after l levels; unused entries are zero.
  for (genvar l = 0; l <= LEVELS; l++) begin : g_lvl
    logic [PW-1:0] r [NR];
    if (l == 0) begin : g_in
      assign r = pp;
    end else begin : g_red
      localparam int unsigned NIN  = rows_at(l - 1);
      localparam int unsigned NGRP = NIN / 3;
      localparam int unsigned NOUT = rows_at(l);
      for (genvar g = 0; g < NGRP; g++) begin : g_csa
        logic [PW-1:0] r0, r1, r2;
        assign r0 = g_lvl[l-1].r[3*g];
        assign r1 = g_lvl[l-1].r[3*g+1];
        assign r2 = g_lvl[l-1].r[3*g+2];
        assign r[2*g]   = r0 ^ r1 ^ r2;
        assign r[2*g+1] = ((r0 & r1) | (r0 & r2) | (r1 & r2)) << 1;
      end
      for (genvar k = 3 * NGRP; k < NIN; k++) begin : g_pass
        assign r[2*NGRP + k - 3*NGRP] = g_lvl[l-1].r[k];
      end
      for (genvar k = NOUT; k < NR; k++) begin : g_unused
        assign r[k] = '0;
      end
    end
  end

  // --------------------------------------------------- final carry propagate
  assign p = g_lvl[LEVELS].r[0] + g_lvl[LEVELS].r[1];

endmodule
