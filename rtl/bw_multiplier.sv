// bw_multiplier -- combinational W x W Baugh-Wooley multiplier.
//
// Each operand is marked signed or unsigned. Both are first extended by one
// bit (sign or zero) to M = W+1 bits, which turns every signedness mix into
// an M x M two's-complement product. That product is formed the
// Baugh-Wooley way:
//   - partial product bit pp[i][j] = a[j] & b[i], weight 2^(i+j);
//   - the most significant bit of rows 0..M-2 and every bit but the most
//     significant one of the last row are inverted;
//   - a constant one is added in column M;
//   - the most significant bit of the result is inverted (done here by adding
//     a one in column 2M-1, which is the same modulo 2^(2M)).
// The M rows and the constant row are reduced to two by a tree of full-adder
// rows (three rows in, two out, logarithmic depth, in the manner of a
// column-compression tree), and a ripple-carry adder of full adders forms
// the final sum.
//
// The Baugh-Wooley array follows the design; the one-bit operand extension
// (used for the mixed signed/unsigned sub-products of the full-precision
// mode), the row-wise 3:2 reduction tree (in place of the HPM reduction tree
// the design names) and the ripple-carry final adder are this design's own
// choices.
//
// Interface: a, b, a_signed, b_signed in; p (2W bits) out, to be read as
// signed if either operand is signed, unsigned otherwise. The true product
// always fits in 2W bits under that reading, so the two top bits of the
// 2M-bit array result and the final carries are computed but not used.
module bw_multiplier #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  input  logic           a_signed,
  input  logic           b_signed,
  output logic [2*W-1:0] p
);
  localparam int unsigned M  = W + 1;   // extended operand width
  localparam int unsigned PW = 2 * M;   // width of the Baugh-Wooley result
  localparam int unsigned NR = M + 1;   // partial-product rows plus constant row

  logic [M-1:0] ax, bx;
  always_comb begin
    ax = {a_signed & a[W-1], a};
    bx = {b_signed & b[W-1], b};
  end

  // Partial-product rows, already shifted into place, plus the constant row.
  logic [PW-1:0] row [NR];
  always_comb begin
    for (int i = 0; i < int'(NR); i++) row[i] = '0;
    for (int i = 0; i < int'(M); i++) begin
      for (int j = 0; j < int'(M); j++) begin
        logic bit_ij;
        bit_ij = ax[j] & bx[i];
        if ((i == int'(M) - 1) != (j == int'(M) - 1)) bit_ij = ~bit_ij;
        row[i][i+j] = bit_ij;
      end
    end
    row[M][M]    = 1'b1;
    row[M][PW-1] = 1'b1;
  end

  // Reduction tree: at every level the rows are taken in groups of three
  // and each group is reduced to two rows (a sum row and a carry row shifted
  // one column left) by a row of full adders; the one or two rows left over
  // pass to the next level unchanged. The number of rows falls from R to
  // 2*(R/3) + R%3 per level, so the depth grows with log(M), until two rows
  // remain. Carries out of the top column are dropped (modulo 2^PW).
  function automatic int rows_at(int r, int level);
    for (int i = 0; i < level; i++) r = 2 * (r / 3) + r % 3;
    return r;
  endfunction

  function automatic int n_levels(int r);
    int l;
    l = 0;
    while (r > 2) begin
      r = 2 * (r / 3) + r % 3;
      l++;
    end
    return l;
  endfunction

  localparam int NL = n_levels(NR);

  for (genvar l = 0; l < NL; l++) begin : g_level
    localparam int R  = rows_at(NR, l);
    localparam int G  = R / 3;
    localparam int RN = rows_at(NR, l + 1);
    logic [PW-1:0] cur [NR];   // rows entering this level
    logic [PW-1:0] nxt [NR];   // rows leaving it (RN of them used)
    if (l == 0) begin : g_first
      assign cur = row;
    end else begin : g_next
      assign cur = g_level[l-1].nxt;
    end
    for (genvar g = 0; g < G; g++) begin : g_csa
      logic [PW-1:0] co;
      for (genvar col = 0; col < int'(PW); col++) begin : g_col
        full_adder u_fa (
          .a (cur[3*g][col]),
          .b (cur[3*g+1][col]),
          .ci(cur[3*g+2][col]),
          .s (nxt[2*g][col]),
          .co(co[col])
        );
      end
      assign nxt[2*g+1] = {co[PW-2:0], 1'b0};
    end
    for (genvar r = 0; r < R % 3; r++) begin : g_pass
      assign nxt[2*G+r] = cur[3*G+r];
    end
    for (genvar r = RN; r < int'(NR); r++) begin : g_unused
      assign nxt[r] = '0;
    end
  end

  logic [PW-1:0] red_s, red_c;   // the two rows left after the tree
  assign red_s = g_level[NL-1].nxt[0];
  assign red_c = g_level[NL-1].nxt[1];

  // Final ripple-carry adder.
  logic [PW-1:0] sum;
  logic [PW:0]   rc;
  assign rc[0] = 1'b0;
  for (genvar col = 0; col < int'(PW); col++) begin : g_final
    full_adder u_fa (
      .a (red_s[col]),
      .b (red_c[col]),
      .ci(rc[col]),
      .s (sum[col]),
      .co(rc[col+1])
    );
  end

  assign p = sum[2*W-1:0];

endmodule
