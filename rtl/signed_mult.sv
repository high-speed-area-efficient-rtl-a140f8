// signed_mult: two's complement N-bit by M-bit multiplier (Baugh-Wooley).
//
// Same three steps as the unsigned multiplier:
//   1. partial product generator: bit a[i]&b[j] in column i+j; the terms that
//      pair exactly one sign bit with a non-sign bit (a[N-1]b[j], j<M-1, and
//      a[i]b[M-1], i<N-1) are inverted, and constant ones are added in
//      columns N-1, M-1 (together column N when N = M) and N+M-1. Modulo
//      2**(N+M) this sum equals the signed product;
//   2. multi-operand addition: a Wallace-style tree of full-adder ranks
//      reduces the rows and the constant row, three rows to two per group,
//      until a sum and a carry vector remain;
//   3. carry-propagate adder: a ripple-carry chain gives the product.
// The 5 x 5 default, the inverted terms and the constant ones in columns 5
// and 9 follow the design's 5 x 5 signed multiplier, whose reduction is a
// tree of 16 full and 5 half adders over three levels. This module builds the
// tree generically for any N x M: whole rows are compressed, full-width, so
// it uses more adder cells than the hand-placed 5 x 5 tree (constant-zero
// bits are left to synthesis to remove), but its depth grows only with
// log1.5 of the row count (6 rows -> 4 -> 3 -> 2 for 5 x 5, as in the
// reference tree). Purely combinational.
module signed_mult #(
  parameter int unsigned N = 5,  // multiplier width (>= 2)
  parameter int unsigned M = 5   // multiplicand width (>= 2)
) (
  input  logic signed [N-1:0]   a,
  input  logic signed [M-1:0]   b,
  output logic signed [N+M-1:0] p
);

  localparam int unsigned PW   = N + M;
  localparam int unsigned ROWS = M + 1;  // M partial product rows + constant row

  logic [PW-1:0] pp [ROWS];
  always_comb begin
    for (int j = 0; j < M; j++) begin
      pp[j] = '0;
      for (int i = 0; i < N; i++) begin
        logic t;
        t = a[i] & b[j];
        if ((i == N - 1) != (j == M - 1)) t = ~t;
        pp[j][i+j] = t;
      end
    end
    // 2**(N-1) + 2**(M-1) + 2**(N+M-1)
    pp[M] = (PW'(1) << (N - 1)) + (PW'(1) << (M - 1)) + (PW'(1) << (PW - 1));
  end

  // Step 2: Wallace-style tree. At every level the rows are taken in groups
  // of three and each group is reduced to a sum row and a carry row by a rank
  // of full adders; rows left over pass to the next level. rows_at(l) is the
  // row count at level l; the tree ends when two rows remain.
  function automatic int rows_at(int l);
    int cnt;
    cnt = ROWS;
    for (int k = 0; k < l; k++) cnt = 2 * (cnt / 3) + cnt % 3;
    return cnt;
  endfunction

  function automatic int n_levels();
    int l;
    l = 0;
    while (rows_at(l) > 2) l++;
    return l;
  endfunction

  localparam int NL = n_levels();

  // Each level has its own input and output rows; level 0 reads the partial
  // products.
  for (genvar l = 0; l < NL; l++) begin : g_level
    localparam int RI = rows_at(l);
    localparam int NG = RI / 3;
    localparam int RO = rows_at(l + 1);
    logic [PW-1:0] ri [ROWS];
    logic [PW-1:0] ro [ROWS];
    if (l == 0) begin : g_first
      assign ri = pp;
    end else begin : g_next
      assign ri = g_level[l-1].ro;
    end
    for (genvar g = 0; g < NG; g++) begin : g_csa
      assign ro[2*g]     = ri[3*g] ^ ri[3*g + 1] ^ ri[3*g + 2];
      assign ro[2*g + 1] = ((ri[3*g] & ri[3*g + 1]) | (ri[3*g] & ri[3*g + 2])
                           | (ri[3*g + 1] & ri[3*g + 2])) << 1;
    end
    for (genvar r = 0; r < RI % 3; r++) begin : g_pass
      assign ro[2*NG + r] = ri[3*NG + r];
    end
    for (genvar r = RO; r < ROWS; r++) begin : g_unused
      assign ro[r] = '0;
    end
  end

  logic [PW-1:0] sv, cv;
  if (NL == 0) begin : g_notree
    assign sv = pp[0];
    assign cv = pp[1];
  end else begin : g_tree
    assign sv = g_level[NL-1].ro[0];
    assign cv = g_level[NL-1].ro[1];
  end

  logic [PW-1:0] pu;
  always_comb begin
    logic c;
    c = 1'b0;
    for (int k = 0; k < PW; k++) begin
      pu[k] = sv[k] ^ cv[k] ^ c;
      c     = (sv[k] & cv[k]) | (sv[k] & c) | (cv[k] & c);
    end
  end
  assign p = signed'(pu);

endmodule
