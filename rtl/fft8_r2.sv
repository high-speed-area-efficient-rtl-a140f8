// fft8_r2: 8-point radix-2 decimation-in-time FFT, fully combinational.
//
// Three ranks of four radix-2 butterflies. Rank 1 takes the inputs in
// bit-reversed pairs (x0,x4), (x2,x6), (x1,x5), (x3,x7) and forms 2-point
// DFTs. Rank 2 combines them into the 4-point DFTs E(k) of the even and O(k)
// of the odd samples, using W8^0 and W8^2. Rank 3 forms
//   X(k) = E(k) + W8^k O(k),  X(k+4) = E(k) - W8^k O(k),  k = 0..3.
// The output ports are in natural order X(0..7).
// Widths: DW bits in, DW+5 out (1 bit per rank, 1 per rotating rank).
// Twiddle products are rounded to nearest. The butterfly arrangement follows
// the design's 8-point flow graph; the widths, the rounding and the
// natural-order output wiring are this design's own choices.
module fft8_r2 #(
  parameter int unsigned DW = 16,
  localparam int unsigned OW = DW + 5
) (
  input  logic signed [DW-1:0] xr [8],
  input  logic signed [DW-1:0] xi [8],
  output logic signed [OW-1:0] yr [8],
  output logic signed [OW-1:0] yi [8]
);

  localparam int unsigned W1 = DW + 1;
  localparam int unsigned W2 = DW + 3;

  // Rank 1: 2-point DFTs of x(j), x(j+4) for j = 0, 2, 1, 3.
  // p[g][b]: group g in bit-reversed order (0: x0/x4, 1: x2/x6, 2: x1/x5, 3: x3/x7)
  logic signed [W1-1:0] pr [4][2];
  logic signed [W1-1:0] pi [4][2];
  localparam int unsigned BR [4] = '{0, 2, 1, 3};

  for (genvar g = 0; g < 4; g++) begin : g_rank1
    logic signed [DW-1:0] inr [2];
    logic signed [DW-1:0] ini [2];
    assign inr[0] = xr[BR[g]];
    assign ini[0] = xi[BR[g]];
    assign inr[1] = xr[BR[g] + 4];
    assign ini[1] = xi[BR[g] + 4];
    bfly_r2 #(.IW(DW), .ROT(1'b0), .Q(0), .NPT(8)) u_bf (
      .xr(inr), .xi(ini), .yr(pr[g]), .yi(pi[g])
    );
  end

  // Rank 2: 4-point DFTs. h = 0 gives E (groups 0, 1), h = 1 gives O (groups 2, 3).
  // e[h][k] for k = 0..3.
  logic signed [W2-1:0] er [2][4];
  logic signed [W2-1:0] ei [2][4];

  for (genvar h = 0; h < 2; h++) begin : g_rank2
    for (genvar k = 0; k < 2; k++) begin : g_bf
      logic signed [W1-1:0] inr [2];
      logic signed [W1-1:0] ini [2];
      logic signed [W2-1:0] outr [2];
      logic signed [W2-1:0] outi [2];
      assign inr[0] = pr[2*h][k];
      assign ini[0] = pi[2*h][k];
      assign inr[1] = pr[2*h + 1][k];
      assign ini[1] = pi[2*h + 1][k];
      bfly_r2 #(.IW(W1), .ROT(1'b1), .Q(2 * k), .NPT(8)) u_bf (
        .xr(inr), .xi(ini), .yr(outr), .yi(outi)
      );
      assign er[h][k]     = outr[0];
      assign ei[h][k]     = outi[0];
      assign er[h][k + 2] = outr[1];
      assign ei[h][k + 2] = outi[1];
    end
  end

  // Rank 3: X(k) = E(k) + W8^k O(k), X(k+4) = E(k) - W8^k O(k).
  for (genvar k = 0; k < 4; k++) begin : g_rank3
    logic signed [W2-1:0] inr [2];
    logic signed [W2-1:0] ini [2];
    logic signed [OW-1:0] outr [2];
    logic signed [OW-1:0] outi [2];
    assign inr[0] = er[0][k];
    assign ini[0] = ei[0][k];
    assign inr[1] = er[1][k];
    assign ini[1] = ei[1][k];
    bfly_r2 #(.IW(W2), .ROT(1'b1), .Q(k), .NPT(8)) u_bf (
      .xr(inr), .xi(ini), .yr(outr), .yi(outi)
    );
    assign yr[k]     = outr[0];
    assign yi[k]     = outi[0];
    assign yr[k + 4] = outr[1];
    assign yi[k + 4] = outi[1];
  end

endmodule
