// fft16_r4: 16-point radix-4 decimation-in-time FFT, fully combinational.
//
// The input x(0..15) is split into four decimated sequences x(4n+i),
// i = 0..3. Rank 1: butterfly i takes x(i), x(i+4), x(i+8), x(i+12) and forms
// the 4-point DFT Y_i(k) (no twiddles). Rank 2: butterfly k takes Y_0(k) ..
// Y_3(k), rotates them by W16^0, W16^k, W16^2k, W16^3k and forms
//   X(k + 4m) = sum_i W16^(ik) Y_i(k) W4^(im),  m = 0..3.
// Rank-2 butterfly k produces X(k), X(k+4), X(k+8), X(k+12); the output
// ports are in natural order X(0..15).
// Widths: DW bits in, DW+5 bits out (2 bits per radix-4 rank plus 1 for the
// twiddle rotation). Twiddle products are rounded to nearest. The
// decomposition into x(4n+i) follows the design; widths and rounding are this
// design's own choices.
module fft16_r4 #(
  parameter int unsigned DW = 16,
  localparam int unsigned OW = DW + 5
) (
  input  logic signed [DW-1:0] xr [16],
  input  logic signed [DW-1:0] xi [16],
  output logic signed [OW-1:0] yr [16],
  output logic signed [OW-1:0] yi [16]
);

  localparam int unsigned W1 = DW + 2;

  logic signed [W1-1:0] ar [4][4];  // ar[i][k] = Y_i(k)
  logic signed [W1-1:0] ai [4][4];

  for (genvar i = 0; i < 4; i++) begin : g_rank1
    logic signed [DW-1:0] inr [4];
    logic signed [DW-1:0] ini [4];
    for (genvar n = 0; n < 4; n++) begin : g_sel
      assign inr[n] = xr[4*n + i];
      assign ini[n] = xi[4*n + i];
    end
    bfly_r4 #(.IW(DW), .ROT(1'b0), .Q(0), .NPT(16)) u_bf (
      .xr(inr), .xi(ini), .yr(ar[i]), .yi(ai[i])
    );
  end

  for (genvar k = 0; k < 4; k++) begin : g_rank2
    logic signed [W1-1:0] inr [4];
    logic signed [W1-1:0] ini [4];
    logic signed [OW-1:0] outr [4];
    logic signed [OW-1:0] outi [4];
    for (genvar i = 0; i < 4; i++) begin : g_sel
      assign inr[i] = ar[i][k];
      assign ini[i] = ai[i][k];
    end
    bfly_r4 #(.IW(W1), .ROT(1'b1), .Q(k), .NPT(16)) u_bf (
      .xr(inr), .xi(ini), .yr(outr), .yi(outi)
    );
    for (genvar m = 0; m < 4; m++) begin : g_out
      assign yr[k + 4*m] = outr[m];
      assign yi[k + 4*m] = outi[m];
    end
  end

endmodule
