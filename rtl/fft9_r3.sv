// fft9_r3: 9-point radix-3 decimation-in-time FFT, fully combinational.
//
// The input x(0..8) is split into three decimated sequences x(3n+i),
// i = 0, 1, 2. Rank 1: butterfly i takes x(i), x(i+3), x(i+6) and forms the
// 3-point DFT Y_i(k) (no twiddles). Rank 2: butterfly k takes Y_0(k), Y_1(k),
// Y_2(k), rotates them by W9^0, W9^k, W9^2k and forms
//   X(k + 3m) = sum_i W9^(ik) Y_i(k) W3^(im),  m = 0, 1, 2.
// Rank-2 butterfly k therefore produces X(k), X(k+3), X(k+6); the output
// ports are in natural order X(0..8).
// Widths: samples are DW bits in and DW+5 bits out (2 bits per radix-3 rank
// plus 1 bit for the twiddle rotation), so no overflow is possible. Twiddle
// products are rounded to nearest, so results match the exact DFT within a
// few LSBs. The two-rank structure and the input grouping follow the design;
// the word widths and rounding are this design's own choices.
module fft9_r3 #(
  parameter int unsigned DW = 16,   // input sample width
  localparam int unsigned OW = DW + 5
) (
  input  logic signed [DW-1:0] xr [9],  // time samples x(n), n = 0..8
  input  logic signed [DW-1:0] xi [9],
  output logic signed [OW-1:0] yr [9],  // spectrum X(k), k = 0..8
  output logic signed [OW-1:0] yi [9]
);

  localparam int unsigned W1 = DW + 2;  // after rank 1

  logic signed [W1-1:0] ar [3][3];  // ar[i][k] = Y_i(k)
  logic signed [W1-1:0] ai [3][3];

  for (genvar i = 0; i < 3; i++) begin : g_rank1
    logic signed [DW-1:0] inr [3];
    logic signed [DW-1:0] ini [3];
    for (genvar n = 0; n < 3; n++) begin : g_sel
      assign inr[n] = xr[3*n + i];
      assign ini[n] = xi[3*n + i];
    end
    bfly_r3 #(.IW(DW), .ROT(1'b0), .Q(0), .NPT(9)) u_bf (
      .xr(inr), .xi(ini), .yr(ar[i]), .yi(ai[i])
    );
  end

  for (genvar k = 0; k < 3; k++) begin : g_rank2
    logic signed [W1-1:0] inr [3];
    logic signed [W1-1:0] ini [3];
    logic signed [OW-1:0] outr [3];
    logic signed [OW-1:0] outi [3];
    for (genvar i = 0; i < 3; i++) begin : g_sel
      assign inr[i] = ar[i][k];
      assign ini[i] = ai[i][k];
    end
    bfly_r3 #(.IW(W1), .ROT(1'b1), .Q(k), .NPT(9)) u_bf (
      .xr(inr), .xi(ini), .yr(outr), .yi(outi)
    );
    for (genvar m = 0; m < 3; m++) begin : g_out
      assign yr[k + 3*m] = outr[m];
      assign yi[k + 3*m] = outi[m];
    end
  end

endmodule
