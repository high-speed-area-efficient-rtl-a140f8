// bfly_r4: radix-4 decimation-in-time butterfly.
//
// Inputs 1, 2 and 3 are rotated by W_NPT^Q, W_NPT^2Q and W_NPT^3Q (input 0 by
// W^0 = 1), then the 4-point DFT is taken:
//   s0 = a + c, s1 = a - c, s2 = b + d, s3 = b - d
//   X0 = s0 + s2,  X1 = s1 - j*s3,  X2 = s0 - s2,  X3 = s1 + j*s3.
// Multiplying by -j or +j only swaps real and imaginary parts and negates
// one, so the 4-point DFT needs adders only. With ROT = 0 (first rank of an
// FFT, all twiddles 1) no multiplier is built. OW = IW + ROT + 2, so no
// result overflows. Purely combinational.
module bfly_r4 #(
  parameter int unsigned IW  = 16,
  parameter bit          ROT = 1,
  parameter int unsigned Q   = 1,
  parameter int unsigned NPT = 16,
  localparam int unsigned RW = IW + 32'(ROT),
  localparam int unsigned OW = RW + 2
) (
  input  logic signed [IW-1:0] xr [4],
  input  logic signed [IW-1:0] xi [4],
  output logic signed [OW-1:0] yr [4],
  output logic signed [OW-1:0] yi [4]
);

  logic signed [RW-1:0] wr [4];
  logic signed [RW-1:0] wi [4];

  for (genvar m = 0; m < 4; m++) begin : g_in
    if (ROT) begin : g_rot
      twiddle_rot #(.DW(IW), .K(m * Q), .NPT(NPT)) u_rot (
        .xr(xr[m]), .xi(xi[m]), .yr(wr[m]), .yi(wi[m])
      );
    end else begin : g_norot
      assign wr[m] = xr[m];
      assign wi[m] = xi[m];
    end
  end

  logic signed [RW:0] s0r, s0i, s1r, s1i, s2r, s2i, s3r, s3i;

  always_comb begin
    s0r = (RW+1)'(wr[0]) + (RW+1)'(wr[2]);
    s0i = (RW+1)'(wi[0]) + (RW+1)'(wi[2]);
    s1r = (RW+1)'(wr[0]) - (RW+1)'(wr[2]);
    s1i = (RW+1)'(wi[0]) - (RW+1)'(wi[2]);
    s2r = (RW+1)'(wr[1]) + (RW+1)'(wr[3]);
    s2i = (RW+1)'(wi[1]) + (RW+1)'(wi[3]);
    s3r = (RW+1)'(wr[1]) - (RW+1)'(wr[3]);
    s3i = (RW+1)'(wi[1]) - (RW+1)'(wi[3]);
    yr[0] = OW'(s0r) + OW'(s2r);
    yi[0] = OW'(s0i) + OW'(s2i);
    yr[1] = OW'(s1r) + OW'(s3i);   // s1 - j*s3
    yi[1] = OW'(s1i) - OW'(s3r);
    yr[2] = OW'(s0r) - OW'(s2r);
    yi[2] = OW'(s0i) - OW'(s2i);
    yr[3] = OW'(s1r) - OW'(s3i);   // s1 + j*s3
    yi[3] = OW'(s1i) + OW'(s3r);
  end

endmodule
