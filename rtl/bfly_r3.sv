// bfly_r3: radix-3 decimation-in-time butterfly.
//
// Inputs 1 and 2 are rotated by W_NPT^Q and W_NPT^2Q (input 0 by 1), then
// the 3-point DFT of (a, b, c) is taken. With W3 = -1/2 - j*sqrt(3)/2:
//   t = b + c, d = b - c
//   X0 = a + t
//   X1 = a - t/2 - j*(sqrt(3)/2)*d
//   X2 = a - t/2 + j*(sqrt(3)/2)*d
// The only non-trivial constant is sqrt(3)/2, held with FRAC fractional bits;
// two signed_mult instances form (sqrt(3)/2)*Re(d) and (sqrt(3)/2)*Im(d).
// X1 and X2 are summed at full precision and rounded to nearest (half up).
// The factoring into t and d is this design's choice; the butterfly's
// function is the 3-point DFT. OW = IW + ROT + 2. Purely combinational.
module bfly_r3
  import fft_pkg::*;
#(
  parameter int unsigned IW  = 16,
  parameter bit          ROT = 1,
  parameter int unsigned Q   = 1,
  parameter int unsigned NPT = 9,
  localparam int unsigned RW = IW + 32'(ROT),
  localparam int unsigned OW = RW + 2
) (
  input  logic signed [IW-1:0] xr [3],
  input  logic signed [IW-1:0] xi [3],
  output logic signed [OW-1:0] yr [3],
  output logic signed [OW-1:0] yi [3]
);

  logic signed [RW-1:0] wr [3];
  logic signed [RW-1:0] wi [3];

  for (genvar m = 0; m < 3; m++) begin : g_in
    if (ROT) begin : g_rot
      twiddle_rot #(.DW(IW), .K(m * Q), .NPT(NPT)) u_rot (
        .xr(xr[m]), .xi(xi[m]), .yr(wr[m]), .yi(wi[m])
      );
    end else begin : g_norot
      assign wr[m] = xr[m];
      assign wi[m] = xi[m];
    end
  end

  localparam logic signed [TW-1:0] K3 = TW'(sqrt3_half());
  localparam int unsigned FW = RW + TW + 3;  // full-precision width

  logic signed [RW:0]      tr, ti, dr, di;
  logic signed [RW+TW:0]   kdr, kdi;          // K3 * d

  assign tr = (RW+1)'(wr[1]) + (RW+1)'(wr[2]);
  assign ti = (RW+1)'(wi[1]) + (RW+1)'(wi[2]);
  assign dr = (RW+1)'(wr[1]) - (RW+1)'(wr[2]);
  assign di = (RW+1)'(wi[1]) - (RW+1)'(wi[2]);

  signed_mult #(.N(RW + 1), .M(TW)) u_kr (.a(dr), .b(K3), .p(kdr));
  signed_mult #(.N(RW + 1), .M(TW)) u_ki (.a(di), .b(K3), .p(kdi));

  logic signed [FW-1:0] mr, mi;   // (a - t/2) * 2**FRAC, plus rounding half
  logic signed [FW-1:0] x1r, x1i, x2r, x2i;

  always_comb begin
    mr  = (FW'(wr[0]) <<< FRAC) - (FW'(tr) <<< (FRAC - 1)) + (FW'(1) <<< (FRAC - 1));
    mi  = (FW'(wi[0]) <<< FRAC) - (FW'(ti) <<< (FRAC - 1)) + (FW'(1) <<< (FRAC - 1));
    x1r = mr + FW'(kdi);
    x1i = mi - FW'(kdr);
    x2r = mr - FW'(kdi);
    x2i = mi + FW'(kdr);
    yr[0] = OW'(wr[0]) + OW'(tr);
    yi[0] = OW'(wi[0]) + OW'(ti);
    yr[1] = OW'(x1r >>> FRAC);
    yi[1] = OW'(x1i >>> FRAC);
    yr[2] = OW'(x2r >>> FRAC);
    yi[2] = OW'(x2i >>> FRAC);
  end

endmodule
