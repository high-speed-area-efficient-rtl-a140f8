// complex_mult: rotates a complex sample by a twiddle factor with three real
// multipliers instead of four.
//
// For a sample X + jY and a twiddle C + jS the product is
//   R = C*X - S*Y,  I = S*X + C*Y.
// The design shares one product Z = C*(X - Y) between both outputs:
//   R = Z + Y*(C - S),  I = X*(C + S) - Z,
// so the datapath is one subtractor ahead of the multipliers (X - Y), three
// signed multipliers (by C, C - S and C + S), one adder and one subtractor.
// The three coefficients come in as separate inputs, as a twiddle table would
// supply them. Each multiplier is a signed_mult (Baugh-Wooley).
//
// Number format (this design's choice): X, Y are DW-bit integers; C, C+S and
// C-S are TW-bit two's complement with FRAC fractional bits. R and I are formed
// at full precision, then rounded to nearest (half up) by dropping FRAC bits,
// and returned with DW+1 bits, enough for |X+jY| * |W| <= sqrt(2) * 2**(DW-1).
// Purely combinational.
module complex_mult #(
  parameter int unsigned DW   = 16,  // sample width
  parameter int unsigned TW   = 16,  // coefficient width
  parameter int unsigned FRAC = 14   // fractional bits of the coefficients
) (
  input  logic signed [DW-1:0] x,     // real part of the sample
  input  logic signed [DW-1:0] y,     // imaginary part of the sample
  input  logic signed [TW-1:0] c,     // C
  input  logic signed [TW-1:0] cps,   // C + S
  input  logic signed [TW-1:0] cms,   // C - S
  output logic signed [DW:0]   r,     // real part of the product
  output logic signed [DW:0]   i      // imaginary part of the product
);

  localparam int unsigned FW = DW + TW + 2;  // full-precision sum width

  logic signed [DW:0]        d;       // X - Y
  logic signed [DW+TW:0]     pz;      // C*(X-Y)
  logic signed [DW+TW-1:0]   px;      // X*(C+S)
  logic signed [DW+TW-1:0]   py;      // Y*(C-S)
  logic signed [FW-1:0]      r_full, i_full;

  assign d = (DW+1)'(x) - (DW+1)'(y);

  signed_mult #(.N(DW + 1), .M(TW)) u_mz (.a(d), .b(c),   .p(pz));
  signed_mult #(.N(DW),     .M(TW)) u_mx (.a(x), .b(cps), .p(px));
  signed_mult #(.N(DW),     .M(TW)) u_my (.a(y), .b(cms), .p(py));

  localparam logic signed [FW-1:0] HALF = FW'(1) <<< (FRAC - 1);

  assign r_full = FW'(pz) + FW'(py) + HALF;
  assign i_full = FW'(px) - FW'(pz) + HALF;

  assign r = (DW+1)'(r_full >>> FRAC);
  assign i = (DW+1)'(i_full >>> FRAC);

endmodule
