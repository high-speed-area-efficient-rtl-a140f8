// bfly_r2: radix-2 decimation-in-time butterfly.
//
// Input B is first rotated by the twiddle W = W_NPT^Q, then the two outputs
// are A + W*B and A - W*B: a multiplication followed by additions, the DIT
// order. With ROT = 0 the butterfly has no twiddle (W = 1) and no widening
// for it; with ROT = 1 the rotated operands are one bit wider (see
// twiddle_rot). Outputs grow one more bit for the addition, so
// OW = IW + ROT + 1 and no result overflows. Purely combinational.
module bfly_r2 #(
  parameter int unsigned IW  = 16,  // input width
  parameter bit          ROT = 1,   // 1: rotate B by W_NPT^Q
  parameter int unsigned Q   = 1,   // twiddle exponent
  parameter int unsigned NPT = 8,   // transform size of the twiddle
  localparam int unsigned RW = IW + 32'(ROT),
  localparam int unsigned OW = RW + 1
) (
  input  logic signed [IW-1:0] xr [2],  // [0] = A, [1] = B
  input  logic signed [IW-1:0] xi [2],
  output logic signed [OW-1:0] yr [2],  // [0] = A + WB, [1] = A - WB
  output logic signed [OW-1:0] yi [2]
);

  logic signed [RW-1:0] ar, ai, br, bi;

  assign ar = RW'(xr[0]);
  assign ai = RW'(xi[0]);
  if (ROT) begin : g_rot
    twiddle_rot #(.DW(IW), .K(Q), .NPT(NPT)) u_rot (
      .xr(xr[1]), .xi(xi[1]), .yr(br), .yi(bi)
    );
  end else begin : g_norot
    assign br = xr[1];
    assign bi = xi[1];
  end

  assign yr[0] = OW'(ar) + OW'(br);
  assign yi[0] = OW'(ai) + OW'(bi);
  assign yr[1] = OW'(ar) - OW'(br);
  assign yi[1] = OW'(ai) - OW'(bi);

endmodule
