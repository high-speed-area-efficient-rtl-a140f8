// twiddle_rot: multiplies a complex sample by the constant twiddle W_NPT^K.
//
// The twiddle's coefficients C, C+S and C-S are taken from the constant
// functions of fft_pkg at elaboration time and fed to a three-multiplier
// complex_mult. When K is a multiple of NPT the twiddle is 1 and the sample is
// only sign-extended, so no multiplier is built. The output is one bit wider
// than the input in both cases, so that a butterfly's rotated inputs share a
// width. Purely combinational.
module twiddle_rot
  import fft_pkg::*;
#(
  parameter int unsigned DW  = 16,  // sample width
  parameter int unsigned K   = 1,   // twiddle exponent
  parameter int unsigned NPT = 8    // transform size of the twiddle
) (
  input  logic signed [DW-1:0] xr,
  input  logic signed [DW-1:0] xi,
  output logic signed [DW:0]   yr,
  output logic signed [DW:0]   yi
);

  if (K % NPT == 0) begin : g_unity
    assign yr = (DW+1)'(xr);
    assign yi = (DW+1)'(xi);
  end else begin : g_rot
    localparam logic signed [TW-1:0] C   = TW'(tw_c(int'(K % NPT), int'(NPT)));
    localparam logic signed [TW-1:0] CPS = TW'(tw_cps(int'(K % NPT), int'(NPT)));
    localparam logic signed [TW-1:0] CMS = TW'(tw_cms(int'(K % NPT), int'(NPT)));
    complex_mult #(.DW(DW), .TW(TW), .FRAC(FRAC)) u_cm (
      .x(xr), .y(xi), .c(C), .cps(CPS), .cms(CMS), .r(yr), .i(yi)
    );
  end

endmodule
