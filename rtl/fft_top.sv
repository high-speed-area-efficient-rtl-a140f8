// fft_top: the design's transform units side by side.
//
// Holds the three combinational FFTs (9-point radix-3, 16-point radix-4 and
// 8-point radix-2, all decimation in time) and the unsigned array multiplier,
// each with its own ports. Every unit has a register stage on its outputs:
// when a unit's in_valid is high at a rising clock edge, its result for the
// inputs applied in that cycle is loaded, and its out_valid is high for the
// following cycle. The latency is therefore one clock cycle and a new
// transform can be started every cycle; the clock period must cover the
// combinational path of the FFT, which is the delay the design is measured
// by. The output registers, the valid signals and the active-low synchronous
// reset (which clears only the valid flags) are this design's own choices.
module fft_top #(
  parameter int unsigned DW = 16,  // FFT input sample width
  parameter int unsigned AN = 4,   // array multiplier: multiplier width
  parameter int unsigned AM = 4,   // array multiplier: multiplicand width
  localparam int unsigned OW = DW + 5
) (
  input  logic                 clk,
  input  logic                 rst_n,

  // 9-point radix-3 FFT
  input  logic                 f9_in_valid,
  input  logic signed [DW-1:0] f9_xr [9],
  input  logic signed [DW-1:0] f9_xi [9],
  output logic                 f9_out_valid,
  output logic signed [OW-1:0] f9_yr [9],
  output logic signed [OW-1:0] f9_yi [9],

  // 16-point radix-4 FFT
  input  logic                 f16_in_valid,
  input  logic signed [DW-1:0] f16_xr [16],
  input  logic signed [DW-1:0] f16_xi [16],
  output logic                 f16_out_valid,
  output logic signed [OW-1:0] f16_yr [16],
  output logic signed [OW-1:0] f16_yi [16],

  // 8-point radix-2 FFT
  input  logic                 f8_in_valid,
  input  logic signed [DW-1:0] f8_xr [8],
  input  logic signed [DW-1:0] f8_xi [8],
  output logic                 f8_out_valid,
  output logic signed [OW-1:0] f8_yr [8],
  output logic signed [OW-1:0] f8_yi [8],

  // unsigned array multiplier
  input  logic                 am_in_valid,
  input  logic [AN-1:0]        am_a,
  input  logic [AM-1:0]        am_b,
  output logic                 am_out_valid,
  output logic [AN+AM-1:0]     am_p
);

  logic signed [OW-1:0] f9_r [9],  f9_i [9];
  logic signed [OW-1:0] f16_r [16], f16_i [16];
  logic signed [OW-1:0] f8_r [8],  f8_i [8];
  logic [AN+AM-1:0]     am_c;

  fft9_r3  #(.DW(DW)) u_fft9  (.xr(f9_xr),  .xi(f9_xi),  .yr(f9_r),  .yi(f9_i));
  fft16_r4 #(.DW(DW)) u_fft16 (.xr(f16_xr), .xi(f16_xi), .yr(f16_r), .yi(f16_i));
  fft8_r2  #(.DW(DW)) u_fft8  (.xr(f8_xr),  .xi(f8_xi),  .yr(f8_r),  .yi(f8_i));
  array_mult #(.N(AN), .M(AM)) u_am (.a(am_a), .b(am_b), .p(am_c));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      f9_out_valid  <= 1'b0;
      f16_out_valid <= 1'b0;
      f8_out_valid  <= 1'b0;
      am_out_valid  <= 1'b0;
    end else begin
      f9_out_valid  <= f9_in_valid;
      f16_out_valid <= f16_in_valid;
      f8_out_valid  <= f8_in_valid;
      am_out_valid  <= am_in_valid;
    end
  end

  always_ff @(posedge clk) begin
    if (f9_in_valid) begin
      f9_yr <= f9_r;
      f9_yi <= f9_i;
    end
    if (f16_in_valid) begin
      f16_yr <= f16_r;
      f16_yi <= f16_i;
    end
    if (f8_in_valid) begin
      f8_yr <= f8_r;
      f8_yi <= f8_i;
    end
    if (am_in_valid) am_p <= am_c;
  end

endmodule
