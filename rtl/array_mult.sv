// array_mult: unsigned N-bit by M-bit array multiplier with an N+M bit product.
//
// The multiplier is built in the three steps of the design's multiplier flow:
//   1. partial product generator: row j is a AND b[j], weighted 2**j;
//   2. multi-operand addition: the rows are accumulated by a carry-save array,
//      one rank of full adders per row, keeping a sum and a carry vector;
//   3. carry-propagate adder: a ripple-carry chain of full adders merges the
//      sum and carry vectors into the product.
// Default size 4 x 4 follows the worked array example of the design. The
// carry-save array with a ripple-carry final adder is this design's reading of
// the "array" structure. Purely combinational; no clock.
module array_mult #(
  parameter int unsigned N = 4,  // multiplier width
  parameter int unsigned M = 4   // multiplicand width
) (
  input  logic [N-1:0]   a,  // multiplier
  input  logic [M-1:0]   b,  // multiplicand
  output logic [N+M-1:0] p   // product a*b
);

  localparam int unsigned PW = N + M;

  // Step 1: partial products, already shifted into product columns.
  logic [PW-1:0] pp [M];
  always_comb begin
    for (int j = 0; j < M; j++) begin
      pp[j] = '0;
      for (int i = 0; i < N; i++) pp[j][i+j] = a[i] & b[j];
    end
  end

  // Step 2: carry-save array. After row j, sum + carry equals the sum of rows 0..j.
  logic [PW-1:0] sv, cv;
  always_comb begin
    logic [PW-1:0] ns, nc;
    sv = pp[0];
    cv = '0;
    for (int j = 1; j < M; j++) begin
      nc = '0;
      for (int k = 0; k < PW; k++) begin
        ns[k] = sv[k] ^ cv[k] ^ pp[j][k];
        if (k + 1 < PW) nc[k+1] = (sv[k] & cv[k]) | (sv[k] & pp[j][k]) | (cv[k] & pp[j][k]);
      end
      sv = ns;
      cv = nc;
    end
  end

  // Step 3: ripple-carry adder.
  always_comb begin
    logic c;
    c = 1'b0;
    for (int k = 0; k < PW; k++) begin
      p[k] = sv[k] ^ cv[k] ^ c;
      c    = (sv[k] & cv[k]) | (sv[k] & c) | (cv[k] & c);
    end
  end

endmodule
