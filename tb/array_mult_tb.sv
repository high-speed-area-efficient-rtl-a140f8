// array_mult_tb: checks the unsigned array multiplier exhaustively at its
// default 4 x 4 size and with random operands at 8 x 6 and 16 x 16, against
// the integer product.
module array_mult_tb;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [3:0]  a4, b4;
  logic [7:0]  p4;
  logic [7:0]  a8;
  logic [5:0]  b6;
  logic [13:0] p86;
  logic [15:0] a16, b16;
  logic [31:0] p16;

  array_mult                  u_4  (.a(a4),  .b(b4),  .p(p4));
  array_mult #(.N(8), .M(6))  u_86 (.a(a8),  .b(b6),  .p(p86));
  array_mult #(.N(16), .M(16)) u_16 (.a(a16), .b(b16), .p(p16));

  initial begin
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        a4 = 4'(i);
        b4 = 4'(j);
        #1;
        checks++;
        if (p4 !== 8'(i * j)) begin
          failures++;
          $display("FAIL 4x4: %0d*%0d = %0d, got %0d", i, j, i * j, p4);
        end
      end
    end
    for (int t = 0; t < 2000; t++) begin
      a8  = 8'($urandom);
      b6  = 6'($urandom);
      a16 = 16'($urandom);
      b16 = 16'($urandom);
      if (t == 0) begin a16 = '1; b16 = '1; a8 = '1; b6 = '1; end
      #1;
      checks += 2;
      if (p86 !== 14'(longint'(a8) * longint'(b6))) begin
        failures++;
        $display("FAIL 8x6: %0d*%0d got %0d", a8, b6, p86);
      end
      if (p16 !== 32'(longint'(a16) * longint'(b16))) begin
        failures++;
        $display("FAIL 16x16: %0d*%0d got %0d", a16, b16, p16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
