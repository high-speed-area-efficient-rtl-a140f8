// signed_mult_tb: checks the Baugh-Wooley multiplier exhaustively at its
// default 5 x 5 size (all 1024 operand pairs, including -16 * -16) and with
// random and corner operands at 17 x 16 and 6 x 9, against the signed
// integer product.
module signed_mult_tb;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic signed [4:0]  a5, b5;
  logic signed [9:0]  p5;
  logic signed [16:0] a17;
  logic signed [15:0] b16;
  logic signed [32:0] p17;
  logic signed [5:0]  a6;
  logic signed [8:0]  b9;
  logic signed [14:0] p69;

  signed_mult                  u_5  (.a(a5),  .b(b5),  .p(p5));
  signed_mult #(.N(17), .M(16)) u_17 (.a(a17), .b(b16), .p(p17));
  signed_mult #(.N(6), .M(9))  u_69 (.a(a6),  .b(b9),  .p(p69));

  initial begin
    for (int i = -16; i < 16; i++) begin
      for (int j = -16; j < 16; j++) begin
        a5 = 5'(i);
        b5 = 5'(j);
        #1;
        checks++;
        if (p5 !== 10'(i * j)) begin
          failures++;
          $display("FAIL 5x5: %0d*%0d = %0d, got %0d", i, j, i * j, p5);
        end
      end
    end
    for (int t = 0; t < 3000; t++) begin
      a17 = 17'($urandom);
      b16 = 16'($urandom);
      a6  = 6'($urandom);
      b9  = 9'($urandom);
      case (t)
        0: begin a17 = 17'h10000; b16 = 16'h8000; a6 = 6'h20; b9 = 9'h100; end
        1: begin a17 = 17'h0FFFF; b16 = 16'h8000; a6 = 6'h1F; b9 = 9'h100; end
        2: begin a17 = '1;        b16 = '1;       a6 = '1;    b9 = '1;    end
        default: ;
      endcase
      #1;
      checks += 2;
      if (p17 !== 33'(longint'(a17) * longint'(b16))) begin
        failures++;
        $display("FAIL 17x16: %0d*%0d got %0d", a17, b16, p17);
      end
      if (p69 !== 15'(longint'(a6) * longint'(b9))) begin
        failures++;
        $display("FAIL 6x9: %0d*%0d got %0d", a6, b9, p69);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
