// complex_mult_tb: drives the three-multiplier complex multiplier with random
// samples and random twiddle angles (plus the corner samples) and compares R
// and I with the four-multiplier formula R = C*X - S*Y, I = S*X + C*Y,
// rounded half up after dropping 14 fractional bits.
module complex_mult_tb;
  import tb_dft_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic signed [15:0] x, y, c, cps, cms;
  logic signed [16:0] r, i;

  complex_mult dut (.x(x), .y(y), .c(c), .cps(cps), .cms(cms), .r(r), .i(i));

  initial begin
    for (int t = 0; t < 5000; t++) begin
      longint cc, ss, er, ei;
      int k, n;
      n = 1 + int'($urandom % 64);
      k = int'($urandom % 64);
      cc = tw_re(k, n, 14);
      ss = tw_im(k, n, 14);
      x = 16'($urandom);
      y = 16'($urandom);
      case (t % 7)
        0: begin x = 16'sh8000; y = 16'sh8000; end
        1: begin x = 16'sh7FFF; y = 16'sh8000; end
        2: begin x = 16'sh8000; y = 16'sh7FFF; end
        default: ;
      endcase
      c   = 16'(cc);
      cps = 16'(cc + ss);
      cms = 16'(cc - ss);
      #1;
      rot_ref(longint'(x), longint'(y), cc, ss, 14, er, ei);
      checks++;
      if (longint'(r) != er || longint'(i) != ei) begin
        failures++;
        $display("FAIL (%0d,%0d)*W%0d^%0d: exp (%0d,%0d) got (%0d,%0d)", x, y, n, k, er, ei, r, i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
