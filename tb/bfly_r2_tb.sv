// bfly_r2_tb: checks the radix-2 butterfly bit-exactly. Three instances are
// driven with the same random operands: the default (W = W8^1), W8^2 = -j and
// W8^3, and one without rotation. The reference rotates B with the exact
// fixed-point formula and forms A + WB, A - WB.
module bfly_r2_tb;
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

  localparam int NQ = 4;              // instance q: Q = q, ROT = (q != 0)
  logic signed [15:0] xr [2], xi [2];
  logic signed [17:0] yr [NQ][2], yi [NQ][2];
  logic signed [16:0] zr [2], zi [2];   // ROT = 0 instance

  bfly_r2 u_q1 (.xr(xr), .xi(xi), .yr(yr[1]), .yi(yi[1]));
  bfly_r2 #(.Q(2)) u_q2 (.xr(xr), .xi(xi), .yr(yr[2]), .yi(yi[2]));
  bfly_r2 #(.Q(3)) u_q3 (.xr(xr), .xi(xi), .yr(yr[3]), .yi(yi[3]));
  bfly_r2 #(.Q(0)) u_q0 (.xr(xr), .xi(xi), .yr(yr[0]), .yi(yi[0]));
  bfly_r2 #(.ROT(1'b0)) u_nr (.xr(xr), .xi(xi), .yr(zr), .yi(zi));

  task automatic cmp(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: expected %0d got %0d", what, exp, got);
    end
  endtask

  initial begin
    for (int t = 0; t < 3000; t++) begin
      for (int m = 0; m < 2; m++) begin
        xr[m] = 16'($urandom);
        xi[m] = 16'($urandom);
        if (t == 0) begin xr[m] = 16'sh8000; xi[m] = 16'sh8000; end
        if (t == 1) begin xr[m] = 16'sh7FFF; xi[m] = 16'sh8000; end
      end
      #1;
      for (int q = 0; q < NQ; q++) begin
        longint br, bi;
        rot_ref(longint'(xr[1]), longint'(xi[1]), tw_re(q, 8, 14), tw_im(q, 8, 14), 14, br, bi);
        cmp($sformatf("q%0d y0r", q), longint'(yr[q][0]), longint'(xr[0]) + br);
        cmp($sformatf("q%0d y0i", q), longint'(yi[q][0]), longint'(xi[0]) + bi);
        cmp($sformatf("q%0d y1r", q), longint'(yr[q][1]), longint'(xr[0]) - br);
        cmp($sformatf("q%0d y1i", q), longint'(yi[q][1]), longint'(xi[0]) - bi);
      end
      cmp("nr y0r", longint'(zr[0]), longint'(xr[0]) + longint'(xr[1]));
      cmp("nr y0i", longint'(zi[0]), longint'(xi[0]) + longint'(xi[1]));
      cmp("nr y1r", longint'(zr[1]), longint'(xr[0]) - longint'(xr[1]));
      cmp("nr y1i", longint'(zi[1]), longint'(xi[0]) - longint'(xi[1]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
