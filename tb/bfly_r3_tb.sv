// bfly_r3_tb: checks the radix-3 butterfly bit-exactly for Q = 0, 1 (the
// default), 2 with N = 9 and without rotation, on random and full-scale
// operands. The reference rotates inputs 1 and 2 by W9^Q and W9^2Q, then
// forms X0 = a+b+c and X1, X2 = a - (b+c)/2 -/+ j*K*(b-c), with
// K = sqrt(3)/2 quantised to 14 fractional bits and rounding half up. A
// second comparison against the floating-point 3-point DFT bounds the error
// to 2 LSBs.
module bfly_r3_tb;
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

  logic signed [15:0] xr [3], xi [3];
  logic signed [18:0] yr [3][3], yi [3][3];
  logic signed [17:0] zr [3], zi [3];

  bfly_r3 #(.Q(0)) u_q0 (.xr(xr), .xi(xi), .yr(yr[0]), .yi(yi[0]));
  bfly_r3          u_q1 (.xr(xr), .xi(xi), .yr(yr[1]), .yi(yi[1]));
  bfly_r3 #(.Q(2)) u_q2 (.xr(xr), .xi(xi), .yr(yr[2]), .yi(yi[2]));
  bfly_r3 #(.ROT(1'b0)) u_nr (.xr(xr), .xi(xi), .yr(zr), .yi(zi));

  task automatic cmp(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: expected %0d got %0d", what, exp, got);
    end
  endtask

  // Exact model of the 3-point DFT stage.
  function automatic void r3_ref(input longint ar[3], input longint ai[3],
                                 output longint er[3], output longint ei[3]);
    longint k, h, tr, ti, dr, di, mr, mi;
    k  = qround($sqrt(3.0) / 2.0 * 16384.0);
    h  = 8192;
    tr = ar[1] + ar[2];
    ti = ai[1] + ai[2];
    dr = ar[1] - ar[2];
    di = ai[1] - ai[2];
    mr = ar[0] * 16384 - tr * 8192 + h;
    mi = ai[0] * 16384 - ti * 8192 + h;
    er[0] = ar[0] + tr;
    ei[0] = ai[0] + ti;
    er[1] = (mr + k * di) >>> 14;
    ei[1] = (mi - k * dr) >>> 14;
    er[2] = (mr - k * di) >>> 14;
    ei[2] = (mi + k * dr) >>> 14;
  endfunction

  initial begin
    for (int t = 0; t < 3000; t++) begin
      for (int m = 0; m < 3; m++) begin
        xr[m] = 16'($urandom);
        xi[m] = 16'($urandom);
        if (t == 0) begin xr[m] = 16'sh8000; xi[m] = 16'sh8000; end
        if (t == 1) begin xr[m] = (m == 0) ? 16'sh7FFF : 16'sh8000; xi[m] = 16'sh7FFF; end
      end
      #1;
      for (int q = 0; q < 3; q++) begin
        longint ar[3], ai[3], er[3], ei[3];
        real fr[], fi[], dr[], di[];
        fr = new[3];
        fi = new[3];
        for (int m = 0; m < 3; m++) begin
          rot_ref(longint'(xr[m]), longint'(xi[m]), tw_re(m * q, 9, 14), tw_im(m * q, 9, 14),
                  14, ar[m], ai[m]);
          fr[m] = real'(ar[m]);
          fi[m] = real'(ai[m]);
        end
        r3_ref(ar, ai, er, ei);
        dft(3, fr, fi, dr, di);
        for (int m = 0; m < 3; m++) begin
          cmp($sformatf("q%0d y%0dr", q, m), longint'(yr[q][m]), er[m]);
          cmp($sformatf("q%0d y%0di", q, m), longint'(yi[q][m]), ei[m]);
          checks++;
          if (rabs(real'(yr[q][m]) - dr[m]) > 2.0 || rabs(real'(yi[q][m]) - di[m]) > 2.0) begin
            failures++;
            $display("FAIL q%0d y%0d far from DFT", q, m);
          end
        end
      end
      begin
        longint ar[3], ai[3], er[3], ei[3];
        for (int m = 0; m < 3; m++) begin ar[m] = longint'(xr[m]); ai[m] = longint'(xi[m]); end
        r3_ref(ar, ai, er, ei);
        for (int m = 0; m < 3; m++) begin
          cmp($sformatf("nr y%0dr", m), longint'(zr[m]), er[m]);
          cmp($sformatf("nr y%0di", m), longint'(zi[m]), ei[m]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
