// bfly_r4_tb: checks the radix-4 butterfly bit-exactly for Q = 0..3 with
// N = 16 (Q = 1 is the default) and without rotation, on random and
// full-scale operands. The reference rotates input m by W16^(mQ) with the
// exact fixed-point formula and takes the 4-point DFT with integer sums.
module bfly_r4_tb;
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

  logic signed [15:0] xr [4], xi [4];
  logic signed [18:0] yr [4][4], yi [4][4];
  logic signed [17:0] zr [4], zi [4];

  bfly_r4 #(.Q(0)) u_q0 (.xr(xr), .xi(xi), .yr(yr[0]), .yi(yi[0]));
  bfly_r4          u_q1 (.xr(xr), .xi(xi), .yr(yr[1]), .yi(yi[1]));
  bfly_r4 #(.Q(2)) u_q2 (.xr(xr), .xi(xi), .yr(yr[2]), .yi(yi[2]));
  bfly_r4 #(.Q(3)) u_q3 (.xr(xr), .xi(xi), .yr(yr[3]), .yi(yi[3]));
  bfly_r4 #(.ROT(1'b0)) u_nr (.xr(xr), .xi(xi), .yr(zr), .yi(zi));

  task automatic cmp(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: expected %0d got %0d", what, exp, got);
    end
  endtask

  // 4-point DFT: X(k) = sum_m a(m) (-j)^(mk).
  function automatic void r4_ref(input longint ar[4], input longint ai[4],
                                 output longint er[4], output longint ei[4]);
    for (int k = 0; k < 4; k++) begin
      er[k] = 0;
      ei[k] = 0;
      for (int m = 0; m < 4; m++) begin
        case ((m * k) % 4)
          0: begin er[k] += ar[m]; ei[k] += ai[m]; end  // *1
          1: begin er[k] += ai[m]; ei[k] -= ar[m]; end  // *(-j)
          2: begin er[k] -= ar[m]; ei[k] -= ai[m]; end  // *(-1)
          default: begin er[k] -= ai[m]; ei[k] += ar[m]; end  // *(+j)
        endcase
      end
    end
  endfunction

  initial begin
    for (int t = 0; t < 3000; t++) begin
      for (int m = 0; m < 4; m++) begin
        xr[m] = 16'($urandom);
        xi[m] = 16'($urandom);
        if (t == 0) begin xr[m] = 16'sh8000; xi[m] = 16'sh8000; end
        if (t == 1) begin xr[m] = 16'sh7FFF; xi[m] = (m % 2 == 0) ? 16'sh7FFF : 16'sh8000; end
      end
      #1;
      for (int q = 0; q < 4; q++) begin
        longint ar[4], ai[4], er[4], ei[4];
        for (int m = 0; m < 4; m++)
          rot_ref(longint'(xr[m]), longint'(xi[m]), tw_re(m * q, 16, 14), tw_im(m * q, 16, 14),
                  14, ar[m], ai[m]);
        r4_ref(ar, ai, er, ei);
        for (int m = 0; m < 4; m++) begin
          cmp($sformatf("q%0d y%0dr", q, m), longint'(yr[q][m]), er[m]);
          cmp($sformatf("q%0d y%0di", q, m), longint'(yi[q][m]), ei[m]);
        end
      end
      begin
        longint ar[4], ai[4], er[4], ei[4];
        for (int m = 0; m < 4; m++) begin ar[m] = longint'(xr[m]); ai[m] = longint'(xi[m]); end
        r4_ref(ar, ai, er, ei);
        for (int m = 0; m < 4; m++) begin
          cmp($sformatf("nr y%0dr", m), longint'(zr[m]), er[m]);
          cmp($sformatf("nr y%0di", m), longint'(zi[m]), ei[m]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
