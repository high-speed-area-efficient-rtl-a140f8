// fft9_r3_tb: checks the 9-point FFT against a direct double-precision DFT.
//
// Stimuli: an impulse at every position and a constant (within 1 LSB of
// the exact spectrum), a single complex tone per frequency bin, full-scale
// corner vectors and random full-scale vectors. Every output bin is
// compared with the DFT of the same input; the tolerance covers the 14-bit
// twiddle quantisation and the rounding (TOL LSBs, about 2**-16 of the
// output range).
module fft9_r3_tb;
  import tb_dft_pkg::*;

  localparam int N  = 9;
  localparam int DW = 16;
  localparam int OW = DW + 5;
  localparam real TOL = 16.0;

  int checks = 0, failures = 0;
  real max_err = 0.0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic signed [DW-1:0] xr [N], xi [N];
  logic signed [OW-1:0] yr [N], yi [N];

  fft9_r3 dut (.xr(xr), .xi(xi), .yr(yr), .yi(yi));

  task automatic run(string what, real tol);
    real fr[], fi[], er[], ei[];
    fr = new[N];
    fi = new[N];
    for (int n = 0; n < N; n++) begin
      fr[n] = real'(xr[n]);
      fi[n] = real'(xi[n]);
    end
    #1;
    dft(N, fr, fi, er, ei);
    for (int k = 0; k < N; k++) begin
      real e;
      e = rabs(real'(yr[k]) - er[k]);
      if (rabs(real'(yi[k]) - ei[k]) > e) e = rabs(real'(yi[k]) - ei[k]);
      if (e > max_err) max_err = e;
      checks++;
      if (e > tol) begin
        failures++;
        $display("FAIL %s X(%0d): expected (%0.1f,%0.1f) got (%0d,%0d)", what, k, er[k], ei[k],
                 yr[k], yi[k]);
      end
    end
  endtask

  initial begin
    // impulses: exact
    for (int p = 0; p < N; p++) begin
      for (int n = 0; n < N; n++) begin xr[n] = '0; xi[n] = '0; end
      xr[p] = 16'sd1000;
      run($sformatf("impulse %0d", p), 1.0);
    end
    // constant
    for (int n = 0; n < N; n++) begin xr[n] = 16'sd20000; xi[n] = -16'sd12000; end
    run("constant", 1.0);
    // tones
    for (int f = 0; f < N; f++) begin
      for (int n = 0; n < N; n++) begin
        xr[n] = 16'(qround(30000.0 * $cos(2.0 * PI * real'((f * n) % N) / real'(N))));
        xi[n] = 16'(qround(30000.0 * $sin(2.0 * PI * real'((f * n) % N) / real'(N))));
      end
      run($sformatf("tone %0d", f), TOL);
    end
    // corners
    for (int n = 0; n < N; n++) begin xr[n] = 16'sh8000; xi[n] = 16'sh8000; end
    run("all -32768", 1.0);
    for (int n = 0; n < N; n++) begin
      xr[n] = (n % 2 == 0) ? 16'sh7FFF : 16'sh8000;
      xi[n] = (n % 3 == 0) ? 16'sh8000 : 16'sh7FFF;
    end
    run("alternating full scale", TOL);
    // random
    for (int t = 0; t < 2000; t++) begin
      for (int n = 0; n < N; n++) begin
        xr[n] = 16'($urandom);
        xi[n] = 16'($urandom);
      end
      run("random", TOL);
    end
    $display("largest deviation from the exact DFT: %0.2f LSB", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
