// fft_top_tb: end-to-end test of the whole design at its default sizes.
//
// For 3000 clock cycles every unit (9-, 16- and 8-point FFT and the array
// multiplier) gets a new random input with probability 3/4 per cycle, so
// runs of back-to-back transforms and idle gaps both occur; a synchronous
// reset is applied once in the middle of the run. Each cycle the testbench
// checks, for every unit:
//   - out_valid equals in_valid of the previous cycle (latency one cycle,
//     one transform per cycle), and is low right after reset;
//   - after a valid input, the outputs match the double-precision DFT of that
//     input within 16 LSBs (exactly, for the multiplier);
//   - after an idle cycle, the outputs still hold the previous result.
// It counts back-to-back transforms, idle holds and resets per unit and
// fails if any of them never happened.
module fft_top_tb;
  import tb_dft_pkg::*;

  localparam int DW = 16;
  localparam int OW = DW + 5;
  localparam real TOL = 16.0;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic                 f9_in_valid, f16_in_valid, f8_in_valid, am_in_valid;
  logic                 f9_out_valid, f16_out_valid, f8_out_valid, am_out_valid;
  logic signed [DW-1:0] f9_xr [9],   f9_xi [9];
  logic signed [DW-1:0] f16_xr [16], f16_xi [16];
  logic signed [DW-1:0] f8_xr [8],   f8_xi [8];
  logic signed [OW-1:0] f9_yr [9],   f9_yi [9];
  logic signed [OW-1:0] f16_yr [16], f16_yi [16];
  logic signed [OW-1:0] f8_yr [8],   f8_yi [8];
  logic [3:0]           am_a, am_b;
  logic [7:0]           am_p;

  fft_top dut (.*);

  // Expected values of the registered outputs, per unit: [0] = 9, [1] = 16, [2] = 8
  real  exp_r [3][16], exp_i [3][16];
  logic exp_valid [3];
  int   exp_p;
  logic exp_am_valid;
  logic have_res [4];               // a result has been loaded since time 0
  int   n_b2b [4], n_hold [4], n_reset [4];
  logic prev_in [4];

  localparam int SZ [3] = '{9, 16, 8};

  function automatic void expect_fft(int u, logic signed [DW-1:0] xr[], logic signed [DW-1:0] xi[]);
    real fr[], fi[], er[], ei[];
    fr = new[SZ[u]];
    fi = new[SZ[u]];
    for (int n = 0; n < SZ[u]; n++) begin
      fr[n] = real'(xr[n]);
      fi[n] = real'(xi[n]);
    end
    dft(SZ[u], fr, fi, er, ei);
    for (int k = 0; k < SZ[u]; k++) begin
      exp_r[u][k] = er[k];
      exp_i[u][k] = ei[k];
    end
  endfunction

  task automatic check_fft(int u, logic signed [OW-1:0] yr[], logic signed [OW-1:0] yi[]);
    for (int k = 0; k < SZ[u]; k++) begin
      checks++;
      if (rabs(real'(yr[k]) - exp_r[u][k]) > TOL || rabs(real'(yi[k]) - exp_i[u][k]) > TOL) begin
        failures++;
        $display("FAIL %0d-point X(%0d) at %0t: expected (%0.1f,%0.1f) got (%0d,%0d)",
                 SZ[u], k, $time, exp_r[u][k], exp_i[u][k], yr[k], yi[k]);
      end
    end
  endtask

  task automatic check_valid(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s out_valid at %0t: expected %0b got %0b", what, $time, exp, got);
    end
  endtask

  // Random stimulus, applied after the clock edge.
  task automatic drive();
    f9_in_valid  = ($urandom % 4) != 0;
    f16_in_valid = ($urandom % 4) != 0;
    f8_in_valid  = ($urandom % 4) != 0;
    am_in_valid  = ($urandom % 4) != 0;
    foreach (f9_xr[n])  begin f9_xr[n]  = DW'($urandom); f9_xi[n]  = DW'($urandom); end
    foreach (f16_xr[n]) begin f16_xr[n] = DW'($urandom); f16_xi[n] = DW'($urandom); end
    foreach (f8_xr[n])  begin f8_xr[n]  = DW'($urandom); f8_xi[n]  = DW'($urandom); end
    am_a = 4'($urandom);
    am_b = 4'($urandom);
  endtask

  initial begin
    for (int u = 0; u < 4; u++) begin
      have_res[u] = 1'b0; n_b2b[u] = 0; n_hold[u] = 0; n_reset[u] = 0; prev_in[u] = 1'b0;
    end
    rst_n = 1'b0;
    f9_in_valid = 1'b0; f16_in_valid = 1'b0; f8_in_valid = 1'b0; am_in_valid = 1'b0;
    drive();
    f9_in_valid = 1'b0; f16_in_valid = 1'b0; f8_in_valid = 1'b0; am_in_valid = 1'b0;
    repeat (3) @(posedge clk);
    #1;
    check_valid("9-point after reset", f9_out_valid, 1'b0);
    check_valid("16-point after reset", f16_out_valid, 1'b0);
    check_valid("8-point after reset", f8_out_valid, 1'b0);
    check_valid("multiplier after reset", am_out_valid, 1'b0);
    rst_n = 1'b1;

    for (int cyc = 0; cyc < 3000; cyc++) begin
      logic in_now [4];
      logic rst_now;
      drive();
      rst_now = (cyc == 1500);
      if (rst_now) rst_n = 1'b0;
      in_now = '{f9_in_valid, f16_in_valid, f8_in_valid, am_in_valid};
      // model: compute what the registers will hold after this edge
      if (f9_in_valid)  expect_fft(0, f9_xr, f9_xi);
      if (f16_in_valid) expect_fft(1, f16_xr, f16_xi);
      if (f8_in_valid)  expect_fft(2, f8_xr, f8_xi);
      if (am_in_valid)  exp_p = int'(am_a) * int'(am_b);
      @(posedge clk);
      #1;
      for (int u = 0; u < 4; u++) begin
        if (in_now[u]) have_res[u] = 1'b1;
        if (in_now[u] && prev_in[u]) n_b2b[u]++;
        if (!in_now[u] && have_res[u]) n_hold[u]++;
        if (rst_now) n_reset[u]++;
        prev_in[u] = in_now[u];
      end
      check_valid("9-point",    f9_out_valid,  in_now[0] && !rst_now);
      check_valid("16-point",   f16_out_valid, in_now[1] && !rst_now);
      check_valid("8-point",    f8_out_valid,  in_now[2] && !rst_now);
      check_valid("multiplier", am_out_valid,  in_now[3] && !rst_now);
      if (have_res[0]) check_fft(0, f9_yr, f9_yi);
      if (have_res[1]) check_fft(1, f16_yr, f16_yi);
      if (have_res[2]) check_fft(2, f8_yr, f8_yi);
      if (have_res[3]) begin
        checks++;
        if (int'(am_p) != exp_p) begin
          failures++;
          $display("FAIL multiplier at %0t: expected %0d got %0d", $time, exp_p, am_p);
        end
      end
      rst_n = 1'b1;
    end

    for (int u = 0; u < 4; u++) begin
      $display("unit %0d: back-to-back %0d, idle holds %0d, resets %0d", u, n_b2b[u], n_hold[u],
               n_reset[u]);
      checks++;
      if (n_b2b[u] == 0 || n_hold[u] == 0 || n_reset[u] == 0) begin
        failures++;
        $display("FAIL unit %0d: a mechanism was never exercised", u);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
