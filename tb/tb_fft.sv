// tb_fft -- self-checking testbench for the radix-2 FFT.
//
// Feeds blocks of random and single-tone complex samples, computes the expected
// DFT/N with real arithmetic in the testbench and compares every bin within a
// small tolerance. It also checks that the first output bin appears exactly
// N/2*log2(N)+1 clocks after the last input sample, and that a second block is
// accepted after the first has been read out.
module tb_fft;
  import radar_pkg::*;
  localparam int N    = 64;
  localparam int LOGN = $clog2(N);
  localparam int TOL  = 6;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // falling edge: asynchronous reset before the first clock
  logic in_valid;
  cplx_t in_data;
  logic in_ready, out_valid, out_last;
  cplx_t out_data;
  logic [LOGN-1:0] out_idx;
  int checks = 0, failures = 0;

  fft #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real xr [N], xi [N];
  real er [N], ei [N];

  task automatic run_block(input int kind);
    int t_last, t_first, cyc;
    int got;
    // stimulus
    for (int n = 0; n < N; n++) begin
      if (kind == 0) begin
        int ra, rb;
        ra = $urandom_range(20000);
        rb = $urandom_range(20000);
        xr[n] = ra - 10000;
        xi[n] = rb - 10000;
      end else begin
        xr[n] = $rtoi(12000.0 * $cos(2.0 * 3.141592653589793 * 5 * n / N));
        xi[n] = $rtoi(12000.0 * $sin(2.0 * 3.141592653589793 * 5 * n / N));
      end
    end
    // reference DFT / N
    for (int k = 0; k < N; k++) begin
      er[k] = 0.0; ei[k] = 0.0;
      for (int n = 0; n < N; n++) begin
        real c, s;
        c = $cos(2.0 * 3.141592653589793 * k * n / N);
        s = $sin(2.0 * 3.141592653589793 * k * n / N);
        er[k] += xr[n] * c + xi[n] * s;
        ei[k] += xi[n] * c - xr[n] * s;
      end
      er[k] /= N; ei[k] /= N;
    end
    wait (in_ready);
    @(negedge clk);
    for (int n = 0; n < N; n++) begin
      in_valid   = 1;
      in_data.re = 16'($rtoi(xr[n]));
      in_data.im = 16'($rtoi(xi[n]));
      @(negedge clk);
    end
    in_valid = 0;
    cyc = 0;
    while (!out_valid) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != N/2*LOGN + 1) begin
      failures++;
      $display("latency %0d, expected %0d", cyc, N/2*LOGN + 1);
    end
    got = 0;
    while (out_valid) begin
      real dr, di;
      dr = $itor(out_data.re) - er[out_idx];
      di = $itor(out_data.im) - ei[out_idx];
      checks++;
      if (out_idx != LOGN'(got) || dr > TOL || dr < -TOL || di > TOL || di < -TOL) begin
        failures++;
        if (failures < 10)
          $display("bin %0d: got %0d,%0d exp %f,%f", out_idx, out_data.re, out_data.im, er[out_idx], ei[out_idx]);
      end
      if (out_last != (got == N-1)) failures++;
      got++;
      @(negedge clk);
    end
    checks++;
    if (got != N) begin failures++; $display("got %0d bins", got); end
  endtask

  initial begin
    in_valid = 0; in_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_block(1);
    run_block(0);
    run_block(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
