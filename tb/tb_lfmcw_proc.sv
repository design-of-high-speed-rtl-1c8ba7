// tb_lfmcw_proc -- self-checking testbench for the LFMCW two-dimensional FFT chain.
//
// Generates de-ramped beat echoes of a point target: a complex tone at range bin
// B0 inside every sweep whose phase advances by 2*pi*K0/NSWEEP from sweep to sweep
// (Doppler bin K0), sampled at 4 of every 5 clocks (200 MSPS on a 250 MHz clock),
// plus low-level noise. After the CPI the chain must report a single target at
// (B0, K0) with magnitude close to the tone amplitude (both FFTs scale by 1/N, so
// a bin-centred tone keeps its amplitude), one map_done, no overrun, and the map
// must be finished within one CPI after the CPI ends.
module tb_lfmcw_proc;
  import radar_pkg::*;
  localparam int NR = 32, NS = 16, SWP = 200;
  localparam int B0 = 9, K0 = 11, AMP = 9000;

  logic clk = 0, rst_n = 1, sweep_start = 0, in_valid = 0;
  initial #1 rst_n = 0;  // falling edge: asynchronous reset before the first clock
  logic [15:0] sweep_idx = 0;
  cplx_t in_data = '0;
  logic det_valid, map_done, range_overrun, mtd_overrun, cfar_overrun;
  det_t det;
  int checks = 0, failures = 0;

  lfmcw_proc #(.NRANGE(NR), .NSWEEP(NS), .REF(4), .GUARD(1)) dut (.*);

  always #2 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  det_t dets [$];
  int n_done = 0, t_done = 0, cyc = 0, n_ovr = 0;
  always @(posedge clk) begin
    cyc++;
    if (det_valid) dets.push_back(det);
    if (map_done) begin n_done++; t_done = cyc; end
    if (range_overrun || mtd_overrun || cfar_overrun) n_ovr++;
  end

  task automatic run_cpi(input bit target);
    for (int m = 0; m < NS; m++) begin
      int n;
      sweep_start = 1; sweep_idx = 16'(m);
      @(negedge clk);
      sweep_start = 0;
      n = 0;
      for (int t = 0; t < SWP - 1; t++) begin
        in_valid = (t % 5 != 4);
        if (in_valid) begin
          real ph, a;
          a = target ? AMP : 0.0;
          ph = 2.0 * 3.141592653589793 * (real'(B0 * n) / NR + real'(K0 * m) / NS);
          in_data.re = 16'($rtoi(a * $cos(ph)) + int'($urandom_range(20)) - 10);
          in_data.im = 16'($rtoi(a * $sin(ph)) + int'($urandom_range(20)) - 10);
          n++;
        end
        @(negedge clk);
      end
      in_valid = 0;
    end
  endtask

  initial begin
    int t_end;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_cpi(1);
    t_end = cyc;
    run_cpi(0);
    checks++;
    if (n_done != 1) begin failures++; $display("map_done %0d", n_done); end
    checks++;
    if (t_done - t_end > NS * SWP) begin failures++; $display("map took %0d clocks", t_done - t_end); end
    checks++;
    if (dets.size() != 1) begin failures++; $display("%0d detections", dets.size()); end
    foreach (dets[i]) begin
      checks++;
      if (dets[i].gate != 16'(B0) || dets[i].dop != 16'(K0) ||
          real'(dets[i].mag) < 0.95 * AMP || real'(dets[i].mag) > 1.05 * AMP) begin
        failures++;
        $display("detection %0d/%0d mag %0d", dets[i].gate, dets[i].dop, dets[i].mag);
      end
    end
    checks++;
    if (n_ovr != 0) begin failures++; $display("overrun"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
