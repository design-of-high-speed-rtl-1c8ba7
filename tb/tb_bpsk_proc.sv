// tb_bpsk_proc -- self-checking testbench for the BPSK echo processing chain.
//
// Generates symbol-rate echoes of a point target: the M-sequence delayed to range
// gate G0, with a phase that advances by 2*pi*K0/NPULSE from pulse to pulse
// (Doppler bin K0), plus low-level random noise. After the CPI closes the chain
// must report the target: the strongest detection at (G0, K0), its magnitude
// close to the value predicted here (compression gain CODE_LEN/2^CODE_DEG times
// the echo amplitude, |I|+|Q| of the Doppler peak), every detection in Doppler
// bin K0 (range sidelobes of the code can also be detected), exactly one map_done,
// and the map finished within one CPI of the CPI's end (real-time).
module tb_bpsk_proc;
  import radar_pkg::*;
  localparam int CODE_DEG = 5, GATES = 16, NP = 16, PRI = 100;
  localparam int P = (1 << CODE_DEG) - 1;
  localparam int G0 = 6, K0 = 3, AMP = 8000;
  localparam logic [1022:0] CODE = mseq_bits(CODE_DEG);

  logic clk = 0, rst_n = 1, pri_start = 0, sym_valid = 0;
  initial #1 rst_n = 0;  // falling edge: asynchronous reset before the first clock
  logic [15:0] pulse_idx = 0;
  cplx_t sym_data = '0;
  logic det_valid, map_done, mtd_overrun, cfar_overrun;
  det_t det;
  int checks = 0, failures = 0;

  bpsk_proc #(.CODE_DEG(CODE_DEG), .GATES(GATES), .NPULSE(NP), .REF(4), .GUARD(1)) dut (.*);

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
    if (mtd_overrun || cfar_overrun) n_ovr++;
  end

  task automatic run_cpi(input bit target);
    for (int m = 0; m < NP; m++) begin
      real ph;
      ph = 2.0 * 3.141592653589793 * K0 * m / NP;
      pri_start = 1; pulse_idx = 16'(m);
      @(negedge clk);
      pri_start = 0;
      for (int n = 0; n < PRI - 1; n++) begin
        int k;
        real a;
        k = n - G0;
        a = (target && k >= 0 && k < P) ? (CODE[k] ? -AMP : AMP) : 0.0;
        sym_valid = 1;
        sym_data.re = 16'($rtoi(a * $cos(ph)) + int'($urandom_range(20)) - 10);
        sym_data.im = 16'($rtoi(a * $sin(ph)) + int'($urandom_range(20)) - 10);
        @(negedge clk);
      end
      sym_valid = 0;
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
    if (t_done - t_end > NP * PRI) begin failures++; $display("map took %0d clocks", t_done - t_end); end
    checks++;
    if (dets.size() == 0) begin failures++; $display("no detections"); end
    else begin
      det_t best;
      real expm;
      best = dets[0];
      foreach (dets[i]) begin
        if (dets[i].mag > best.mag) best = dets[i];
        checks++;
        if (dets[i].dop != 16'(K0)) begin failures++; $display("detection in bin %0d", dets[i].dop); end
      end
      // compressed amplitude per pulse, then |I|+|Q| of the Doppler peak
      // the Doppler bin of a phasor starting at phase 0 is real: |I|+|Q| = amplitude
      expm = real'((AMP * P) >>> CODE_DEG);
      checks++;
      if (best.gate != 16'(G0) || best.dop != 16'(K0)) begin
        failures++; $display("peak at %0d/%0d", best.gate, best.dop);
      end
      checks++;
      if (real'(best.mag) < 0.95 * expm || real'(best.mag) > 1.05 * expm) begin
        failures++; $display("peak magnitude %0d expected %f", best.mag, expm);
      end
    end
    checks++;
    if (n_ovr != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
