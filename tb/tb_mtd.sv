// tb_mtd -- self-checking testbench for the corner turn and Doppler FFT.
//
// Writes CPIs of random pulse-by-range-gate data. The testbench computes the
// expected Doppler spectrum (DFT over the pulses of each gate, divided by NPULSE)
// with real arithmetic and checks every output bin, the gate/bin numbering, the
// out_last marker and that every map is complete. The second CPI is written while
// the first is being read out (ping-pong); a third CPI written at full speed
// closes while the second is still being read and must raise 'overrun' and be
// discarded.
module tb_mtd;
  import radar_pkg::*;
  localparam int GATES = 8, NP = 16, TOL = 6;

  logic clk = 0, rst_n = 1, in_valid = 0;
  initial #1 rst_n = 0;  // falling edge: asynchronous reset before the first clock
  logic [15:0] in_pulse = 0, in_gate = 0;
  cplx_t in_data = '0;
  logic out_valid, out_last, busy, overrun;
  logic [15:0] out_gate, out_dop;
  cplx_t out_data;
  int checks = 0, failures = 0;

  mtd #(.GATES(GATES), .NPULSE(NP)) dut (.*);

  always #2 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int dr [3][NP][GATES];
  int di [3][NP][GATES];
  int rd_cpi = 0, n_bins = 0, n_maps = 0, n_ovr = 0;

  always @(posedge clk) begin
    if (overrun) n_ovr++;
    if (out_valid) begin
      real er, ei, d1, d2;
      er = 0; ei = 0;
      for (int m = 0; m < NP; m++) begin
        real c, s;
        c = $cos(2.0 * 3.141592653589793 * out_dop * m / NP);
        s = $sin(2.0 * 3.141592653589793 * out_dop * m / NP);
        er += dr[rd_cpi][m][out_gate] * c + di[rd_cpi][m][out_gate] * s;
        ei += di[rd_cpi][m][out_gate] * c - dr[rd_cpi][m][out_gate] * s;
      end
      er /= NP; ei /= NP;
      d1 = out_data.re - er; d2 = out_data.im - ei;
      checks++;
      if (d1 > TOL || d1 < -TOL || d2 > TOL || d2 < -TOL ||
          out_gate != 16'(n_bins / NP) || out_dop != 16'(n_bins % NP)) begin
        failures++;
        if (failures < 10) $display("cpi %0d gate %0d dop %0d got %0d exp %f", rd_cpi, out_gate, out_dop, out_data.re, er);
      end
      checks++;
      if (out_last != (n_bins == GATES * NP - 1)) failures++;
      n_bins++;
      if (out_last) begin n_maps++; n_bins = 0; rd_cpi++; end
    end
  end

  task automatic write_cpi(input int c, input int gap);
    for (int m = 0; m < NP; m++)
      for (int g = 0; g < GATES; g++) begin
        dr[c][m][g] = int'($urandom_range(30000)) - 15000;
        di[c][m][g] = int'($urandom_range(30000)) - 15000;
      end
    for (int m = 0; m < NP; m++)
      for (int g = 0; g < GATES; g++) begin
        in_valid = 1; in_pulse = 16'(m); in_gate = 16'(g);
        in_data.re = 16'(dr[c][m][g]); in_data.im = 16'(di[c][m][g]);
        @(negedge clk);
        in_valid = 0;
        repeat (gap) @(negedge clk);
      end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    write_cpi(0, 4);
    write_cpi(1, 4);
    write_cpi(2, 0);
    wait (!busy);
    repeat (20) @(negedge clk);
    checks++;
    if (n_maps != 2) begin failures++; $display("maps %0d", n_maps); end
    checks++;
    if (n_ovr != 1) begin failures++; $display("overruns %0d", n_ovr); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
