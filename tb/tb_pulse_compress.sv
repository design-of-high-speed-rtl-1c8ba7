// tb_pulse_compress -- self-checking testbench for the BPSK matched filter.
//
// Three PRIs: two with random samples and random gaps in in_valid, one with a
// clean coded echo. For every output the testbench recomputes the correlation of
// the received window with the transmitted code directly from the stored samples
// and compares it bit-exactly; it checks the gate numbering, that exactly GATES
// gates come per PRI, and that the coded echo compresses into a single peak at
// its delay with all other gates far lower.
module tb_pulse_compress;
  import radar_pkg::*;
  localparam int CODE_DEG = 5, GATES = 40;
  localparam int P = (1 << CODE_DEG) - 1, SKIP = P;
  localparam logic [1022:0] CODE = mseq_bits(CODE_DEG);

  logic clk = 0, rst_n = 1, start = 0, in_valid = 0;
  initial #1 rst_n = 0;  // falling edge: asynchronous reset before the first clock
  cplx_t in_data = '0;
  logic out_valid;
  logic [15:0] out_gate;
  cplx_t out_data;
  int checks = 0, failures = 0;

  pulse_compress #(.CODE_DEG(CODE_DEG), .GATES(GATES), .SKIP(SKIP)) dut (.*);

  always #2 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int xr [SKIP + GATES + P + 8];
  int xi [SKIP + GATES + P + 8];
  int n_out, peak_gate, peak_val, second_val;

  always @(posedge clk) if (out_valid) begin
    int er, ei;
    er = 0; ei = 0;
    for (int k = 0; k < P; k++) begin
      er += CODE[k] ? -xr[SKIP + out_gate + k] : xr[SKIP + out_gate + k];
      ei += CODE[k] ? -xi[SKIP + out_gate + k] : xi[SKIP + out_gate + k];
    end
    er = er >>> CODE_DEG; ei = ei >>> CODE_DEG;
    checks++;
    if (out_data.re != 16'(er) || out_data.im != 16'(ei) || out_gate != 16'(n_out)) begin
      failures++;
      if (failures < 10) $display("gate %0d got %0d exp %0d", out_gate, out_data.re, er);
    end
    if (int'(out_data.re) > peak_val) begin second_val = peak_val; peak_val = out_data.re; peak_gate = out_gate; end
    else if (int'(out_data.re) > second_val) second_val = out_data.re;
    n_out++;
  end

  task automatic pri(input int kind);
    @(negedge clk);
    start = 1; @(negedge clk); start = 0;
    n_out = 0; peak_val = -100000; second_val = -100000; peak_gate = -1;
    for (int n = 0; n < SKIP + GATES + P + 8; n++) begin
      if (kind == 0) begin
        xr[n] = int'($urandom_range(40000)) - 20000;
        xi[n] = int'($urandom_range(40000)) - 20000;
      end else begin
        // echo of the code starting at sample SKIP + 17 (gate 17), amplitude 16000
        int k;
        k = n - (SKIP + 17);
        xr[n] = (k >= 0 && k < P) ? (CODE[k] ? -16000 : 16000) : 0;
        xi[n] = 0;
      end
    end
    for (int n = 0; n < SKIP + GATES + P + 8; n++) begin
      while ($urandom_range(3) == 0) begin in_valid = 0; @(negedge clk); end
      in_valid = 1; in_data.re = 16'(xr[n]); in_data.im = 16'(xi[n]);
      @(negedge clk);
    end
    in_valid = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (n_out != GATES) begin failures++; $display("got %0d gates", n_out); end
    if (kind == 1) begin
      checks++;
      if (peak_gate != 17 || peak_val != (16000 * P) >>> CODE_DEG || second_val * 4 > peak_val) begin
        failures++;
        $display("peak gate %0d val %0d second %0d", peak_gate, peak_val, second_val);
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    pri(0);
    pri(1);
    pri(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
