// tb_cfar -- self-checking testbench for the cell-averaging CFAR detector.
//
// Sends lines of random noise with injected strong cells (including cells near
// the ends of the line, where the circular window wraps). The testbench computes
// |I|+|Q|, the reference-window sums and the threshold decision directly for every
// cell and compares the list of detections (gate, bin, magnitude, order) exactly.
// It also checks that map_done follows the line flagged as the last of the map
// and nothing else, and that a line arriving too early raises 'overrun'.
module tb_cfar;
  import radar_pkg::*;
  localparam int LEN = 32, REF = 4, GUARD = 1;
  localparam int unsigned ALPHA_Q4 = 64, MIN_MAG = 10;

  logic clk = 0, rst_n = 1, in_valid = 0, in_map_last = 0;
  initial #1 rst_n = 0;  // falling edge: asynchronous reset before the first clock
  logic [15:0] in_line = 0, in_cell = 0;
  cplx_t in_data = '0;
  logic det_valid, map_done, overrun;
  det_t det;
  int checks = 0, failures = 0;

  cfar #(.LEN(LEN), .REF(REF), .GUARD(GUARD), .ALPHA_Q4(ALPHA_Q4), .MIN_MAG(MIN_MAG)) dut (.*);

  always #2 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int exp_g [$], exp_c [$], exp_m [$];
  int n_done = 0, n_ovr = 0, n_det = 0;

  always @(posedge clk) begin
    if (map_done) n_done++;
    if (overrun) n_ovr++;
    if (det_valid) begin
      checks++;
      n_det++;
      if (exp_g.size() == 0) begin
        failures++; $display("unexpected detection %0d/%0d", det.gate, det.dop);
      end else begin
        int g, c, m;
        g = exp_g.pop_front(); c = exp_c.pop_front(); m = exp_m.pop_front();
        if (det.gate != 16'(g) || det.dop != 16'(c) || det.mag != 32'(m)) begin
          failures++;
          $display("det got %0d/%0d/%0d exp %0d/%0d/%0d", det.gate, det.dop, det.mag, g, c, m);
        end
      end
    end
  end

  task automatic send_line(input int line, input bit last, input int gap);
    int mag [LEN];
    cplx_t v [LEN];
    for (int i = 0; i < LEN; i++) begin
      v[i].re = 16'(int'($urandom_range(200)) - 100);
      v[i].im = 16'(int'($urandom_range(200)) - 100);
    end
    // strong cells: one in the middle, one at each end of the line
    v[(line * 7) % LEN].re = 16'(3000 + line);
    if (line % 2 == 0) v[0].im = -16'sd2500;
    if (line % 3 == 0) v[LEN - 1].re = 16'sd2200;
    for (int i = 0; i < LEN; i++)
      mag[i] = (v[i].re < 0 ? -int'(v[i].re) : int'(v[i].re)) + (v[i].im < 0 ? -int'(v[i].im) : int'(v[i].im));
    for (int i = 0; i < LEN; i++) begin
      longint s;
      s = 0;
      for (int r = 1; r <= REF; r++) begin
        s += mag[(i - GUARD - r + LEN) % LEN];
        s += mag[(i + GUARD + r) % LEN];
      end
      if (longint'(mag[i]) * 2 * REF * 16 > longint'(ALPHA_Q4) * s && mag[i] > int'(MIN_MAG)) begin
        exp_g.push_back(line); exp_c.push_back(i); exp_m.push_back(mag[i]);
      end
    end
    for (int i = 0; i < LEN; i++) begin
      in_valid = 1; in_line = 16'(line); in_cell = 16'(i); in_data = v[i];
      in_map_last = last && (i == LEN - 1);
      @(negedge clk);
    end
    in_valid = 0; in_map_last = 0;
    repeat (gap) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int l = 0; l < 12; l++) send_line(l, l == 11, LEN + 2 * REF + 4);
    checks++;
    if (n_done != 1) begin failures++; $display("map_done %0d", n_done); end
    checks++;
    if (exp_g.size() != 0) begin failures++; $display("%0d detections missing", exp_g.size()); end
    checks++;
    if (n_det < 12) failures++;
    // a line sent without the scan gap must be flagged
    send_line(12, 0, 0);
    send_line(13, 0, LEN + 2 * REF + 4);
    checks++;
    if (n_ovr == 0) begin failures++; $display("no overrun flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
