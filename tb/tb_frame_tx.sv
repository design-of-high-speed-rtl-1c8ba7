// tb_frame_tx -- self-checking testbench for the result framing module.
//
// Sends three CPIs of detections (5, then 2, then more than MAX_TGT), reads every
// frame back through the one-clock-latency read port and checks each word: frame
// identifier, PRI/CPI counters, waveform type, target count, data length, the
// two-word target records and the 32-bit check word (recomputed here as the sum of
// all preceding words). It checks that done_flag rises with a single irq pulse,
// falls on 'ack' and on the next CPI's first detection, and that detections beyond
// MAX_TGT are dropped and counted.
module tb_frame_tx;
  import radar_pkg::*;
  localparam int MAX_TGT = 8;

  logic clk = 0, rst_n = 1, det_valid = 0, map_done = 0, ack = 0;
  initial #1 rst_n = 0;  // falling edge: asynchronous reset before the first clock
  det_t det = '0;
  logic [15:0] pri_cnt = 0, cpi_cnt = 0, rd_addr = 0;
  logic [31:0] rd_data;
  logic done_flag, irq;
  logic [15:0] tgt_count, dropped;
  int checks = 0, failures = 0;

  frame_tx #(.MAX_TGT(MAX_TGT), .FRAME_ID(32'h5A5A_0009), .WAVE(7'd2)) dut (.*);

  always #2 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_irq = 0;
  always @(posedge clk) if (irq) n_irq++;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic read_word(input int a, output logic [31:0] w);
    rd_addr = 16'(a);
    @(negedge clk);
    w = rd_data;
  endtask

  task automatic run_cpi(input int n, input int pri, input int cpi);
    det_t d [$];
    logic [31:0] w, sum;
    int kept, irq0;
    irq0 = n_irq;
    for (int i = 0; i < n; i++) begin
      det_t x;
      x.gate = 16'($urandom_range(127)); x.dop = 16'($urandom_range(255)); x.mag = $urandom;
      d.push_back(x);
      det_valid = 1; det = x;
      map_done = (i == n - 1);       // last detection arrives with map_done
      pri_cnt = 16'(pri); cpi_cnt = 16'(cpi);
      @(negedge clk);
      if (i == 0) chk(!done_flag, "done falls with first detection");
      det_valid = 0; map_done = 0;
      repeat ($urandom_range(3)) @(negedge clk);
    end
    repeat (3) @(negedge clk);
    chk(done_flag, "done flag set");
    chk(n_irq == irq0 + 1, "one irq per frame");
    kept = n < MAX_TGT ? n : MAX_TGT;
    chk(tgt_count == 16'(kept), "tgt_count");
    sum = 0;
    read_word(0, w); chk(w == 32'h5A5A_0009, "frame id"); sum += w;
    read_word(1, w); chk(w == {16'(pri), 16'(cpi)}, "pri/cpi"); sum += w;
    read_word(2, w); chk(w == 32'd2, "waveform"); sum += w;
    read_word(3, w); chk(w == 32'(kept), "target count"); sum += w;
    read_word(4, w); chk(w == 32'(2 * kept), "length"); sum += w;
    for (int t = 0; t < kept; t++) begin
      read_word(5 + 2 * t, w); chk(w == {d[t].gate, d[t].dop}, "gate/dop word"); sum += w;
      read_word(6 + 2 * t, w); chk(w == d[t].mag, "mag word"); sum += w;
    end
    read_word(5 + 2 * kept, w); chk(w == sum, "check word");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_cpi(5, 320, 5);
    ack = 1; @(negedge clk); ack = 0; @(negedge clk);
    chk(!done_flag, "ack clears done");
    run_cpi(2, 384, 6);
    run_cpi(MAX_TGT + 3, 448, 7);
    chk(dropped == 16'd3, "dropped count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
