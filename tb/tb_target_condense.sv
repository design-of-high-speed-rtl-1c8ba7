// tb_target_condense -- self-checking testbench for target agglomeration.
//
// Builds detection lists in the order the CFAR produces them (range gate by range
// gate, Doppler bins ascending) from well separated targets, each spread over a
// random patch of up to 3 x 3 neighbouring cells with one strongest cell. After
// 'flush' exactly one point per target must come out, in order of each target's
// first detection, carrying the strongest cell's gate, bin and magnitude; then
// out_done. A second list checks that the block starts empty again, and a list
// with more targets than MAXC checks the drop counter.
module tb_target_condense;
  import radar_pkg::*;
  localparam int MAXC = 8;

  logic clk = 0, rst_n = 1, in_valid = 0, flush = 0;
  initial #1 rst_n = 0;  // falling edge: asynchronous reset before the first clock
  det_t in_det = '0;
  logic out_valid, out_done;
  det_t out_det;
  logic [15:0] dropped;
  int checks = 0, failures = 0;

  target_condense #(.MAXC(MAXC)) dut (.*);

  always #2 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  det_t got [$];
  int n_done = 0;
  always @(posedge clk) begin
    if (out_valid) got.push_back(out_det);
    if (out_done) n_done++;
  end

  task automatic run_list(input int ntgt);
    // targets on a coarse grid so patches never touch
    det_t cells [$];
    det_t peaks [$];
    int first_key [$];
    int order [$];
    for (int t = 0; t < ntgt; t++) begin
      int g0, d0, gh, dh, pg, pd;
      g0 = 10 * (t % 6) + 2; d0 = 12 * (t / 6) + 3;
      gh = $urandom_range(2); dh = $urandom_range(2);
      pg = g0 + int'($urandom_range(gh)); pd = d0 + int'($urandom_range(dh));
      for (int g = g0; g <= g0 + gh; g++)
        for (int d = d0; d <= d0 + dh; d++) begin
          det_t c;
          c.gate = 16'(g); c.dop = 16'(d);
          c.mag = (g == pg && d == pd) ? 32'd5000 + 32'(t) : 32'(100 + $urandom_range(1000));
          cells.push_back(c);
          if (g == pg && d == pd) peaks.push_back(c);
        end
    end
    cells.sort() with ({item.gate, item.dop});
    // expected order: by first (raster) appearance of each target
    foreach (cells[i]) begin
      foreach (peaks[t]) begin
        if (cells[i].gate + 2 >= peaks[t].gate && cells[i].gate <= peaks[t].gate + 2 &&
            cells[i].dop + 2 >= peaks[t].dop && cells[i].dop <= peaks[t].dop + 2) begin
          bit seen; seen = 0;
          foreach (order[k]) if (order[k] == t) seen = 1;
          if (!seen) order.push_back(t);
        end
      end
    end
    got.delete();
    foreach (cells[i]) begin
      in_valid = 1; in_det = cells[i]; @(negedge clk);
      in_valid = 0;
      repeat ($urandom_range(2)) @(negedge clk);
    end
    flush = 1; @(negedge clk); flush = 0;
    repeat (MAXC + 4) @(negedge clk);
    checks++;
    if (got.size() != (ntgt < MAXC ? ntgt : MAXC)) begin
      failures++; $display("got %0d points for %0d targets", got.size(), ntgt);
    end
    for (int i = 0; i < got.size() && i < order.size(); i++) begin
      checks++;
      if (got[i] != peaks[order[i]]) begin
        failures++;
        $display("point %0d: %0d/%0d/%0d exp %0d/%0d/%0d", i, got[i].gate, got[i].dop, got[i].mag,
                 peaks[order[i]].gate, peaks[order[i]].dop, peaks[order[i]].mag);
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_list(5);
    run_list(7);
    checks++;
    if (n_done != 2 || dropped != 0) failures++;
    run_list(11);
    checks++;
    if (dropped == 0) begin failures++; $display("no drops counted"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
