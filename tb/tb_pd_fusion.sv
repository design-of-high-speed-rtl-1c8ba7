// tb_pd_fusion -- self-checking testbench for P/D band fusion.
//
// Part 1 loads the three targets of the worked example (P-band: 31.3 m/489.28
// m/s, 40.9 m/1465.84 m/s, 50.5 m/2442.5 m/s; D-band: 30.07 m/501.89 m/s,
// 40.12 m/543.02 m/s, 51.08 m/587.87 m/s) and checks the fused results against
// the published fused values (30.07/501.89, 39.6/1500.0, 50.1/2501.7) within
// 0.1 m and 0.1 m/s.
// Part 2 runs random lists (pairing on the D-band range corrected by the
// candidate's ambiguity multiple, the block's default), including D-band targets with no P-band partner and
// P-band lists in random order; the expected pairs, ambiguity multiples and
// corrected values are computed here with real arithmetic and compared exactly,
// as is the number of fused targets and the done pulse. Half of the P-band
// targets get a neighbour within the pairing window with another velocity and
// magnitude; the expected partner is the strongest candidate (the first on a tie).
module tb_pd_fusion;
  import radar_pkg::*;
  localparam int VMAX = 95695, DR = 50, MATCH = 240;

  logic clk = 0, rst_n = 1, clear = 0, p_wr = 0, d_wr = 0, start = 0;
  initial #1 rst_n = 0;  // falling edge: asynchronous reset before the first clock
  tgt_t p_tgt = '0, d_tgt = '0;
  logic [31:0] p_mag = '0;
  logic busy, fused_valid, done;
  tgt_t fused;
  logic [15:0] n_fused, n_p, n_d;
  int checks = 0, failures = 0;

  pd_fusion #(.VMAX_CMS(VMAX), .DR_AMB_CM(DR), .MATCH_CM(MATCH)) dut (.*);

  always #2 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  tgt_t got [$];
  always @(posedge clk) if (fused_valid) got.push_back(fused);

  task automatic load(input tgt_t pl [$], input int pm [$], input tgt_t dl [$]);
    clear = 1; @(negedge clk); clear = 0;
    foreach (pl[i]) begin p_wr = 1; p_tgt = pl[i]; p_mag = pm[i]; @(negedge clk); end
    p_wr = 0;
    foreach (dl[i]) begin d_wr = 1; d_tgt = dl[i]; @(negedge clk); end
    d_wr = 0;
    got.delete();
    start = 1; @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    @(negedge clk);
  endtask

  function automatic tgt_t mk(input int r, input int v);
    tgt_t t;
    t.range_cm = r; t.vel_cms = v;
    return t;
  endfunction

  initial begin
    tgt_t pl [$], dl [$];
    int pm [$];
    int exp_r [$], exp_v [$];
    repeat (3) @(negedge clk);
    rst_n = 1;
    // ---- Part 1: worked example ----
    pl = '{mk(3130, 48928), mk(4090, 146584), mk(5050, 244250)};
    dl = '{mk(3007, 50189), mk(4012, 54302), mk(5108, 58787)};
    pm = '{1000, 1000, 1000};
    load(pl, pm, dl);
    exp_r = '{3007, 3960, 5010};
    exp_v = '{50189, 150000, 250170};
    checks++;
    if (got.size() != 3 || n_fused != 16'd3) begin failures++; $display("fused %0d", got.size()); end
    for (int i = 0; i < 3 && i < got.size(); i++) begin
      int er, ev;
      er = got[i].range_cm - exp_r[i]; ev = got[i].vel_cms - exp_v[i];
      checks++;
      if (er > 10 || er < -10 || ev > 10 || ev < -10) begin
        failures++;
        $display("target %0d: %0d cm %0d cm/s", i, got[i].range_cm, got[i].vel_cms);
      end
    end
    // ---- Part 2: random lists ----
    for (int trial = 0; trial < 40; trial++) begin
      int np, nd;
      pl.delete(); pm.delete(); dl.delete(); exp_r.delete(); exp_v.delete();
      np = $urandom_range(6); nd = $urandom_range(6);
      for (int i = 0; i < np; i++)
        pl.push_back(mk(1000 * i + 500 + int'($urandom_range(200)), int'($urandom_range(700000)) - 350000));
      // some P-band targets get a weaker or stronger neighbour in the same
      // pairing window with another velocity (e.g. a range sidelobe)
      for (int i = 0; i < np; i++)
        if ($urandom_range(1) == 1)
          pl.push_back(mk(pl[i].range_cm + int'($urandom_range(200)) - 100,
                          int'($urandom_range(700000)) - 350000));
      foreach (pl[i]) pm.push_back(int'($urandom_range(1000, 1)));
      pl.shuffle();
      for (int i = 0; i < nd; i++)
        dl.push_back(mk(1000 * int'($urandom_range(7)) + 400 + int'($urandom_range(400)),
                        int'($urandom_range(VMAX)) - VMAX / 2));
      // reference
      foreach (dl[d]) begin
        int best, bn;
        best = -1; bn = 0;
        foreach (pl[p]) begin
          int diff, n;
          n = $rtoi($floor(real'(pl[p].vel_cms - dl[d].vel_cms) / VMAX + 0.5));
          diff = pl[p].range_cm - (dl[d].range_cm - n * DR);
          if (diff < MATCH && diff > -MATCH && (best < 0 || pm[p] > pm[best])) begin
            best = p; bn = n;
          end
        end
        if (best >= 0) begin
          exp_r.push_back(dl[d].range_cm - bn * DR);
          exp_v.push_back(dl[d].vel_cms + bn * VMAX);
        end
      end
      load(pl, pm, dl);
      checks++;
      if (got.size() != exp_r.size() || n_fused != 16'(exp_r.size())) begin
        failures++; $display("trial %0d: %0d fused, expected %0d", trial, got.size(), exp_r.size());
      end else begin
        foreach (got[i]) begin
          checks++;
          if (got[i].range_cm != exp_r[i] || got[i].vel_cms != exp_v[i]) begin
            failures++;
            $display("trial %0d target %0d: %0d/%0d exp %0d/%0d", trial, i, got[i].range_cm, got[i].vel_cms, exp_r[i], exp_v[i]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
