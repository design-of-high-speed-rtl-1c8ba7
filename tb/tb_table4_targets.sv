// tb_table4_targets -- accuracy test of the full-size processor over a grid of
// single targets.
//
// Runs radar_sp_top at its default size once per scenario, one target per
// scenario, at ranges of 1, 25 and 55 m and radial velocities of 150 and 3000 m/s
// (the grid of the original processor's echo-simulator test; its 75 m points lie
// beyond the 64 m reach of the 128-bin D-band range FFT and are left out). For
// each scenario the processor is reset, the echoes of the target are synthesised
// on both converter channels (same echo model as tb_radar_sp_top: coded P-band
// pulses with pulse-to-pulse Doppler phase, D-band beat tones whose Doppler folds
// at 956.95 m/s), and three CPIs are run. Every complete CPI must yield exactly
// one fused target with a range error below 1 m and a velocity error below 3 m/s,
// the accuracy the original processor reports. A scenario at 3000 m/s folds the
// D-band Doppler three times, so it exercises N_D = 3; at 150 m/s N_D = 0.
// Frames are acknowledged on every interrupt so the done flags keep working.
module tb_table4_targets;
  import radar_pkg::*;
  localparam int    NPULSE = 64, NRANGE = 128, PRI = 3840;
  localparam int    CPI = NPULSE * PRI;
  localparam real   P_VSPAN = 8000.0;
  localparam real   VMAX_D  = 956.95;
  localparam real   DR_D    = 0.5;
  localparam real   ADC_M   = 0.6;
  localparam int    NCPI = 3;
  localparam int    NSC = 6;
  localparam real   SR [NSC] = '{1.0, 1.0, 25.0, 25.0, 55.0, 55.0};
  localparam real   SV [NSC] = '{150.0, 3000.0, 150.0, 3000.0, 150.0, 3000.0};

  logic clk = 0, rst_n = 1, enable = 0;
  initial #1 rst_n = 0;  // falling edge: asynchronous reset before the first clock
  logic adc_a_valid = 0, adc_b_valid = 0;
  cplx_t adc_a_data = '0, adc_b_data = '0;
  logic cpi_start, cpi_ref, pri_start, tx_gate, sym, sym_stb, sweep_start;
  logic gpio8, gpio9, bpsk_done, lfmcw_done;
  logic ack_p = 0, ack_d = 0, rd_band = 0;
  logic [15:0] rd_addr = 0;
  logic [31:0] rd_data;
  logic fused_valid, fusion_done, fusion_busy;
  tgt_t fused;
  logic [15:0] n_fused;
  logic [4:0] err_flags;
  logic [15:0] p_det_cnt, d_det_cnt, p_frame_drop, d_frame_drop, p_cond_drop, d_cond_drop, n_p, n_d;
  int checks = 0, failures = 0;

  radar_sp_top dut (.*);

  always #2 clk = ~clk;

  initial begin
    repeat (NSC * CPI * (NCPI + 1)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  // ---------------- echo simulator (one target) ----------------
  real tr = 1.0, tv = 0.0;
  int pt = 0, pm = -1, sm = -1, sn = 0, ncode = 0, cpi_idx = -1;
  bit code [0:30];

  function automatic int noise(input int a);
    return int'($urandom_range(2 * a)) - a;
  endfunction

  always @(negedge clk) if (enable) begin
    real are, aim, bre, bim, ph, fb, fd;
    int d, k;
    cyc++;
    if (cpi_start) cpi_idx++;
    if (pri_start) begin pt = 0; pm = (cpi_start || pm < 0) ? 0 : pm + 1; end
    else pt++;
    if (sweep_start) begin sm = (cpi_start || sm < 0) ? 0 : sm + 1; sn = 0; end
    if (sym_stb && ncode < 31) begin code[ncode] = sym; ncode++; end
    are = 0; aim = 0;
    if (pm >= 0) begin
      d = $rtoi(tr / ADC_M + 0.5);
      k = (pt - d) / 4;
      if (pt >= d && k < ncode) begin
        ph = 2.0 * 3.141592653589793 * (tv / P_VSPAN) * pm;
        are = (code[k] ? -3000.0 : 3000.0) * $cos(ph);
        aim = (code[k] ? -3000.0 : 3000.0) * $sin(ph);
      end
    end
    adc_a_valid = 1;
    adc_a_data.re = 16'($rtoi(are) + noise(300));
    adc_a_data.im = 16'($rtoi(aim) + noise(300));
    adc_b_valid = (cyc % 5 != 0);
    bre = 0; bim = 0;
    if (sm >= 0) begin
      fd = tv / VMAX_D;
      fb = tr / DR_D + fd;
      ph = 2.0 * 3.141592653589793 * (fb * (sn - 1) / NRANGE + fd * sm);
      bre = 3000.0 * $cos(ph);
      bim = 3000.0 * $sin(ph);
    end
    adc_b_data.re = 16'($rtoi(bre) + noise(200));
    adc_b_data.im = 16'($rtoi(bim) + noise(200));
    if (adc_b_valid && !sweep_start) sn++;
  end

  // ---------------- frame acknowledge ----------------
  int n_irq = 0;
  initial begin
    forever begin
      @(negedge clk);
      if (gpio8 || gpio9) begin
        n_irq++;
        ack_p = gpio8; ack_d = gpio9;
        @(negedge clk);
        ack_p = 0; ack_d = 0;
      end
    end
  end

  // ---------------- fused target checks ----------------
  int n_good = 0, n_bad = 0, n_runs = 0;
  always @(posedge clk) begin
    if (fused_valid) begin
      real r, v;
      r = fused.range_cm / 100.0; v = fused.vel_cms / 100.0;
      $display("  fused %0.2f m %0.2f m/s (true %0.1f m %0.1f m/s)", r, v, tr, tv);
      if (r - tr < 1.0 && tr - r < 1.0 && v - tv < 3.0 && tv - v < 3.0) n_good++;
      else n_bad++;
    end
    if (fusion_done) n_runs++;
  end

  initial begin
    int amb = 0, unamb = 0;
    for (int s = 0; s < NSC; s++) begin
      tr = SR[s]; tv = SV[s];
      rst_n = 0; enable = 0;
      repeat (4) @(negedge clk);
      pm = -1; sm = -1; sn = 0; ncode = 0; cpi_idx = -1;
      n_good = 0; n_bad = 0; n_runs = 0;
      rst_n = 1;
      repeat (2) @(negedge clk);
      enable = 1;
      while (cpi_idx < NCPI) @(negedge clk);
      repeat (100) @(negedge clk);
      $display("scenario %0d: %0.1f m %0.1f m/s: %0d fusions, %0d within 1 m / 3 m/s, %0d outside",
               s, tr, tv, n_runs, n_good, n_bad);
      chk(n_runs == NCPI - 1, "one fusion per completed CPI");
      chk(n_good == NCPI - 1, "target fused within 1 m and 3 m/s in every CPI");
      chk(n_bad == 0, "no wrong fused target");
      chk(err_flags == 0, "no overrun");
      if (tv > VMAX_D / 2) amb++; else unamb++;
    end
    chk(amb > 0 && unamb > 0, "both folded and unfolded D-band Doppler covered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
