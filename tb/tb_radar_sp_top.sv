// tb_radar_sp_top -- end-to-end testbench of the radar signal processor.
//
// Acts as the echo simulator, the DSP-side reader and the host at once, with the
// processor at its default (full) size:
//   * Channel A receives the P-band BPSK echoes of two point targets: the coded
//     pulse (copied from the tx chip stream) delayed by 2R/c, with a phase that
//     advances from pulse to pulse by the target's Doppler; channel B receives the
//     D-band de-ramped beat echoes: in every sweep a tone at R/dR + v/v_max range
//     bins whose phase advances by v/v_max cycles per sweep (so the Doppler of
//     the fast target folds), 200 MSPS on the 250 MHz clock. Both carry noise.
//   * On every GPIO8/GPIO9 interrupt the frame of that band is read back through
//     the interface RAM port, its structure and check word verified, and the
//     done flag acknowledged.
//   * Every fused target must match one of the true targets within 1 m and 5 m/s,
//     both targets must be reported for every complete CPI, and fusion of a CPI
//     must end before the end of the following CPI (real time).
// Mechanisms counted (each must occur): GPIO8 and GPIO9 interrupts, acknowledged
// done flags, ping-pong bank swaps in both MTDs, agglomeration merging several
// detections into one point, and a fused target whose D-band Doppler was
// ambiguous (N_D != 0) as well as one that was not.
module tb_radar_sp_top;
  import radar_pkg::*;
  // Defaults of radar_sp_top, repeated here for the echo model.
  localparam int    NPULSE = 64, NSWEEP = 256, NRANGE = 128, PRI = 3840, SWP = 960;
  localparam int    CPI = NPULSE * PRI;
  localparam real   P_VSPAN = 8000.0;     // m/s covered by the P-band Doppler FFT
  localparam real   VMAX_D  = 956.95;     // m/s, D-band unambiguous interval
  localparam real   DR_D    = 0.5;        // m, D-band range bin
  localparam real   ADC_M   = 0.6;        // m of range per 250 MSPS sample
  localparam int    NTGT = 2;
  localparam real   TR [NTGT] = '{40.0, 25.0};     // true ranges, m
  localparam real   TV [NTGT] = '{1500.0, 150.0};  // true radial velocities, m/s
  localparam int    NCPI = 3;

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
    repeat (CPI * (NCPI + 2)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  // ---------------- echo simulator ----------------
  int cyc = 0, pt = 0, pm = -1, st = 0, sm = -1, sn = 0;
  bit chips [$];            // chips of the current pulse, from the tx stream
  bit code [0:30];
  int ncode = 0;
  int cpi_idx = -1;

  function automatic int noise(input int a);
    return int'($urandom_range(2 * a)) - a;
  endfunction

  always @(negedge clk) if (enable) begin
    real are, aim, bre, bim;
    cyc++;
    // timing seen by the simulator in this clock
    if (cpi_start) cpi_idx++;
    if (pri_start) begin pt = 0; pm = (cpi_start || pm < 0) ? 0 : pm + 1; end
    else pt++;
    if (sweep_start) begin st = 0; sm = (cpi_start || sm < 0) ? 0 : sm + 1; sn = 0; end
    if (sym_stb && ncode < 31) begin code[ncode] = sym; ncode++; end
    // channel A: P-band BPSK echoes
    are = 0; aim = 0;
    if (pm >= 0) begin
      for (int t = 0; t < NTGT; t++) begin
        int d, k;
        real ph;
        d = $rtoi(TR[t] / ADC_M + 0.5);
        k = (pt - d) / 4;
        if (pt >= d && k < ncode) begin
          ph = 2.0 * 3.141592653589793 * (TV[t] / P_VSPAN) * pm;
          are += (code[k] ? -3000.0 : 3000.0) * $cos(ph);
          aim += (code[k] ? -3000.0 : 3000.0) * $sin(ph);
        end
      end
    end
    adc_a_valid = 1;
    adc_a_data.re = 16'($rtoi(are) + noise(300));
    adc_a_data.im = 16'($rtoi(aim) + noise(300));
    // channel B: D-band beat echoes, 4 valid samples in 5 clocks
    adc_b_valid = (cyc % 5 != 0);
    bre = 0; bim = 0;
    if (sm >= 0) begin
      for (int t = 0; t < NTGT; t++) begin
        real fb, fd, ph;
        fd = TV[t] / VMAX_D;                 // Doppler in cycles per sweep
        fb = TR[t] / DR_D + fd;              // beat frequency in range bins
        ph = 2.0 * 3.141592653589793 * (fb * (sn - 1) / NRANGE + fd * sm);
        bre += 3000.0 * $cos(ph);
        bim += 3000.0 * $sin(ph);
      end
    end
    adc_b_data.re = 16'($rtoi(bre) + noise(200));
    adc_b_data.im = 16'($rtoi(bim) + noise(200));
    if (adc_b_valid && !sweep_start) sn++;
  end

  // ---------------- DSP-side frame reader ----------------
  int n_irq8 = 0, n_irq9 = 0, n_frames = 0, n_acks = 0;

  task automatic read_frame(input bit band);
    logic [31:0] w, sum, l;
    sum = 0;
    rd_band = band;
    rd_addr = 0; @(negedge clk); w = rd_data; sum += w;
    chk(w == (band ? FRAME_ID_D : FRAME_ID_P), "frame id");
    rd_addr = 1; @(negedge clk); sum += rd_data;
    rd_addr = 2; @(negedge clk); sum += rd_data;
    chk(rd_data == {25'd0, band ? WAVE_LFMCW : WAVE_BPSK}, "waveform type");
    rd_addr = 3; @(negedge clk); sum += rd_data; w = rd_data;
    chk(w > 0, "frame holds detections");
    rd_addr = 4; @(negedge clk); sum += rd_data; l = rd_data;
    chk(l == 2 * w, "data length");
    for (int a = 5; a < 5 + int'(l); a++) begin
      rd_addr = 16'(a); @(negedge clk); sum += rd_data;
    end
    rd_addr = 16'(5 + l); @(negedge clk);
    chk(rd_data == sum, "check word");
    n_frames++;
  endtask

  initial begin
    wait (rst_n);
    forever begin
      @(negedge clk);
      if (gpio8 || gpio9) begin
        bit band;
        band = gpio9;
        if (gpio8) n_irq8++; else n_irq9++;
        read_frame(band);
        if (band) ack_d = 1; else ack_p = 1;
        @(negedge clk);
        ack_p = 0; ack_d = 0;
        @(negedge clk);
        chk(band ? !lfmcw_done : !bpsk_done, "ack clears done flag");
        n_acks++;
      end
    end
  end

  // ---------------- host: fused targets ----------------
  int n_fused_tot = 0, n_amb = 0, n_unamb = 0, n_fusions = 0;
  int seen [NTGT];
  int last_cpi_start = 0, fused_cpis = 0;
  int cpi_starts [$];

  always @(posedge clk) begin
    if (cpi_start) cpi_starts.push_back(cyc);
    if (fused_valid) begin
      bit ok;
      real r, v;
      r = fused.range_cm / 100.0; v = fused.vel_cms / 100.0;
      ok = 0;
      for (int t = 0; t < NTGT; t++)
        if (r - TR[t] < 1.0 && TR[t] - r < 1.0 && v - TV[t] < 5.0 && TV[t] - v < 5.0) begin
          ok = 1; seen[t]++;
          if (TV[t] > VMAX_D / 2) n_amb++; else n_unamb++;
        end
      chk(ok, "fused target matches a true target");
      $display("fused target: %0.2f m, %0.2f m/s", r, v);
      n_fused_tot++;
    end
    if (fusion_done) begin
      n_fusions++;
      // the CPI fused here ended at the start of the latest CPI; fusion must
      // finish before the next CPI boundary
      chk(cpi_starts.size() >= 2 && cyc - cpi_starts[cpi_starts.size() - 1] < CPI, "real-time fusion");
      $display("fusion %0d done %0d clocks after the CPI ended", n_fusions, cyc - cpi_starts[cpi_starts.size() - 1]);
    end
  end

  // ---------------- mechanism counters ----------------
  int n_swap_p = 0, n_swap_d = 0, raw_p = 0, cond_p = 0, raw_d = 0, cond_d = 0;
  logic wb_p, wb_d;
  int max_np = 0, max_nd = 0, max_pc = 0, max_dc = 0;
  always @(posedge clk) begin
    if (int'(n_p) > max_np) max_np = int'(n_p);
    if (int'(n_d) > max_nd) max_nd = int'(n_d);
    if (int'(p_det_cnt) > max_pc) max_pc = int'(p_det_cnt);
    if (int'(d_det_cnt) > max_dc) max_dc = int'(d_det_cnt);
    if (dut.u_bpsk.u_mtd.wbank != wb_p) n_swap_p++;
    if (dut.u_lfmcw.u_mtd.wbank != wb_d) n_swap_d++;
    wb_p = dut.u_bpsk.u_mtd.wbank;
    wb_d = dut.u_lfmcw.u_mtd.wbank;
    if (dut.p_det_valid) raw_p++;
    if (dut.d_det_valid) raw_d++;
    if (dut.p_c_valid) cond_p++;
    if (dut.d_c_valid) cond_d++;
  end

  initial begin
    repeat (4) @(negedge clk);
    rst_n = 1;
    wb_p = 0; wb_d = 0;
    repeat (2) @(negedge clk);
    enable = 1;
    // NCPI CPIs of echoes; CPI k is fused during CPI k+1
    while (cpi_idx < NCPI) @(negedge clk);
    repeat (100) @(negedge clk);
    $display("irq8 %0d irq9 %0d frames %0d acks %0d swaps %0d/%0d raw/condensed P %0d/%0d D %0d/%0d",
             n_irq8, n_irq9, n_frames, n_acks, n_swap_p, n_swap_d, raw_p, cond_p, raw_d, cond_d);
    chk(n_fusions == NCPI - 1, "one fusion per completed CPI");
    chk(n_fused_tot == NTGT * (NCPI - 1), "every target fused every CPI");
    for (int t = 0; t < NTGT; t++) chk(seen[t] == NCPI - 1, "each target reported");
    chk(n_irq8 >= NCPI - 1 && n_irq9 >= NCPI - 1, "GPIO8/GPIO9 interrupts");
    chk(n_acks == n_irq8 + n_irq9, "all frames acknowledged");
    chk(n_swap_p >= NCPI && n_swap_d >= NCPI, "ping-pong swaps");
    chk(raw_p > cond_p && raw_d > cond_d, "agglomeration merged detections");
    chk(n_amb > 0, "ambiguous D-band Doppler resolved");
    chk(n_unamb > 0, "unambiguous target fused");
    chk(err_flags == 0, "no overrun");
    chk(p_frame_drop == 0 && d_frame_drop == 0 && p_cond_drop == 0 && d_cond_drop == 0, "nothing dropped");
    chk(max_np > 0 && max_nd > 0 && max_pc > 0 && max_dc > 0, "status counters");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
