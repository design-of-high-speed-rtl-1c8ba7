// tb_wavegen -- self-checking testbench for the waveform generation control.
//
// Runs the timing generator with a short PRI and sweep and checks: the periods of
// pri_start, sweep_start and cpi_start; the transmit gate length (CODE_LEN chips of
// SYM_DIV clocks); that sym_stb marks every chip; that the chips of one pulse form
// an M-sequence (balanced, and periodic autocorrelation -1 at every non-zero
// shift, computed here from the captured chips); that the chips repeat identically
// in every pulse; that pulse_idx/sweep_idx count and wrap; and that cpi_ref is
// high exactly during the first PRI of each CPI.
module tb_wavegen;
  localparam int SYM_DIV = 4, CODE_DEG = 5, PRI = 160, NP = 4, SWP = 80, NS = 8;
  localparam int CODE_LEN = (1 << CODE_DEG) - 1;

  logic clk = 0, rst_n = 1, enable = 0;
  initial #1 rst_n = 0;  // falling edge: asynchronous reset before the first clock
  logic cpi_start, cpi_ref, pri_start, tx_gate, sym, sym_stb, sweep_start;
  logic [15:0] pulse_idx, sweep_idx, pri_cnt, cpi_cnt;
  int checks = 0, failures = 0;

  wavegen #(.SYM_DIV(SYM_DIV), .CODE_DEG(CODE_DEG), .PRI_CYCLES(PRI), .NUM_PULSES(NP),
            .SWEEP_CYCLES(SWP), .NUM_SWEEPS(NS)) dut (.*);

  always #2 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  int cyc = 0, last_pri = -1, last_swp = -1, last_cpi = -1, tx_len = 0, n_pri = 0;
  int n_cpi = 0, n_swp = 0, stb_cnt = 0;
  logic [CODE_LEN-1:0] chips, first_chips;
  int chip_i;
  logic [15:0] exp_pulse = 0, exp_sweep = 0;

  always @(posedge clk) if (rst_n && enable) begin
    cyc++;
    if (pri_start) begin
      if (last_pri >= 0) chk(cyc - last_pri == PRI, "PRI period");
      if (last_pri >= 0) chk(tx_len == CODE_LEN * SYM_DIV, "tx gate length");
      if (last_pri >= 0) chk(stb_cnt == CODE_LEN, "chip strobes per pulse");
      if (n_pri == 1) first_chips = chips;
      if (n_pri >= 2) chk(chips == first_chips, "code repeats every pulse");
      chk(pulse_idx == exp_pulse, "pulse index");
      exp_pulse = (exp_pulse == NP - 1) ? 0 : exp_pulse + 1;
      last_pri = cyc; tx_len = 0; stb_cnt = 0; chip_i = 0; n_pri++;
      chk(tx_gate, "tx gate starts with PRI");
    end
    if (tx_gate) tx_len++;
    if (sym_stb) begin
      chk(tx_gate, "strobe inside tx gate");
      if (chip_i < CODE_LEN) chips[chip_i] = sym;
      chip_i++; stb_cnt++;
    end
    if (sweep_start) begin
      if (last_swp >= 0) chk(cyc - last_swp == SWP, "sweep period");
      chk(sweep_idx == exp_sweep, "sweep index");
      exp_sweep = (exp_sweep == NS - 1) ? 0 : exp_sweep + 1;
      last_swp = cyc; n_swp++;
    end
    if (cpi_start) begin
      if (last_cpi >= 0) chk(cyc - last_cpi == PRI * NP, "CPI period");
      chk(pri_start && sweep_start, "CPI aligns PRI and sweep");
      chk(pulse_idx == 0 && sweep_idx == 0, "CPI starts at index 0");
      last_cpi = cyc; n_cpi++;
    end
    if (n_pri > 0) chk(cpi_ref == (pulse_idx == 0), "cpi_ref during first PRI");
  end

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    enable = 1;
    repeat (PRI * NP * 3 - 10) @(posedge clk);
    // M-sequence properties of the captured chips.
    begin
      int ones = 0;
      for (int k = 0; k < CODE_LEN; k++) ones += first_chips[k];
      chk(ones == (CODE_LEN + 1) / 2, "M-sequence balance");
      for (int s = 1; s < CODE_LEN; s++) begin
        int acc;
        acc = 0;
        for (int k = 0; k < CODE_LEN; k++)
          acc += (first_chips[k] == first_chips[(k + s) % CODE_LEN]) ? 1 : -1;
        chk(acc == -1, "M-sequence autocorrelation");
      end
    end
    chk(n_cpi == 3, "three CPIs");
    chk(n_swp == NS * 3, "sweep count");
    chk(cpi_cnt == 16'd3 && pri_cnt == 16'(NP * 3), "PRI/CPI counters");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
