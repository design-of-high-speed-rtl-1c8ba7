// tb_ad_interface -- self-checking testbench for the AD data interface.
//
// Channel A gets random samples every clock with a symbol realignment pulse every
// 42 clocks (not a multiple of 4, so realignment really moves the phase); the
// testbench keeps its own integrate-and-dump model and checks every symbol-rate
// output value and its timing (one clock after the 4th sample of a symbol).
// Channel B gets random samples on a 4-of-5 valid pattern (200 MSPS on a 250 MHz
// clock) and must come out unchanged one clock later.
module tb_ad_interface;
  import radar_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // falling edge: asynchronous reset before the first clock
  logic sym_align = 0, a_valid = 0, b_valid = 0;
  cplx_t a_data = '0, b_data = '0;
  logic bpsk_valid, lfm_valid;
  cplx_t bpsk_data, lfm_data;
  int checks = 0, failures = 0;

  ad_interface #(.SYM_DIV(4)) dut (.*);

  always #2 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model state
  int ph = 0, sr = 0, si = 0;
  bit exp_v = 0; int exp_r, exp_i;
  bit exp_bv = 0; cplx_t exp_b;
  int n_sym = 0;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      // drive
      @(negedge clk);
      // check outputs produced by the previous edge
      checks++;
      if (bpsk_valid != exp_v || (exp_v && (bpsk_data.re != 16'(exp_r) || bpsk_data.im != 16'(exp_i)))) begin
        failures++;
        if (failures < 10) $display("A mismatch t=%0d v=%0b/%0b %0d/%0d", t, bpsk_valid, exp_v, bpsk_data.re, exp_r);
      end
      checks++;
      if (lfm_valid != exp_bv || (exp_bv && lfm_data != exp_b)) failures++;
      if (bpsk_valid) n_sym++;
      // new stimulus
      sym_align = (t % 42 == 5);
      a_valid = 1;
      a_data.re = 16'($urandom_range(65535)); a_data.im = 16'($urandom_range(65535));
      b_valid = (t % 5 != 4);
      b_data.re = 16'($urandom_range(65535)); b_data.im = 16'($urandom_range(65535));
      // model
      if (sym_align) ph = 0;
      if (ph == 0) begin sr = 0; si = 0; end
      sr += int'(a_data.re); si += int'(a_data.im);
      exp_v = (ph == 3);
      if (exp_v) begin exp_r = sr / 4; exp_i = si / 4; end
      ph = (ph + 1) % 4;
      exp_bv = b_valid; exp_b = b_data;
    end
    checks++;
    if (n_sym < 900) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
