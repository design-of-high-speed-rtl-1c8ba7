// ad_interface -- high-speed AD data interface for the two echo channels.
//
// Channel A carries the P-band BPSK echo after the converter's digital
// down-conversion at 250 MSPS (one complex sample per clock when a_valid is high).
// The BPSK processor correlates at the 62.5 MHz symbol rate, so this block
// integrates SYM_DIV consecutive samples and dumps their average as one symbol
// sample. The integrate-and-dump phase is realigned by sym_align (the PRI start
// from wavegen): the channel-A sample presented in the same clock as sym_align is
// the first sample of chip 0.
// Channel B carries the D-band LFMCW de-ramped beat echo at 200 MSPS; its samples
// are registered and passed on unchanged with their valid strobe.
// Both outputs have one register stage; bpsk_valid follows the SYM_DIV-th sample of
// a symbol by one clock. The serial JESD204B link layer of the converters is not
// modelled: the block receives the parallel complex samples it would deliver.
// The rates and the 4:1 ratio follow the document; averaging as the decimation
// filter is this design's choice.
module ad_interface
  import radar_pkg::*;
#(
  parameter int SYM_DIV = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  sym_align,
  input  logic  a_valid,
  input  cplx_t a_data,
  input  logic  b_valid,
  input  cplx_t b_data,
  output logic  bpsk_valid,
  output cplx_t bpsk_data,
  output logic  lfm_valid,
  output cplx_t lfm_data
);
  localparam int PW = $clog2(SYM_DIV) > 0 ? $clog2(SYM_DIV) : 1;
  localparam int AW = SW + PW;

  logic [PW-1:0]        phase;
  logic signed [AW-1:0] acc_re, acc_im;
  logic signed [AW-1:0] sum_re, sum_im;
  logic [PW-1:0]        ph_now;

  always_comb begin
    ph_now = sym_align ? '0 : phase;
    sum_re = (ph_now == '0 ? '0 : acc_re) + AW'(a_data.re);
    sum_im = (ph_now == '0 ? '0 : acc_im) + AW'(a_data.im);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase      <= '0;
      acc_re     <= '0;
      acc_im     <= '0;
      bpsk_valid <= 1'b0;
      bpsk_data  <= '0;
      lfm_valid  <= 1'b0;
      lfm_data   <= '0;
    end else begin
      bpsk_valid <= 1'b0;
      if (a_valid) begin
        acc_re <= sum_re;
        acc_im <= sum_im;
        if (ph_now == PW'(SYM_DIV - 1)) begin
          phase          <= '0;
          bpsk_valid     <= 1'b1;
          bpsk_data.re   <= SW'(sum_re / SYM_DIV);
          bpsk_data.im   <= SW'(sum_im / SYM_DIV);
        end else begin
          phase <= ph_now + 1'b1;
        end
      end else if (sym_align) begin
        phase <= '0;
      end
      lfm_valid <= b_valid;
      if (b_valid) lfm_data <= b_data;
    end
  end

endmodule
