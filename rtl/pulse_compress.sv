// pulse_compress -- BPSK pulse compression (matched filter) at the symbol rate.
//
// The transmitted pulse is an M-sequence of CODE_LEN = 2^CODE_DEG-1 chips (chip
// bit 1 = phase pi = -1). After every PRI start the block counts symbol-rate
// samples. The first SKIP samples are ignored (a blind zone, e.g. the transmit
// pulse itself when the receiver listens only after the pulse ends; 0 by default
// so that echoes from inside the pulse length, as an echo simulator produces,
// are also compressed). The following samples are
// shifted through a CODE_LEN-deep delay line, and once it is full every new
// sample yields the correlation of the window with the code:
//     y[g] = sum_k c_k * x[SKIP + g + k],   c_k = +1 / -1
// which is the compressed echo of range gate g (echo delay SKIP+g symbols from
// the start of the pulse). GATES gates are produced per PRI, one per input sample,
// one clock after it. The sum is divided by 2^CODE_DEG so it keeps the 16-bit
// sample width (a full-scale matched echo gives about full scale).
// The correlation at the symbol rate follows the document; the code length, gate
// count, blind zone and output scaling are this design's choices. The delay line
// and the +/-1 adder tree use no multipliers.
module pulse_compress
  import radar_pkg::*;
#(
  parameter int CODE_DEG = 5,
  parameter int GATES    = 128,
  parameter int SKIP     = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        in_valid,
  input  cplx_t       in_data,
  output logic        out_valid,
  output logic [15:0] out_gate,
  output cplx_t       out_data
);
  localparam int CODE_LEN = (1 << CODE_DEG) - 1;
  localparam logic [1022:0] CODE = mseq_bits(CODE_DEG);
  localparam int AW = SW + CODE_DEG + 1;

  cplx_t       dl [CODE_LEN];   // dl[CODE_LEN-1] is the newest sample
  logic [31:0] n_in;            // samples received since start
  logic [15:0] n_out;           // gates produced since start

  // Correlation of the window that includes the current input sample.
  logic signed [AW-1:0] acc_re, acc_im;
  always_comb begin
    acc_re = '0;
    acc_im = '0;
    for (int k = 0; k < CODE_LEN; k++) begin
      cplx_t s;
      s = (k == CODE_LEN - 1) ? in_data : dl[(k + 1) % CODE_LEN];
      if (CODE[k]) begin
        acc_re = acc_re - AW'(s.re);
        acc_im = acc_im - AW'(s.im);
      end else begin
        acc_re = acc_re + AW'(s.re);
        acc_im = acc_im + AW'(s.im);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_in      <= '0;
      n_out     <= '0;
      out_valid <= 1'b0;
      out_gate  <= '0;
      out_data  <= '0;
      for (int k = 0; k < CODE_LEN; k++) dl[k] <= '0;
    end else begin
      out_valid <= 1'b0;
      if (start) begin
        n_in  <= '0;
        n_out <= '0;
      end else if (in_valid) begin
        n_in <= n_in + 1'b1;
        if (n_in + 32'd1 > 32'(SKIP)) begin
          for (int k = 0; k < CODE_LEN - 1; k++) dl[k] <= dl[k + 1];
          dl[CODE_LEN - 1] <= in_data;
          if (n_in >= 32'(SKIP + CODE_LEN - 1) && n_out < 16'(GATES)) begin
            out_valid   <= 1'b1;
            out_gate    <= n_out;
            out_data.re <= SW'(acc_re >>> CODE_DEG);
            out_data.im <= SW'(acc_im >>> CODE_DEG);
            n_out       <= n_out + 1'b1;
          end
        end
      end
    end
  end

endmodule
