// fft -- N-point radix-2 decimation-in-time FFT, one butterfly per clock.
//
// Used three times in the processor: the 128-point fast-time (range) FFT of every
// LFMCW sweep, the 256-point slow-time (Doppler) FFT of every LFMCW range gate and
// the slow-time FFT of the BPSK moving target detector. The point counts come from
// the LFMCW processing description; the architecture (in-place, single butterfly,
// scaling by 1/2 in every stage so the output is DFT/N and cannot overflow) is this
// design's choice.
//
// Operation is block by block:
//   LOAD : N samples are accepted on in_valid while in_ready is high, in natural
//          order; they are stored at bit-reversed addresses.
//   CALC : log2(N) stages of N/2 butterflies, one per clock (N/2*log2(N) clocks).
//   OUT  : the N bins leave in natural order on consecutive clocks with out_idx,
//          out_last marks bin N-1. There is no back-pressure on the output.
// Latency from the last input sample to the first output bin is N/2*log2(N)+1
// clocks; a block occupies the unit for N + N/2*log2(N) + N clocks.
// Twiddles are Q1.15 constants computed at elaboration by radar_pkg::tw_cos/tw_sin.
module fft
  import radar_pkg::*;
#(
  parameter int N = 128
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  cplx_t                in_data,
  output logic                 in_ready,
  output logic                 out_valid,
  output cplx_t                out_data,
  output logic [$clog2(N)-1:0] out_idx,
  output logic                 out_last
);
  localparam int LOGN = $clog2(N);

  typedef logic signed [15:0] tw_tab_t [N/2];

  function automatic tw_tab_t mk_cos();
    tw_tab_t r;
    for (int k = 0; k < N/2; k++) r[k] = tw_cos(k, N);
    return r;
  endfunction

  function automatic tw_tab_t mk_sin();
    tw_tab_t r;
    for (int k = 0; k < N/2; k++) r[k] = tw_sin(k, N);
    return r;
  endfunction

  localparam tw_tab_t TW_C = mk_cos();
  localparam tw_tab_t TW_S = mk_sin();

  function automatic logic [LOGN-1:0] bitrev(input logic [LOGN-1:0] a);
    for (int i = 0; i < LOGN; i++) bitrev[i] = a[LOGN-1-i];
  endfunction

  function automatic logic signed [SW-1:0] sat_half(input logic signed [SW+2:0] v);
    logic signed [SW+2:0] h;
    h = v >>> 1;
    if (h > (SW+3)'(2**(SW-1) - 1)) return SW'(2**(SW-1) - 1);
    else if (h < -(SW+3)'(2**(SW-1))) return SW'(-(2**(SW-1)));
    else return h[SW-1:0];
  endfunction

  typedef enum logic [1:0] {S_LOAD, S_CALC, S_OUT} state_t;
  state_t state;

  cplx_t mem [N];

  logic [LOGN-1:0] cnt;      // load / output counter
  logic [LOGN-2:0] bfly;     // butterfly index inside a stage
  logic [$clog2(LOGN+1)-1:0] stage;

  // Butterfly addressing for the current stage and index.
  logic [LOGN-1:0] i0, i1, pos, grp;
  logic [LOGN-2:0] kidx;
  always_comb begin
    pos  = LOGN'(bfly) & LOGN'((1 << stage) - 1);
    grp  = LOGN'(bfly) >> stage;
    i0   = LOGN'((grp << (stage + 1)) | pos);
    i1   = LOGN'(i0 + (LOGN'(1) << stage));
    kidx = (LOGN-1)'(pos << (LOGN - 1 - 32'(stage)));
  end

  // Butterfly arithmetic.
  cplx_t a, b, y0, y1;
  logic signed [31:0] pr, pi;
  logic signed [SW:0] tr, ti;
  always_comb begin
    a  = mem[i0];
    b  = mem[i1];
    pr = b.re * TW_C[kidx] + b.im * TW_S[kidx];
    pi = b.im * TW_C[kidx] - b.re * TW_S[kidx];
    tr = (SW+1)'(pr >>> 15);
    ti = (SW+1)'(pi >>> 15);
    y0.re = sat_half((SW+3)'(a.re) + (SW+3)'(tr));
    y0.im = sat_half((SW+3)'(a.im) + (SW+3)'(ti));
    y1.re = sat_half((SW+3)'(a.re) - (SW+3)'(tr));
    y1.im = sat_half((SW+3)'(a.im) - (SW+3)'(ti));
  end

  assign in_ready = (state == S_LOAD);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_LOAD;
      cnt       <= '0;
      bfly      <= '0;
      stage     <= '0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_idx   <= '0;
      out_data  <= '0;
    end else begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      unique case (state)
        S_LOAD: if (in_valid) begin
          cnt <= cnt + 1'b1;
          if (cnt == LOGN'(N - 1)) begin
            state <= S_CALC;
            stage <= '0;
            bfly  <= '0;
          end
        end
        S_CALC: begin
          bfly <= bfly + 1'b1;
          if (bfly == (LOGN-1)'(N/2 - 1)) begin
            if (stage == ($bits(stage))'(LOGN - 1)) begin
              state <= S_OUT;
              cnt   <= '0;
            end else begin
              stage <= stage + 1'b1;
            end
          end
        end
        S_OUT: begin
          out_valid <= 1'b1;
          out_data  <= mem[cnt];
          out_idx   <= cnt;
          out_last  <= (cnt == LOGN'(N - 1));
          cnt       <= cnt + 1'b1;
          if (cnt == LOGN'(N - 1)) state <= S_LOAD;
        end
        default: state <= S_LOAD;
      endcase
    end
  end

  // Sample memory: bit-reversed writes during LOAD, in-place butterflies in CALC.
  always_ff @(posedge clk) begin
    if (state == S_LOAD && in_valid) begin
      mem[bitrev(cnt)] <= in_data;
    end else if (state == S_CALC) begin
      mem[i0] <= y0;
      mem[i1] <= y1;
    end
  end

endmodule
