// radar_pkg -- types and constants shared by the P/D-band radar signal processor.
//
// Holds the complex sample type used on every datapath, the detection record that
// leaves the CFAR detectors, the physical target record used by the fusion unit,
// the frame identifiers written by the data transmission module, and two constant
// functions evaluated at elaboration time:
//   * mseq_bits()  - the maximal-length (M-) sequence used as the BPSK phase code.
//                    The M-sequence itself is what the processor transmits; the
//                    LFSR polynomials are this design's choice.
//   * tw_cos/sin() - Q1.15 FFT twiddle factors, so no coefficient table is stored
//                    as a file.
package radar_pkg;

  // Width of one I or Q component everywhere in the datapath (16-bit DDC output).
  localparam int SW = 16;

  typedef struct packed {
    logic signed [SW-1:0] re;
    logic signed [SW-1:0] im;
  } cplx_t;

  // One CFAR detection: range gate, Doppler bin (unsigned FFT index), magnitude.
  typedef struct packed {
    logic [15:0] gate;
    logic [15:0] dop;
    logic [31:0] mag;
  } det_t;

  // A target in physical units: range in centimetres, radial velocity in cm/s.
  typedef struct packed {
    logic signed [31:0] range_cm;
    logic signed [31:0] vel_cms;
  } tgt_t;

  // Frame identifiers of the interface RAM frames (values are this design's choice).
  localparam logic [31:0] FRAME_ID_P  = 32'h5A5A_0008;  // read on GPIO8 (P-band)
  localparam logic [31:0] FRAME_ID_D  = 32'h5A5A_0009;  // read on GPIO9 (D-band)
  localparam logic [6:0]  WAVE_BPSK   = 7'd1;
  localparam logic [6:0]  WAVE_LFMCW  = 7'd2;

  // Tap mask of a Fibonacci LFSR for the primitive polynomial of degree deg:
  // state bit k holds s[n+k], and s[n+deg] is the XOR of the masked bits.
  function automatic logic [15:0] lfsr_taps(input int deg);
    case (deg)
      3:  return 16'h0005;  // x^3 + x^2 + 1
      4:  return 16'h0009;  // x^4 + x^3 + 1
      5:  return 16'h0009;  // x^5 + x^3 + 1
      6:  return 16'h0021;  // x^6 + x^5 + 1
      7:  return 16'h0041;  // x^7 + x^6 + 1
      8:  return 16'h0071;  // x^8 + x^6 + x^5 + x^4 + 1
      9:  return 16'h0021;  // x^9 + x^5 + 1
      10: return 16'h0081;  // x^10 + x^7 + 1
      default: return 16'h0009;
    endcase
  endfunction

  // M-sequence chips of length 2^deg-1; bit k is chip k, 1 means phase pi (-1).
  function automatic logic [1022:0] mseq_bits(input int deg);
    logic [15:0] st;
    logic [15:0] taps;
    logic [1022:0] r;
    st   = 16'h0001;
    taps = lfsr_taps(deg);
    r    = '0;
    for (int k = 0; k < (1 << deg) - 1; k++) begin
      r[k] = st[0];
      st   = {1'b0, st[15:1]} | (16'(^(st & taps)) << (deg - 1));
    end
    return r;
  endfunction

  // Twiddle W_N^k = cos(2 pi k/N) - j sin(2 pi k/N), Q1.15, saturated at 32767.
  function automatic logic signed [15:0] tw_cos(input int k, input int n);
    real v;
    v = $cos(2.0 * 3.14159265358979323846 * k / n) * 32767.0;
    return 16'($rtoi(v + (v >= 0.0 ? 0.5 : -0.5)));
  endfunction

  function automatic logic signed [15:0] tw_sin(input int k, input int n);
    real v;
    v = $sin(2.0 * 3.14159265358979323846 * k / n) * 32767.0;
    return 16'($rtoi(v + (v >= 0.0 ? 0.5 : -0.5)));
  endfunction

  // |I| + |Q| magnitude estimate used ahead of the CFAR detectors.
  function automatic logic [31:0] mag_l1(input cplx_t x);
    logic [SW-1:0] a, b;
    a = x.re[SW-1] ? SW'(-x.re) : SW'(x.re);
    b = x.im[SW-1] ? SW'(-x.im) : SW'(x.im);
    return 32'(a) + 32'(b);
  endfunction

endpackage
