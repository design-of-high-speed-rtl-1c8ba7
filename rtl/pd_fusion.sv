// pd_fusion -- P/D band fusion: range pairing and Doppler de-ambiguity.
//
// The P-band BPSK mode measures velocity without ambiguity but coarsely; the
// D-band LFMCW mode measures velocity finely but folded into an interval of width
// VMAX_CMS (v_max,D = lambda_D / (2 T_r,D)). This block combines both lists of one
// CPI, targets given in physical units (range in cm, velocity in cm/s):
//   for every D-band target d (the D count is decremented after each one):
//     for the P-band targets p in turn:
//       N_D   = round((v_p - v_d) / VMAX_CMS)        ambiguity multiple
//       v     = v_d + N_D * VMAX_CMS                 de-ambiguated velocity
//       R     = R_d - N_D * DR_AMB_CM                range corrected for the
//                                                    unfolded Doppler shift
//       p is a partner if |R_p - R| < MATCH_CM (PAIR_CORR = 1) or
//       |R_p - R_d| < MATCH_CM (PAIR_CORR = 0)                     (pairing)
//     emit {R, v} of the partner with the largest P-band magnitude p_mag
//     (the first one on a tie) on fused_valid
// DR_AMB_CM is c/(2 B0): adding 1/T_r to the Doppler frequency moves the range
// computed from the beat frequency, R = (f_B - f_d) c / (2 mu) with mu = B0/T_r,
// by c/(2 B0). 'done' pulses after the last D-band target; n_fused counts pairs.
// Lists are loaded with p_wr / d_wr (up to MAX_P / MAX_D entries), run with
// 'start' and emptied with 'clear'. One P-band target is compared per clock, and
// every D-band target scans the whole P-band list (n_p clocks, one more to
// advance). Choosing the strongest partner keeps a weak P-band detection, such
// as a range sidelobe of another target's compressed pulse, from taking a pair
// whose real partner lies in the same 2.4 m window; the document does not say
// how several candidates are resolved.
// The pairing rule and its 2.4 m window, and the de-ambiguity steps, follow the
// document. The document writes N_D as the ceiling of v_p / v_max,D, but its own
// worked results need N_D = 0, 1, 2 for v_p = 489, 1466, 2443 m/s with
// v_max,D of about 957 m/s; rounding the velocity difference reproduces them and is
// used here. VMAX_CMS and DR_AMB_CM are derived from those worked results.
// The document pairs on the D-band range as measured (PAIR_CORR = 0). That range
// is off by N_D * DR_AMB_CM (1.5 m at 3000 m/s), which together with the 2.4 m
// P-band gate can push a true pair out of the 2.4 m window; by default the pair
// is therefore tested with the D-band range corrected for the candidate's N_D.
// Both give the same pairs on the document's worked example.
module pd_fusion
  import radar_pkg::*;
#(
  parameter int MAX_P     = 64,
  parameter int MAX_D     = 64,
  parameter int MATCH_CM  = 240,
  parameter int VMAX_CMS  = 95695,
  parameter int DR_AMB_CM = 50,
  parameter bit PAIR_CORR = 1'b1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        p_wr,
  input  tgt_t        p_tgt,
  input  logic [31:0] p_mag,
  input  logic        d_wr,
  input  tgt_t        d_tgt,
  input  logic        start,
  output logic        busy,
  output logic        fused_valid,
  output tgt_t        fused,
  output logic        done,
  output logic [15:0] n_fused,
  output logic [15:0] n_p,
  output logic [15:0] n_d
);
  localparam int PAW = $clog2(MAX_P);
  localparam int DAW = $clog2(MAX_D);

  tgt_t        plist [MAX_P];
  logic [31:0] pmag  [MAX_P];
  tgt_t dlist [MAX_D];

  typedef enum logic [1:0] {F_IDLE, F_SCAN, F_NEXT} fstate_t;
  fstate_t     state;
  logic [15:0] di, pi, d_left;

  always_ff @(posedge clk) begin
    if (p_wr && n_p < 16'(MAX_P)) begin
      plist[n_p[PAW-1:0]] <= p_tgt;
      pmag[n_p[PAW-1:0]]  <= p_mag;
    end
    if (d_wr && n_d < 16'(MAX_D)) dlist[n_d[DAW-1:0]] <= d_tgt;
  end

  // Best pairing partner found so far for the current D-band target.
  logic        found;
  logic [31:0] best_mag;
  tgt_t        best;

  // Pairing test and de-ambiguity for the current (d, p) pair.
  tgt_t               dcur, pcur;
  logic signed [31:0] dr, dv, nd;
  logic               match;
  tgt_t               res;
  logic [31:0]        mcur;
  logic               better;
  always_comb begin
    mcur  = pmag[pi[PAW-1:0]];
    dcur  = dlist[di[DAW-1:0]];
    pcur  = plist[pi[PAW-1:0]];
    dv    = pcur.vel_cms - dcur.vel_cms;
    if (dv >= 0) nd = (dv + 32'(VMAX_CMS / 2)) / 32'(VMAX_CMS);
    else         nd = -((-dv + 32'(VMAX_CMS / 2)) / 32'(VMAX_CMS));
    res.vel_cms  = dcur.vel_cms + nd * 32'(VMAX_CMS);
    res.range_cm = dcur.range_cm - nd * 32'(DR_AMB_CM);
    dr    = pcur.range_cm - (PAIR_CORR ? res.range_cm : dcur.range_cm);
    match = (dr < 32'sd0 ? -dr : dr) < 32'(MATCH_CM);
    better = match && (!found || mcur > best_mag);
  end

  assign busy = (state != F_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= F_IDLE;
      di          <= '0;
      pi          <= '0;
      d_left      <= '0;
      n_p         <= '0;
      n_d         <= '0;
      n_fused     <= '0;
      fused_valid <= 1'b0;
      fused       <= '0;
      done        <= 1'b0;
      found       <= 1'b0;
      best_mag    <= '0;
      best        <= '0;
    end else begin
      fused_valid <= 1'b0;
      done        <= 1'b0;
      if (clear && state == F_IDLE) begin
        n_p <= '0;
        n_d <= '0;
      end else begin
        if (p_wr && n_p < 16'(MAX_P)) n_p <= n_p + 1'b1;
        if (d_wr && n_d < 16'(MAX_D)) n_d <= n_d + 1'b1;
      end
      unique case (state)
        F_IDLE: if (start) begin
          di      <= '0;
          pi      <= '0;
          d_left  <= n_d;
          n_fused <= '0;
          found   <= 1'b0;
          state   <= (n_d == 0) ? F_NEXT : F_SCAN;
        end
        F_SCAN: begin
          if (n_p != 0 && better) begin
            found    <= 1'b1;
            best_mag <= mcur;
            best     <= res;
          end
          if (n_p == 0 || pi == n_p - 1'b1) begin
            if (n_p != 0 && (better || found)) begin
              fused_valid <= 1'b1;
              fused       <= better ? res : best;
              n_fused     <= n_fused + 1'b1;
            end
            state <= F_NEXT;
          end else begin
            pi <= pi + 1'b1;
          end
        end
        F_NEXT: begin
          // One D-band target finished: decrement the count, stop at zero.
          if (d_left <= 16'd1) begin
            d_left <= '0;
            done   <= 1'b1;
            state  <= F_IDLE;
          end else begin
            d_left <= d_left - 1'b1;
            di     <= di + 1'b1;
            pi     <= '0;
            found  <= 1'b0;
            state  <= F_SCAN;
          end
        end
        default: state <= F_IDLE;
      endcase
    end
  end

endmodule
