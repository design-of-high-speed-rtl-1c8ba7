// cfar -- cell-averaging constant false alarm rate detector.
//
// Works on the range-Doppler map one line at a time: a line is the LEN Doppler
// bins of one range gate as they leave the MTD FFT (in_cell = 0..LEN-1, in_line =
// range gate). Each bin's magnitude is estimated as |I|+|Q| and stored in a line
// buffer. When the last bin of a line has arrived the detector scans the line,
// one cell per clock after an initial 2*REF-clock fill of the window sum:
//   noise(i) = sum of REF cells on each side of cell i, skipping GUARD cells next
//              to it; the Doppler axis is circular, so indices wrap modulo LEN.
//   detect  if  mag(i) * 2*REF * 16 > ALPHA_Q4 * noise(i)  and  mag(i) > MIN_MAG
// (ALPHA_Q4 is the threshold factor in 1/16 steps). The window sum is updated
// incrementally (two cells enter, two leave per step). A detection leaves as a
// det_t {gate = line, dop = cell, mag} with det_valid. When a line that arrived
// with in_map_last is finished, map_done pulses: the CPI's detection list is
// complete. A line needs LEN + 2*REF + 2 clocks; a new line must not start
// arriving before the previous one is scanned ('overrun' pulses if it does; the
// MTD's FFT gives far more time than that).
// The document names CFAR detection only; the cell-averaging variant, window sizes,
// threshold and the circular Doppler window are this design's choices.
module cfar
  import radar_pkg::*;
#(
  parameter int          LEN      = 256,
  parameter int          REF      = 8,
  parameter int          GUARD    = 2,
  parameter int unsigned ALPHA_Q4 = 128,
  parameter int unsigned MIN_MAG  = 128
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [15:0] in_line,
  input  logic [15:0] in_cell,
  input  cplx_t       in_data,
  input  logic        in_map_last,
  output logic        det_valid,
  output det_t        det,
  output logic        map_done,
  output logic        overrun
);
  localparam int LW = $clog2(LEN);

  logic [31:0] buf_mag [LEN];

  typedef enum logic [1:0] {C_COLLECT, C_FILL, C_SCAN} cstate_t;
  cstate_t state;
  logic [LW-1:0]  idx;           // cell under test, or fill index
  logic [LW+1:0]  fcnt;          // fill counter 0..2*REF-1
  logic [47:0]    nsum;          // window sum for cell idx
  logic [15:0]    line_id;
  logic           line_last;

  // Fill: cells -GUARD-REF..-GUARD-1 and GUARD+1..GUARD+REF around cell 0.
  logic [LW-1:0] fill_addr;
  always_comb begin
    if (fcnt < (LW+2)'(REF))
      fill_addr = LW'(LEN - GUARD - REF) + LW'(fcnt);
    else
      fill_addr = LW'(GUARD + 1) + LW'(fcnt - (LW+2)'(REF));
  end

  // Incremental update from cell idx to idx+1.
  logic [LW-1:0] lag_in, lag_out, lead_in, lead_out;
  logic [47:0]   nsum_next;
  always_comb begin
    lag_in    = idx - LW'(GUARD);               // joins the lagging window
    lag_out   = idx - LW'(GUARD + REF);         // leaves the lagging window
    lead_out  = idx + LW'(GUARD + 1);           // leaves the leading window
    lead_in   = idx + LW'(GUARD + REF + 1);     // joins the leading window
    nsum_next = nsum + 48'(buf_mag[lag_in]) + 48'(buf_mag[lead_in])
                     - 48'(buf_mag[lag_out]) - 48'(buf_mag[lead_out]);
  end

  logic [63:0] lhs, rhs;
  logic        hit;
  always_comb begin
    lhs = 64'(buf_mag[idx]) * 64'(2 * REF * 16);
    rhs = 64'(ALPHA_Q4) * 64'(nsum);
    hit = (lhs > rhs) && (buf_mag[idx] > MIN_MAG);
  end

  always_ff @(posedge clk) begin
    if (in_valid && state == C_COLLECT) buf_mag[in_cell[LW-1:0]] <= mag_l1(in_data);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= C_COLLECT;
      idx       <= '0;
      fcnt      <= '0;
      nsum      <= '0;
      line_id   <= '0;
      line_last <= 1'b0;
      det_valid <= 1'b0;
      det       <= '0;
      map_done  <= 1'b0;
      overrun   <= 1'b0;
    end else begin
      det_valid <= 1'b0;
      map_done  <= 1'b0;
      overrun   <= in_valid && state != C_COLLECT;
      unique case (state)
        C_COLLECT: if (in_valid && in_cell == 16'(LEN - 1)) begin
          state     <= C_FILL;
          line_id   <= in_line;
          line_last <= in_map_last;
          fcnt      <= '0;
          nsum      <= '0;
        end
        C_FILL: begin
          nsum <= nsum + 48'(buf_mag[fill_addr]);
          fcnt <= fcnt + 1'b1;
          if (fcnt == (LW+2)'(2 * REF - 1)) begin
            state <= C_SCAN;
            idx   <= '0;
          end
        end
        C_SCAN: begin
          if (hit) begin
            det_valid <= 1'b1;
            det.gate  <= line_id;
            det.dop   <= 16'(idx);
            det.mag   <= buf_mag[idx];
          end
          nsum <= nsum_next;
          idx  <= idx + 1'b1;
          if (idx == LW'(LEN - 1)) begin
            state    <= C_COLLECT;
            map_done <= line_last;
          end
        end
        default: state <= C_COLLECT;
      endcase
    end
  end

endmodule
