// lfmcw_proc -- D-band LFMCW beat echo signal processing module.
//
// Two-dimensional FFT followed by CFAR:
//   * After every sweep_start the first NRANGE valid beat samples (after SETTLE
//     samples are skipped) are fed to an NRANGE-point range FFT; bin k is range
//     gate k.
//   * The range spectra of the NSWEEP sweeps of a CPI are written into the MTD
//     corner-turn memory (row = sweep index from wavegen, column = range gate);
//     after the last sweep every range gate gets an NSWEEP-point Doppler FFT,
//     giving the range-Doppler plane.
//   * cfar detects targets along the Doppler line of each range gate.
// Detections leave as det_t records {range gate, Doppler bin, magnitude};
// map_done pulses when the CPI's detection list is complete. range_overrun pulses
// if a sweep's samples arrive while the range FFT is still busy with the previous
// sweep (the sweep must last at least NRANGE + NRANGE/2*log2(NRANGE) + NRANGE
// clocks).
// The 128-point range FFT per sweep and the 256-point Doppler FFT over 256 sweeps
// follow the document; SETTLE and the CFAR settings are this design's choices.
module lfmcw_proc
  import radar_pkg::*;
#(
  parameter int          NRANGE   = 128,
  parameter int          NSWEEP   = 256,
  parameter int          SETTLE   = 0,
  parameter int          REF      = 8,
  parameter int          GUARD    = 2,
  parameter int unsigned ALPHA_Q4 = 128,
  parameter int unsigned MIN_MAG  = 128
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sweep_start,
  input  logic [15:0] sweep_idx,
  input  logic        in_valid,
  input  cplx_t       in_data,
  output logic        det_valid,
  output det_t        det,
  output logic        map_done,
  output logic        range_overrun,
  output logic        mtd_overrun,
  output logic        cfar_overrun
);
  // ---------------- sweep capture ----------------
  logic [31:0] scnt;         // valid samples since sweep start
  logic [15:0] cap_sweep;    // sweep being captured
  logic [15:0] fft_sweep;    // sweep whose spectrum the range FFT holds
  logic        cap_en;
  logic        rf_ready;

  // scnt - SETTLE wraps to a large value while scnt < SETTLE
  assign cap_en = in_valid && !sweep_start && (scnt - 32'(SETTLE)) < 32'(NRANGE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scnt          <= 32'(SETTLE + NRANGE);
      cap_sweep     <= '0;
      fft_sweep     <= '0;
      range_overrun <= 1'b0;
    end else begin
      range_overrun <= cap_en && !rf_ready;
      if (sweep_start) begin
        scnt      <= '0;
        cap_sweep <= sweep_idx;
      end else if (in_valid && scnt < 32'(SETTLE + NRANGE)) begin
        scnt <= scnt + 1'b1;
        if (scnt == 32'(SETTLE + NRANGE - 1)) fft_sweep <= cap_sweep;
      end
    end
  end

  logic                      rf_valid;
  cplx_t                     rf_data;
  logic [$clog2(NRANGE)-1:0] rf_idx;

  fft #(.N(NRANGE)) u_range_fft (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (cap_en && rf_ready),
    .in_data  (in_data),
    .in_ready (rf_ready),
    .out_valid(rf_valid),
    .out_data (rf_data),
    .out_idx  (rf_idx),
    .out_last ()
  );

  // ---------------- Doppler dimension ----------------
  logic        md_valid, md_last;
  logic [15:0] md_gate, md_dop;
  cplx_t       md_data;

  mtd #(.GATES(NRANGE), .NPULSE(NSWEEP)) u_mtd (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (rf_valid),
    .in_pulse (fft_sweep),
    .in_gate  (16'(rf_idx)),
    .in_data  (rf_data),
    .out_valid(md_valid),
    .out_gate (md_gate),
    .out_dop  (md_dop),
    .out_data (md_data),
    .out_last (md_last),
    .busy     (),
    .overrun  (mtd_overrun)
  );

  cfar #(.LEN(NSWEEP), .REF(REF), .GUARD(GUARD), .ALPHA_Q4(ALPHA_Q4), .MIN_MAG(MIN_MAG)) u_cfar (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (md_valid),
    .in_line    (md_gate),
    .in_cell    (md_dop),
    .in_data    (md_data),
    .in_map_last(md_last),
    .det_valid  (det_valid),
    .det        (det),
    .map_done   (map_done),
    .overrun    (cfar_overrun)
  );

endmodule
