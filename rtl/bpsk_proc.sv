// bpsk_proc -- P-band BPSK echo signal processing module.
//
// Chain: pulse compression -> MTD -> CFAR.
//   * pulse_compress correlates the symbol-rate echo of every PRI with the
//     transmitted M-sequence and yields GATES range gates per pulse.
//   * mtd stores the compressed gates of the NPULSE pulses of a CPI (pulse index
//     taken from wavegen at the PRI start) and, once the CPI is complete, runs an
//     NPULSE-point Doppler FFT over every range gate.
//   * cfar detects targets along the Doppler line of each range gate.
// Detections leave as det_t records {gate, Doppler bin, magnitude}; map_done pulses
// when the last range gate of a CPI has been examined, i.e. when the BPSK results
// of that CPI are complete. mtd_overrun / cfar_overrun flag a CPI that could not
// be processed in time.
// The processing order follows the document; sizes are this design's choices
// (see the parameter defaults).
module bpsk_proc
  import radar_pkg::*;
#(
  parameter int          CODE_DEG = 5,
  parameter int          SKIP     = 0,
  parameter int          GATES    = 128,
  parameter int          NPULSE   = 64,
  parameter int          REF      = 8,
  parameter int          GUARD    = 2,
  parameter int unsigned ALPHA_Q4 = 128,
  parameter int unsigned MIN_MAG  = 128
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        pri_start,
  input  logic [15:0] pulse_idx,
  input  logic        sym_valid,
  input  cplx_t       sym_data,
  output logic        det_valid,
  output det_t        det,
  output logic        map_done,
  output logic        mtd_overrun,
  output logic        cfar_overrun
);
  logic [15:0] cur_pulse;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cur_pulse <= '0;
    else if (pri_start) cur_pulse <= pulse_idx;
  end

  logic        pc_valid;
  logic [15:0] pc_gate;
  cplx_t       pc_data;

  pulse_compress #(.CODE_DEG(CODE_DEG), .GATES(GATES), .SKIP(SKIP)) u_pc (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (pri_start),
    .in_valid (sym_valid),
    .in_data  (sym_data),
    .out_valid(pc_valid),
    .out_gate (pc_gate),
    .out_data (pc_data)
  );

  logic        md_valid, md_last;
  logic [15:0] md_gate, md_dop;
  cplx_t       md_data;

  mtd #(.GATES(GATES), .NPULSE(NPULSE)) u_mtd (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (pc_valid),
    .in_pulse (cur_pulse),
    .in_gate  (pc_gate),
    .in_data  (pc_data),
    .out_valid(md_valid),
    .out_gate (md_gate),
    .out_dop  (md_dop),
    .out_data (md_data),
    .out_last (md_last),
    .busy     (),
    .overrun  (mtd_overrun)
  );

  cfar #(.LEN(NPULSE), .REF(REF), .GUARD(GUARD), .ALPHA_Q4(ALPHA_Q4), .MIN_MAG(MIN_MAG)) u_cfar (
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
