// radar_sp_top -- P/D band composite radar signal processor (FPGA part plus fusion).
//
// One clock domain (the 250 MHz converter clock). Data flow:
//   wavegen      -> transmit timing for the local oscillator source (PRI, code
//                   chips, T/R gate, sweep and CPI pulses) and receive timing.
//   ad_interface -> channel A (P-band BPSK, 250 MSPS) integrated to the 62.5 MHz
//                   symbol rate; channel B (D-band LFMCW beat, 200 MSPS) passed on.
//   bpsk_proc    -> pulse compression, MTD, CFAR on channel A.
//   lfmcw_proc   -> range FFT, Doppler FFT, CFAR on channel B.
//   frame_tx x2  -> interface RAM frames, done flags and GPIO8/GPIO9 interrupts;
//                   the frames are read through rd_band/rd_addr/rd_data, the port
//                   the Serial RapidIO target core would drive.
//   target_condense x2, det_to_tgt x2, pd_fusion
//                -> agglomeration of each band's detections, conversion to range
//                   and velocity, P/D pairing and Doppler de-ambiguity; the fused
//                   targets leave on fused_valid/fused (the host interface).
// Fusion starts when both bands' condensed lists of a CPI are loaded; fusion_busy
// plays the role of the processing-busy indicator. err_flags collects sticky
// overrun flags {lfmcw cfar, lfmcw mtd, lfmcw range FFT, bpsk cfar, bpsk mtd}.
// The P-band cluster magnitude goes to the fusion unit to choose between several
// P-band candidates; the D-band magnitude is not needed there and is left unused.
// The module split follows the document's FPGA framework; the document runs
// agglomeration and fusion in software on a DSP, here they are logic. Converters,
// RF front ends, the SRIO core and the DSP are outside this module.
module radar_sp_top
  import radar_pkg::*;
#(
  parameter int SYM_DIV      = 4,
  parameter int CODE_DEG     = 5,
  parameter int P_SKIP       = 0,
  parameter int P_GATES      = 128,
  parameter int NPULSE       = 64,
  parameter int PRI_CYCLES   = 3840,
  parameter int NRANGE       = 128,
  parameter int NSWEEP       = 256,
  parameter int SWEEP_CYCLES = 960,
  parameter int MAX_TGT      = 64,
  parameter int P_RRES_CM    = 240,
  parameter int P_VSPAN_CMS  = 800000,
  parameter int D_RRES_CM    = 50,
  parameter int VMAX_CMS     = 95695
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  // converter side
  input  logic        adc_a_valid,
  input  cplx_t       adc_a_data,
  input  logic        adc_b_valid,
  input  cplx_t       adc_b_data,
  // timing to the local oscillator source and test points
  output logic        cpi_start,
  output logic        cpi_ref,
  output logic        pri_start,
  output logic        tx_gate,
  output logic        sym,
  output logic        sym_stb,
  output logic        sweep_start,
  // DSP side: interrupts, done flags, interface RAM read port
  output logic        gpio8,
  output logic        gpio9,
  output logic        bpsk_done,
  output logic        lfmcw_done,
  input  logic        ack_p,
  input  logic        ack_d,
  input  logic        rd_band,
  input  logic [15:0] rd_addr,
  output logic [31:0] rd_data,
  // fused targets
  output logic        fused_valid,
  output tgt_t        fused,
  output logic        fusion_done,
  output logic        fusion_busy,
  output logic [15:0] n_fused,
  // status: detections in the latest frame, detections a full frame or cluster
  // table dropped, condensed targets loaded into the fusion unit per band
  output logic [15:0] p_det_cnt,
  output logic [15:0] d_det_cnt,
  output logic [15:0] p_frame_drop,
  output logic [15:0] d_frame_drop,
  output logic [15:0] p_cond_drop,
  output logic [15:0] d_cond_drop,
  output logic [15:0] n_p,
  output logic [15:0] n_d,
  output logic [4:0]  err_flags
);
  // ---------------- timing ----------------
  logic [15:0] pulse_idx, sweep_idx, pri_cnt, cpi_cnt;

  wavegen #(
    .SYM_DIV(SYM_DIV), .CODE_DEG(CODE_DEG), .PRI_CYCLES(PRI_CYCLES), .NUM_PULSES(NPULSE),
    .SWEEP_CYCLES(SWEEP_CYCLES), .NUM_SWEEPS(NSWEEP)
  ) u_wavegen (
    .clk, .rst_n, .enable,
    .cpi_start, .cpi_ref, .pri_start, .tx_gate, .sym, .sym_stb, .sweep_start,
    .pulse_idx, .sweep_idx, .pri_cnt, .cpi_cnt
  );

  // ---------------- AD interface ----------------
  logic  bpsk_valid, lfm_valid;
  cplx_t bpsk_data, lfm_data;

  ad_interface #(.SYM_DIV(SYM_DIV)) u_adif (
    .clk, .rst_n,
    .sym_align (pri_start),
    .a_valid   (adc_a_valid),
    .a_data    (adc_a_data),
    .b_valid   (adc_b_valid),
    .b_data    (adc_b_data),
    .bpsk_valid, .bpsk_data, .lfm_valid, .lfm_data
  );

  // ---------------- echo processors ----------------
  logic p_det_valid, p_map_done, p_mtd_ovr, p_cfar_ovr;
  det_t p_det;
  logic d_det_valid, d_map_done, d_rng_ovr, d_mtd_ovr, d_cfar_ovr;
  det_t d_det;

  bpsk_proc #(.CODE_DEG(CODE_DEG), .SKIP(P_SKIP), .GATES(P_GATES), .NPULSE(NPULSE)) u_bpsk (
    .clk, .rst_n, .pri_start, .pulse_idx,
    .sym_valid   (bpsk_valid),
    .sym_data    (bpsk_data),
    .det_valid   (p_det_valid),
    .det         (p_det),
    .map_done    (p_map_done),
    .mtd_overrun (p_mtd_ovr),
    .cfar_overrun(p_cfar_ovr)
  );

  lfmcw_proc #(.NRANGE(NRANGE), .NSWEEP(NSWEEP)) u_lfmcw (
    .clk, .rst_n, .sweep_start, .sweep_idx,
    .in_valid     (lfm_valid),
    .in_data      (lfm_data),
    .det_valid    (d_det_valid),
    .det          (d_det),
    .map_done     (d_map_done),
    .range_overrun(d_rng_ovr),
    .mtd_overrun  (d_mtd_ovr),
    .cfar_overrun (d_cfar_ovr)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) err_flags <= '0;
    else err_flags <= err_flags | {d_cfar_ovr, d_mtd_ovr, d_rng_ovr, p_cfar_ovr, p_mtd_ovr};
  end

  // ---------------- data transmission module ----------------
  logic [31:0] rd_p, rd_d;
  logic        rd_band_q;

  frame_tx #(.MAX_TGT(MAX_TGT), .FRAME_ID(FRAME_ID_P), .WAVE(WAVE_BPSK)) u_frame_p (
    .clk, .rst_n,
    .det_valid(p_det_valid), .det(p_det), .map_done(p_map_done),
    .pri_cnt, .cpi_cnt, .ack(ack_p),
    .rd_addr, .rd_data(rd_p),
    .done_flag(bpsk_done), .irq(gpio8), .tgt_count(p_det_cnt), .dropped(p_frame_drop)
  );

  frame_tx #(.MAX_TGT(MAX_TGT), .FRAME_ID(FRAME_ID_D), .WAVE(WAVE_LFMCW)) u_frame_d (
    .clk, .rst_n,
    .det_valid(d_det_valid), .det(d_det), .map_done(d_map_done),
    .pri_cnt, .cpi_cnt, .ack(ack_d),
    .rd_addr, .rd_data(rd_d),
    .done_flag(lfmcw_done), .irq(gpio9), .tgt_count(d_det_cnt), .dropped(d_frame_drop)
  );

  always_ff @(posedge clk) rd_band_q <= rd_band;
  assign rd_data = rd_band_q ? rd_d : rd_p;

  // ---------------- agglomeration and fusion ----------------
  logic p_c_valid, p_c_done, d_c_valid, d_c_done;
  det_t p_c_det, d_c_det;
  tgt_t p_tgt, d_tgt;

  target_condense #(.MAXC(MAX_TGT)) u_cond_p (
    .clk, .rst_n, .in_valid(p_det_valid), .in_det(p_det), .flush(p_map_done),
    .out_valid(p_c_valid), .out_det(p_c_det), .out_done(p_c_done), .dropped(p_cond_drop)
  );

  target_condense #(.MAXC(MAX_TGT)) u_cond_d (
    .clk, .rst_n, .in_valid(d_det_valid), .in_det(d_det), .flush(d_map_done),
    .out_valid(d_c_valid), .out_det(d_c_det), .out_done(d_c_done), .dropped(d_cond_drop)
  );

  det_to_tgt #(.NDOP(NPULSE), .RRES_CM(P_RRES_CM), .GATE_OFS(P_SKIP),
               .VSPAN_CMS(P_VSPAN_CMS), .COUPLE(1'b0)) u_conv_p (.gate(p_c_det.gate), .dop(p_c_det.dop), .tgt(p_tgt));

  det_to_tgt #(.NDOP(NSWEEP), .RRES_CM(D_RRES_CM), .GATE_OFS(0),
               .VSPAN_CMS(VMAX_CMS), .COUPLE(1'b1)) u_conv_d (.gate(d_c_det.gate), .dop(d_c_det.dop), .tgt(d_tgt));

  logic p_ready, d_ready, fus_start, fus_clear;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_ready   <= 1'b0;
      d_ready   <= 1'b0;
      fus_start <= 1'b0;
      fus_clear <= 1'b0;
    end else begin
      fus_start <= 1'b0;
      fus_clear <= fusion_done;
      if (p_c_done) p_ready <= 1'b1;
      if (d_c_done) d_ready <= 1'b1;
      if (p_ready && d_ready && !fusion_busy && !fus_start) begin
        fus_start <= 1'b1;
        p_ready   <= 1'b0;
        d_ready   <= 1'b0;
      end
    end
  end

  pd_fusion #(.MAX_P(MAX_TGT), .MAX_D(MAX_TGT), .VMAX_CMS(VMAX_CMS), .DR_AMB_CM(D_RRES_CM)) u_fusion (
    .clk, .rst_n,
    .clear (fus_clear),
    .p_wr  (p_c_valid), .p_tgt(p_tgt), .p_mag(p_c_det.mag),
    .d_wr  (d_c_valid), .d_tgt(d_tgt),
    .start (fus_start),
    .busy  (fusion_busy),
    .fused_valid, .fused,
    .done  (fusion_done),
    .n_fused,
    .n_p, .n_d
  );

endmodule
