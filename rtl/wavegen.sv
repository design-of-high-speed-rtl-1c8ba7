// wavegen -- waveform generation control: the radar's synchronous timing.
//
// Produces the timing the local oscillator frequency source needs to build both
// transmit waveforms, and the same timing for the receive processors:
//   P-band BPSK : pri_start (one clock at the start of every pulse repetition
//                 interval), tx_gate (high while the coded pulse is transmitted,
//                 also the transmit/receive switch control), sym (the current
//                 M-sequence chip, 1 = phase pi) and sym_stb (one clock at every
//                 chip boundary, chip rate = clock / SYM_DIV).
//   D-band LFMCW: sweep_start (one clock at the start of every down-sweep).
//   Both        : cpi_start (one clock at the start of every coherent processing
//                 interval) and cpi_ref (high during the first PRI of a CPI), plus
//                 pulse/sweep indices and the PRI and CPI counters written into the
//                 result frames.
// The two waveforms run simultaneously inside one CPI, as described for the P/D
// band radar, so NUM_PULSES*PRI_CYCLES must equal NUM_SWEEPS*SWEEP_CYCLES (checked
// by an assertion). The 4:1 ratio of the 250 MHz clock to the 62.5 MHz symbol rate
// and the 256 sweeps per CPI follow the document; the PRI, sweep length, pulse
// count and code length are this design's choices. Timing starts one clock after
// 'enable' rises; all outputs are registered.
module wavegen
  import radar_pkg::*;
#(
  parameter int SYM_DIV      = 4,
  parameter int CODE_DEG     = 5,
  parameter int PRI_CYCLES   = 3840,
  parameter int NUM_PULSES   = 64,
  parameter int SWEEP_CYCLES = 960,
  parameter int NUM_SWEEPS   = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  output logic        cpi_start,
  output logic        cpi_ref,
  output logic        pri_start,
  output logic        tx_gate,
  output logic        sym,
  output logic        sym_stb,
  output logic        sweep_start,
  output logic [15:0] pulse_idx,
  output logic [15:0] sweep_idx,
  output logic [15:0] pri_cnt,
  output logic [15:0] cpi_cnt
);
  localparam int CODE_LEN = (1 << CODE_DEG) - 1;
  localparam int TX_CYCLES = CODE_LEN * SYM_DIV;
  localparam logic [1022:0] CODE = mseq_bits(CODE_DEG);

  initial begin
    assert (NUM_PULSES * PRI_CYCLES == NUM_SWEEPS * SWEEP_CYCLES)
      else $error("wavegen: P-band and D-band CPI lengths differ");
    assert (TX_CYCLES < PRI_CYCLES)
      else $error("wavegen: coded pulse longer than the PRI");
  end

  logic        run;
  logic [31:0] pri_ctr, sweep_ctr;
  logic [15:0] p_idx, s_idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run         <= 1'b0;
      pri_ctr     <= '0;
      sweep_ctr   <= '0;
      p_idx       <= '0;
      s_idx       <= '0;
      cpi_start   <= 1'b0;
      cpi_ref     <= 1'b0;
      pri_start   <= 1'b0;
      tx_gate     <= 1'b0;
      sym         <= 1'b0;
      sym_stb     <= 1'b0;
      sweep_start <= 1'b0;
      pulse_idx   <= '0;
      sweep_idx   <= '0;
      pri_cnt     <= '0;
      cpi_cnt     <= '0;
    end else begin
      run <= enable;
      if (run) begin
        // Registered decode of the current counter values.
        cpi_start   <= (pri_ctr == 0) && (p_idx == 0);
        cpi_ref     <= (p_idx == 0);
        pri_start   <= (pri_ctr == 0);
        tx_gate     <= (pri_ctr < 32'(TX_CYCLES));
        sym_stb     <= (pri_ctr < 32'(TX_CYCLES)) && (pri_ctr % SYM_DIV == 0);
        sym         <= (pri_ctr < 32'(TX_CYCLES)) ? CODE[pri_ctr / SYM_DIV] : 1'b0;
        sweep_start <= (sweep_ctr == 0);
        pulse_idx   <= p_idx;
        sweep_idx   <= s_idx;
        if (pri_ctr == 0) begin
          pri_cnt <= pri_cnt + 1'b1;
          if (p_idx == 0) cpi_cnt <= cpi_cnt + 1'b1;
        end
        // Counters.
        if (pri_ctr == 32'(PRI_CYCLES - 1)) begin
          pri_ctr <= '0;
          p_idx   <= (p_idx == 16'(NUM_PULSES - 1)) ? '0 : p_idx + 1'b1;
        end else begin
          pri_ctr <= pri_ctr + 1'b1;
        end
        if (sweep_ctr == 32'(SWEEP_CYCLES - 1)) begin
          sweep_ctr <= '0;
          s_idx     <= (s_idx == 16'(NUM_SWEEPS - 1)) ? '0 : s_idx + 1'b1;
        end else begin
          sweep_ctr <= sweep_ctr + 1'b1;
        end
      end else begin
        cpi_start   <= 1'b0;
        pri_start   <= 1'b0;
        tx_gate     <= 1'b0;
        sym_stb     <= 1'b0;
        sweep_start <= 1'b0;
      end
    end
  end

endmodule
