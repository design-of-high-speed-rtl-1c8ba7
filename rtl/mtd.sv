// mtd -- moving target detection: corner-turn memory plus slow-time FFT.
//
// Range-gate samples arrive pulse by pulse (or sweep by sweep): in_pulse is the
// slow-time index m (0..NPULSE-1) and in_gate the range gate n (0..GATES-1). They
// are written row-wise into one half of a ping-pong corner-turn memory of
// 2 x NPULSE x GATES complex words. The write of (m, n) = (NPULSE-1, GATES-1)
// closes the CPI: the halves swap, new data goes to the other half, and the
// finished half is read column-wise, one range gate at a time, into an
// NPULSE-point FFT. The FFT output is the Doppler spectrum of that gate and
// leaves as (out_gate, out_dop, out_data), out_last marking the last bin of the
// last gate: the range-Doppler map of the CPI (Fig. 4's matrix).
// If a CPI closes while the previous map is still being read out, the new CPI is
// not processed and 'overrun' pulses for one clock.
// Reading the map takes GATES * (NPULSE + NPULSE/2*log2(NPULSE) + NPULSE + 2)
// clocks, which must fit in one CPI for real-time operation.
// The corner turn followed by a per-gate FFT follows the document (MTD on the
// pulse-compressed data of every range gate; 256-point second-dimension FFT per
// range gate for the LFMCW path); the ping-pong organisation is this design's
// choice. The memory has one write and one synchronous read port. GATES and
// NPULSE must be powers of two.
module mtd
  import radar_pkg::*;
#(
  parameter int GATES  = 128,
  parameter int NPULSE = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [15:0] in_pulse,
  input  logic [15:0] in_gate,
  input  cplx_t       in_data,
  output logic        out_valid,
  output logic [15:0] out_gate,
  output logic [15:0] out_dop,
  output cplx_t       out_data,
  output logic        out_last,
  output logic        busy,
  output logic        overrun
);
  localparam int GW = $clog2(GATES);
  localparam int PW = $clog2(NPULSE);
  localparam int DEPTH = 2 * GATES * NPULSE;

  cplx_t mem [DEPTH];

  logic wbank;                 // half being written
  logic rbank;                 // half being read

  // ---------------- write side ----------------
  logic cpi_close;
  assign cpi_close = in_valid && in_pulse == 16'(NPULSE - 1) && in_gate == 16'(GATES - 1);

  always_ff @(posedge clk) begin
    if (in_valid)
      mem[{wbank, in_pulse[PW-1:0], in_gate[GW-1:0]}] <= in_data;
  end

  // ---------------- read side ----------------
  typedef enum logic [1:0] {R_IDLE, R_READ, R_WAIT_BUSY, R_WAIT_READY} rstate_t;
  rstate_t rstate;
  logic [GW-1:0] rd_gate;
  logic [PW:0]   rd_cnt;
  logic          rd_en, rd_vld;
  cplx_t         rd_data;
  logic          fft_ready, fft_ovalid, fft_olast;
  cplx_t         fft_odata;
  logic [PW-1:0] fft_oidx;
  logic [GW-1:0] o_gate;

  assign rd_en = (rstate == R_READ) && fft_ready && (rd_cnt < (PW+1)'(NPULSE));

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[{rbank, rd_cnt[PW-1:0], rd_gate}];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wbank   <= 1'b0;
      rbank   <= 1'b0;
      rstate  <= R_IDLE;
      rd_gate <= '0;
      rd_cnt  <= '0;
      rd_vld  <= 1'b0;
      overrun <= 1'b0;
      o_gate  <= '0;
    end else begin
      overrun <= 1'b0;
      rd_vld  <= rd_en;
      if (cpi_close) begin
        if (rstate == R_IDLE && !busy) begin
          wbank   <= ~wbank;
          rbank   <= wbank;
          rstate  <= R_READ;
          rd_gate <= '0;
          rd_cnt  <= '0;
        end else begin
          overrun <= 1'b1;
        end
      end
      unique case (rstate)
        R_IDLE: ;
        R_READ: begin
          if (rd_en) rd_cnt <= rd_cnt + 1'b1;
          if (rd_cnt == (PW+1)'(NPULSE)) rstate <= R_WAIT_BUSY;
        end
        R_WAIT_BUSY: if (!fft_ready) rstate <= R_WAIT_READY;
        R_WAIT_READY: if (fft_ready) begin
          rd_cnt <= '0;
          if (rd_gate == GW'(GATES - 1)) begin
            rstate <= R_IDLE;
          end else begin
            rd_gate <= rd_gate + 1'b1;
            rstate  <= R_READ;
          end
        end
        default: rstate <= R_IDLE;
      endcase
      if (fft_ovalid && fft_olast) o_gate <= o_gate + 1'b1;
    end
  end

  // busy: a map is being read or its last spectrum has not left the FFT yet.
  logic out_pending;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_pending <= 1'b0;
    else if (cpi_close && rstate == R_IDLE && !busy) out_pending <= 1'b1;
    else if (fft_ovalid && fft_olast && o_gate == GW'(GATES - 1)) out_pending <= 1'b0;
  end
  assign busy = out_pending;

  fft #(.N(NPULSE)) u_fft (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (rd_vld),
    .in_data  (rd_data),
    .in_ready (fft_ready),
    .out_valid(fft_ovalid),
    .out_data (fft_odata),
    .out_idx  (fft_oidx),
    .out_last (fft_olast)
  );

  assign out_valid = fft_ovalid;
  assign out_gate  = 16'(o_gate);
  assign out_dop   = 16'(fft_oidx);
  assign out_data  = fft_odata;
  assign out_last  = fft_ovalid && fft_olast && (o_gate == GW'(GATES - 1));

endmodule
