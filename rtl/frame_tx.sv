// frame_tx -- data transmission module: framing of one band's results.
//
// Collects the CFAR detections of one CPI in an interface RAM and presents them
// to the DSP-side reader (the SRIO target port) as one frame of 32-bit words:
//   word 0        Frame_ID            (FRAME_ID parameter)
//   word 1        {PRI_CNT[31:16], CPI_CNT[15:0]}
//   word 2        Waveform_Type in bits 6:0
//   word 3        number of targets T
//   word 4        data length L = 2*T
//   word 5+2t     {range gate[31:16], Doppler bin[15:0]} of target t
//   word 6+2t     magnitude of target t
//   word 5+L      check word: 32-bit sum of words 0 .. 4+L
// Detections are written as they arrive (at most MAX_TGT per CPI; more are dropped
// and counted in 'dropped'). On map_done the header and check word are fixed,
// done_flag (BPSK_done / LFMCW_done) goes high and, on its rising edge, irq pulses
// for one clock (the GPIO8 / GPIO9 interrupt to the DSP). done_flag falls when the
// reader acknowledges with 'ack' or when the next CPI's first detection arrives.
// The target count is sent because the data words of a shorter frame overwrite
// only the start of the previous frame's data.
// rd_addr/rd_data is a synchronous read port with one clock of latency.
// The word list, target count, data length, check word, done flags and GPIO
// interrupts follow the document; the word order, the two-word target record and
// the acknowledge are this design's choices.
module frame_tx
  import radar_pkg::*;
#(
  parameter int          MAX_TGT  = 64,
  parameter logic [31:0] FRAME_ID = FRAME_ID_P,
  parameter logic [6:0]  WAVE     = WAVE_BPSK
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        det_valid,
  input  det_t        det,
  input  logic        map_done,
  input  logic [15:0] pri_cnt,
  input  logic [15:0] cpi_cnt,
  input  logic        ack,
  input  logic [15:0] rd_addr,
  output logic [31:0] rd_data,
  output logic        done_flag,
  output logic        irq,
  output logic [15:0] tgt_count,
  output logic [15:0] dropped
);
  localparam int TW = $clog2(MAX_TGT);

  det_t        ram [MAX_TGT];
  logic [15:0] n_cur;          // detections of the CPI being collected
  logic [31:0] dsum;           // running sum of the data words being collected
  logic        collecting;
  logic [31:0] hdr_id, hdr_cnt, hdr_wave, hdr_t, hdr_l, chk;
  logic        done_q;

  logic accept;
  assign accept = det_valid && n_cur < 16'(MAX_TGT);

  always_ff @(posedge clk) begin
    if (accept) ram[n_cur[TW-1:0]] <= det;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_cur      <= '0;
      dsum       <= '0;
      collecting <= 1'b0;
      hdr_id     <= '0;
      hdr_cnt    <= '0;
      hdr_wave   <= '0;
      hdr_t      <= '0;
      hdr_l      <= '0;
      chk        <= '0;
      done_flag  <= 1'b0;
      done_q     <= 1'b0;
      irq        <= 1'b0;
      tgt_count  <= '0;
      dropped    <= '0;
    end else begin
      done_q <= done_flag;
      irq    <= done_flag && !done_q;
      if (map_done) begin
        // Close the frame; a detection in the same clock still belongs to it.
        logic [15:0] t;
        logic [31:0] s;
        t = accept ? n_cur + 1'b1 : n_cur;
        s = accept ? dsum + {det.gate, det.dop} + det.mag : dsum;
        hdr_id     <= FRAME_ID;
        hdr_cnt    <= {pri_cnt, cpi_cnt};
        hdr_wave   <= {25'd0, WAVE};
        hdr_t      <= 32'(t);
        hdr_l      <= 32'(2 * t);
        chk        <= s + FRAME_ID + {pri_cnt, cpi_cnt} + {25'd0, WAVE} + 32'(t) + 32'(2 * t);
        tgt_count  <= t;
        done_flag  <= 1'b1;
        n_cur      <= '0;
        dsum       <= '0;
        collecting <= 1'b0;
        if (det_valid && !accept) dropped <= dropped + 1'b1;
      end else begin
        if (det_valid) begin
          if (!collecting) begin
            collecting <= 1'b1;
            done_flag  <= 1'b0;
          end
          if (accept) begin
            n_cur <= n_cur + 1'b1;
            dsum  <= dsum + {det.gate, det.dop} + det.mag;
          end else begin
            dropped <= dropped + 1'b1;
          end
        end
        if (ack) done_flag <= 1'b0;
      end
    end
  end

  // Read port.
  logic [TW:0] data_word;
  det_t        rec;
  always_comb begin
    data_word = (TW+1)'(rd_addr - 16'd5);
    rec       = ram[data_word[TW:1]];
  end

  always_ff @(posedge clk) begin
    if (rd_addr == 16'd0)                    rd_data <= hdr_id;
    else if (rd_addr == 16'd1)               rd_data <= hdr_cnt;
    else if (rd_addr == 16'd2)               rd_data <= hdr_wave;
    else if (rd_addr == 16'd3)               rd_data <= hdr_t;
    else if (rd_addr == 16'd4)               rd_data <= hdr_l;
    else if (32'(rd_addr) < 32'd5 + hdr_l)   rd_data <= data_word[0] ? rec.mag : {rec.gate, rec.dop};
    else if (32'(rd_addr) == 32'd5 + hdr_l)  rd_data <= chk;
    else                                     rd_data <= '0;
  end

endmodule
