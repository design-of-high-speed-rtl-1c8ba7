// target_condense -- target agglomeration of one CPI's detection list.
//
// A target whose echo spreads over neighbouring range gates and Doppler bins is
// detected several times. This block merges such detections into one point: each
// incoming detection is compared in parallel with up to MAXC open clusters; if it
// lies inside a cluster's bounding box widened by one gate and one Doppler bin it
// joins that cluster (the box grows, and the detection becomes the cluster's point
// if its magnitude is larger), otherwise it opens a new cluster. Detections beyond
// MAXC clusters are dropped. On 'flush' (end of the CPI's list) the point of every
// cluster leaves as a det_t on consecutive clocks, followed by a one-clock
// out_done; the block is then empty. The point of a cluster is its strongest cell.
// Merging neighbouring range and Doppler gates into one target follows the
// document; the bounding-box rule, strongest-cell point and MAXC are this design's
// choices. Doppler adjacency does not wrap from the last bin to bin 0.
module target_condense
  import radar_pkg::*;
#(
  parameter int MAXC = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  det_t        in_det,
  input  logic        flush,
  output logic        out_valid,
  output det_t        out_det,
  output logic        out_done,
  output logic [15:0] dropped
);
  localparam int CW = $clog2(MAXC + 1);

  typedef struct packed {
    logic [15:0] gmin, gmax, dmin, dmax;
    det_t        peak;
  } clus_t;

  clus_t         cl [MAXC];
  logic [CW-1:0] ncl;
  logic          flushing;
  logic [CW-1:0] ocnt;

  // Find the first open cluster the new detection touches.
  logic          found;
  logic [$clog2(MAXC)-1:0] fidx;
  always_comb begin
    found = 1'b0;
    fidx  = '0;
    for (int c = 0; c < MAXC; c++) begin
      if (!found && CW'(c) < ncl &&
          17'(in_det.gate) + 17'd1 >= 17'(cl[c].gmin) && 17'(in_det.gate) <= 17'(cl[c].gmax) + 17'd1 &&
          17'(in_det.dop)  + 17'd1 >= 17'(cl[c].dmin) && 17'(in_det.dop)  <= 17'(cl[c].dmax) + 17'd1) begin
        found = 1'b1;
        fidx  = ($clog2(MAXC))'(c);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ncl       <= '0;
      flushing  <= 1'b0;
      ocnt      <= '0;
      out_valid <= 1'b0;
      out_det   <= '0;
      out_done  <= 1'b0;
      dropped   <= '0;
      for (int c = 0; c < MAXC; c++) cl[c] <= '0;
    end else begin
      out_valid <= 1'b0;
      out_done  <= 1'b0;
      if (flushing) begin
        if (ocnt < ncl) begin
          out_valid <= 1'b1;
          out_det   <= cl[ocnt[$clog2(MAXC)-1:0]].peak;
          ocnt      <= ocnt + 1'b1;
        end else begin
          out_done <= 1'b1;
          flushing <= 1'b0;
          ncl      <= '0;
        end
      end else begin
        if (in_valid) begin
          if (found) begin
            if (in_det.gate < cl[fidx].gmin) cl[fidx].gmin <= in_det.gate;
            if (in_det.gate > cl[fidx].gmax) cl[fidx].gmax <= in_det.gate;
            if (in_det.dop  < cl[fidx].dmin) cl[fidx].dmin <= in_det.dop;
            if (in_det.dop  > cl[fidx].dmax) cl[fidx].dmax <= in_det.dop;
            if (in_det.mag  > cl[fidx].peak.mag) cl[fidx].peak <= in_det;
          end else if (ncl < CW'(MAXC)) begin
            cl[ncl[$clog2(MAXC)-1:0]] <= '{gmin: in_det.gate, gmax: in_det.gate,
                                           dmin: in_det.dop,  dmax: in_det.dop, peak: in_det};
            ncl <= ncl + 1'b1;
          end else begin
            dropped <= dropped + 1'b1;
          end
        end
        if (flush) begin
          flushing <= 1'b1;
          ocnt     <= '0;
        end
      end
    end
  end

endmodule
