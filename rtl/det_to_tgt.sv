// det_to_tgt -- converts a detection's range gate and Doppler bin to physical units.
//
// The Doppler bin of an NDOP-point FFT is read as signed (bins NDOP/2..NDOP-1 are
// negative). Then
//   velocity [cm/s] = sdop * VSPAN_CMS / NDOP
//   range    [cm]   = (gate + GATE_OFS) * RRES_CM - COUPLE * sdop * RRES_CM / NDOP
// VSPAN_CMS is the velocity interval covered by the Doppler FFT. For the D-band
// LFMCW map (COUPLE = 1) the beat frequency holds range plus Doppler,
// f_B = mu*tau_0 + f_d, so the range R = (f_B - f_d) c / (2 mu) loses the
// Doppler part, which is sdop/NDOP of a range bin. For the P-band BPSK map
// (COUPLE = 0) GATE_OFS is the blind zone of the pulse compressor in range gates.
// Combinational; divisions are by constants. Inputs are the gate and dop
// fields of a det_t.
module det_to_tgt
  import radar_pkg::*;
#(
  parameter int NDOP      = 256,
  parameter int RRES_CM   = 50,
  parameter int GATE_OFS  = 0,
  parameter int VSPAN_CMS = 95695,
  parameter bit COUPLE    = 1'b1
) (
  input  logic [15:0] gate,
  input  logic [15:0] dop,
  output tgt_t tgt
);
  logic signed [31:0] sdop, gate_s, shift_s;
  always_comb begin
    sdop    = (32'(dop) >= 32'(NDOP / 2)) ? 32'(dop) - 32'(NDOP) : 32'(dop);
    gate_s  = 32'(gate) + 32'(GATE_OFS);
    shift_s = COUPLE ? (sdop * 32'(RRES_CM)) / 32'(NDOP) : 32'sd0;
    tgt.vel_cms  = (sdop * 32'(VSPAN_CMS)) / 32'(NDOP);
    tgt.range_cm = gate_s * 32'(RRES_CM) - shift_s;
  end
endmodule
