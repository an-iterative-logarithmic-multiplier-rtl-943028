// barrel_shifter_left: logarithmic left shifter.
//
// Places an IN_W-bit residue into an OUT_W-bit word and shifts it left by
// `sh` bits, one multiplexer rank per bit of the shift amount (rank s shifts
// by 2^s when sh[s] is set). In the multiplier it forms (N1-2^k1)*2^k2 and
// (N2-2^k2)*2^k1 as 2n-bit words. Bits shifted past the MSB are dropped; with
// the multiplier's widths that never happens. The log-shifter structure is
// this design's choice.
//
// Interface: din (IN_W), sh (SH_W) -> dout (OUT_W). Combinational.
module barrel_shifter_left #(
  parameter int unsigned IN_W  = ilm_pkg::OPERAND_W,
  parameter int unsigned OUT_W = 2 * ilm_pkg::OPERAND_W,
  parameter int unsigned SH_W  = ilm_pkg::k_width(ilm_pkg::OPERAND_W)
) (
  input  logic [IN_W-1:0]  din,
  input  logic [SH_W-1:0]  sh,
  output logic [OUT_W-1:0] dout
);

  logic [OUT_W-1:0] rank [SH_W+1];

  always_comb begin
    rank[0] = OUT_W'(din);
    for (int s = 0; s < SH_W; s++) begin
      rank[s+1] = sh[s] ? (rank[s] << (1 << s)) : rank[s];
    end
    dout = rank[SH_W];
  end

endmodule
