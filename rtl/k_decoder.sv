// k_decoder: decodes k1+k2 into 2^(k1+k2).
//
// Puts the leading one of the approximate product: output bit `ksum` is set
// and all others are clear. In the multiplier KSUM_W = clog2(n)+1 and the
// output is 2n bits, so every sum of two characteristic numbers has a bit.
// Its function is the published one; building it as one comparator per
// output bit is this design's choice.
//
// Interface: ksum (KSUM_W) -> onehot (OUT_W). Combinational.
module k_decoder #(
  parameter int unsigned KSUM_W = ilm_pkg::k_width(ilm_pkg::OPERAND_W) + 1,
  parameter int unsigned OUT_W  = 2 * ilm_pkg::OPERAND_W
) (
  input  logic [KSUM_W-1:0] ksum,
  output logic [OUT_W-1:0]  onehot
);

  always_comb begin
    for (int i = 0; i < OUT_W; i++) begin
      onehot[i] = (ksum == KSUM_W'(i));
    end
  end

endmodule
