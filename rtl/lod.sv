// lod: leading-one detector with zero detector.
//
// Produces a one-hot mask of the most significant '1' of the operand and a
// flag that is set when the operand is zero. It is the ripple structure of
// 2-to-1 multiplexers and 2-input AND gates used for the 4-bit detector of the
// design, widened to WIDTH bits: a "no one seen yet" signal starts at constant
// 1 at the MSB; at every bit a multiplexer selected by that bit passes it on
// (bit 0) or forces it to 0 (bit 1), and an AND gate of the bit with the
// signal from above marks the leading one. The MSB of the mask is the MSB of
// the input. Deriving the zero flag from the end of the same chain is this
// design's choice.
//
// Interface: a (operand) -> onehot (same width, at most one bit set), zero.
// Timing: purely combinational.
module lod #(
  parameter int unsigned WIDTH = ilm_pkg::OPERAND_W
) (
  input  logic [WIDTH-1:0] a,
  output logic [WIDTH-1:0] onehot,
  output logic             zero
);

  // none_above[i]: no bit above position i is set.
  logic [WIDTH-1:0] none_above;

  always_comb begin
    none_above[WIDTH-1] = 1'b1;
    for (int i = WIDTH - 1; i > 0; i--) begin
      none_above[i-1] = a[i] ? 1'b0 : none_above[i];
    end
    onehot[WIDTH-1] = a[WIDTH-1];
    for (int i = WIDTH - 2; i >= 0; i--) begin
      onehot[i] = a[i] & none_above[i];
    end
    zero = a[0] ? 1'b0 : none_above[0];
  end

endmodule
