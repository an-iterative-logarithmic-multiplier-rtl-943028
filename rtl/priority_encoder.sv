// priority_encoder: turns the leading-one mask into the characteristic number.
//
// The input is the one-hot output of the leading-one detector, so a plain OR
// encoder is enough: bit b of k is the OR of every mask bit whose index has
// bit b set. The module name follows the block diagram; its insides are this
// design's choice. An all-zero mask gives k = 0; the zero flag of the
// leading-one detector tells that case apart.
//
// Interface: onehot (WIDTH bits) -> k (clog2(WIDTH) bits). Combinational.
module priority_encoder #(
  parameter int unsigned WIDTH = ilm_pkg::OPERAND_W,
  parameter int unsigned KW    = ilm_pkg::k_width(WIDTH)
) (
  input  logic [WIDTH-1:0] onehot,
  output logic [KW-1:0]    k
);

  always_comb begin
    k = '0;
    for (int i = 0; i < WIDTH; i++) begin
      if (onehot[i]) k = k | KW'(i);
    end
  end

endmodule
