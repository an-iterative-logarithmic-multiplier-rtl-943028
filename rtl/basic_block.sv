// basic_block: one step of the iterative logarithmic multiplier, combinational.
//
// Writing each operand as N = 2^k + (N - 2^k), the exact product is
//   N1*N2 = 2^(k1+k2) + (N1-2^k1)*2^k2 + (N2-2^k2)*2^k1 + (N1-2^k1)*(N2-2^k2).
// The block computes the first three terms, the approximation P(0), with
// shifts and adds only: two leading-one detectors, two priority encoders
// giving k1 and k2, two barrel shifters, an adder for k1+k2, a decoder for
// 2^(k1+k2), an adder for the two shifted residues and a final adder. The
// residues N1-2^k1 and N2-2^k2 (the operands with their leading one cleared)
// are also output; they are the operands of the next error-correction
// circuit, whose result approximates the dropped residue product.
//
// A zero operand makes the product zero: the zero flags of the two detectors
// clear the final sum. Where the zero flags act is this design's choice.
//
// Interface: n1, n2 (N bits, unsigned) -> p (2N bits), r1, r2 (N bits).
// Timing: purely combinational.
module basic_block #(
  parameter int unsigned N = ilm_pkg::OPERAND_W
) (
  input  logic [N-1:0]   n1,
  input  logic [N-1:0]   n2,
  output logic [2*N-1:0] p,
  output logic [N-1:0]   r1,
  output logic [N-1:0]   r2
);

  localparam int unsigned KW = ilm_pkg::k_width(N);

  logic [N-1:0]   lead1, lead2;
  logic           zero1, zero2;
  logic [KW-1:0]  k1, k2;
  logic [KW:0]    ksum;
  logic [2*N-1:0] sh1, sh2, lead_p, res_sum;

  lod #(.WIDTH(N)) u_lod1 (.a(n1), .onehot(lead1), .zero(zero1));
  lod #(.WIDTH(N)) u_lod2 (.a(n2), .onehot(lead2), .zero(zero2));

  priority_encoder #(.WIDTH(N), .KW(KW)) u_enc1 (.onehot(lead1), .k(k1));
  priority_encoder #(.WIDTH(N), .KW(KW)) u_enc2 (.onehot(lead2), .k(k2));

  // Residues: the operands with their leading one removed.
  assign r1 = n1 ^ lead1;
  assign r2 = n2 ^ lead2;

  barrel_shifter_left #(.IN_W(N), .OUT_W(2*N), .SH_W(KW))
    u_sh1 (.din(r1), .sh(k2), .dout(sh1));
  barrel_shifter_left #(.IN_W(N), .OUT_W(2*N), .SH_W(KW))
    u_sh2 (.din(r2), .sh(k1), .dout(sh2));

  assign ksum = {1'b0, k1} + {1'b0, k2};

  k_decoder #(.KSUM_W(KW+1), .OUT_W(2*N)) u_dec (.ksum(ksum), .onehot(lead_p));

  assign res_sum = sh1 + sh2;
  assign p       = (zero1 | zero2) ? '0 : lead_p + res_sum;

endmodule
