// ilm_comb: non-pipelined iterative logarithmic multiplier.
//
// A cascade of NUM_ECC+1 combinational basic blocks. Block 0 computes the
// first approximation P(0) of n1*n2 and the two residues; block i (an
// error-correction circuit) takes the residues of block i-1 and computes the
// correction term C(i), which approximates the residue product block i-1
// dropped. The product is P(NUM_ECC) = P(0) + C(1) + ... + C(NUM_ECC), formed
// by a chain of adders. The error never makes the result exceed the true
// product, each correction cuts the worst-case relative error by at least 4x
// (25 %, 6.25 %, 1.56 %, 0.39 % for 0..3 ECCs), and the result is exact once
// either residue reaches zero, i.e. after as many steps as the operand with
// fewer '1' bits has ones. The cascade of basic blocks and the adder that adds
// C(1) follow the published one-ECC structure; repeating the pattern with a
// chain of adders for more ECCs is this design's reading of it.
//
// Interface: n1, n2 (N bits, unsigned) -> p (2N bits). Combinational; the
// delay grows with every ECC added.
module ilm_comb #(
  parameter int unsigned N       = ilm_pkg::OPERAND_W,
  parameter int unsigned NUM_ECC = ilm_pkg::NUM_ECC
) (
  input  logic [N-1:0]   n1,
  input  logic [N-1:0]   n2,
  output logic [2*N-1:0] p
);

  logic [N-1:0]   op1  [NUM_ECC+2];
  logic [N-1:0]   op2  [NUM_ECC+2];
  logic [2*N-1:0] term [NUM_ECC+1];
  logic [2*N-1:0] acc  [NUM_ECC+1];

  assign op1[0] = n1;
  assign op2[0] = n2;

  for (genvar i = 0; i <= NUM_ECC; i++) begin : g_bb
    basic_block #(.N(N)) u_bb (
      .n1(op1[i]), .n2(op2[i]),
      .p(term[i]), .r1(op1[i+1]), .r2(op2[i+1])
    );
    if (i == 0) begin : g_first
      assign acc[0] = term[0];
    end else begin : g_add
      assign acc[i] = acc[i-1] + term[i];
    end
  end

  assign p = acc[NUM_ECC];

endmodule
