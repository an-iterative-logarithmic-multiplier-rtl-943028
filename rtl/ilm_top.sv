// ilm_top: the iterative logarithmic multiplier in its two implementations.
//
// The main data path is the pipelined multiplier (ilm_pipe): 16-bit unsigned
// operands, 32-bit product, a basic block plus two error-correction circuits,
// latency 6 cycles, one product per cycle, worst-case relative error below
// 1.6 %. Beside it, with its own ports, stands the non-pipelined version of
// the same multiplier (ilm_comb), a combinational cascade of basic blocks with
// the same number of correction circuits. Both compute the same value for the
// same operands; they differ only in timing.
//
// Interface:
//   clk, rst_n (active-low, synchronous), in_valid, a, b -> out_valid, p:
//     pipelined multiplier, see ilm_pipe for timing;
//   ca, cb -> cp: combinational multiplier.
module ilm_top #(
  parameter int unsigned N       = ilm_pkg::OPERAND_W,
  parameter int unsigned NUM_ECC = ilm_pkg::NUM_ECC
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic           out_valid,
  output logic [2*N-1:0] p,
  input  logic [N-1:0]   ca,
  input  logic [N-1:0]   cb,
  output logic [2*N-1:0] cp
);

  ilm_pipe #(.N(N), .NUM_ECC(NUM_ECC)) u_pipe (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid),
    .n1(a), .n2(b), .out_valid(out_valid), .p(p)
  );

  ilm_comb #(.N(N), .NUM_ECC(NUM_ECC)) u_comb (
    .n1(ca), .n2(cb), .p(cp)
  );

endmodule
