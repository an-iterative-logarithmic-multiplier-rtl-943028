// ilm_pipe: pipelined iterative logarithmic multiplier.
//
// NUM_ECC+1 four-stage pipelined basic blocks in a chain. Block 0 computes
// the first approximation P(0); block i (error-correction circuit i) takes
// the residues that block i-1 registers at the end of its stage 1, so it
// runs one cycle behind block i-1 and its correction term C(i) appears one
// cycle after block i-1's output. The running product is therefore delayed
// by one register per ECC and added to each new term as it arrives:
//   acc(0) = reg(P(0)), acc(i) = reg(acc(i-1) + C(i)),
//   p = acc(NUM_ECC-1) + C(NUM_ECC)   (last adder not registered).
// With two ECCs the latency is 6 cycles; in general 4+NUM_ECC. A new operand
// pair is accepted every cycle and a product leaves every cycle, whatever the
// number of ECCs.
//
// in_valid/out_valid, a shift register of the pipeline depth cleared by the
// active-low synchronous reset, mark which outputs carry a product; this
// handshake and the reset are this design's own (the data path itself has no
// reset and no stall). Operands are taken at the rising edge after they are
// applied.
//
// Interface: clk, rst_n, in_valid, n1, n2 (N bits) -> out_valid, p (2N bits).
// Timing: p/out_valid for operands applied before edge t are valid after
// edge t+LATENCY-1, i.e. LATENCY rising edges counting edge t.
module ilm_pipe #(
  parameter int unsigned N       = ilm_pkg::OPERAND_W,
  parameter int unsigned NUM_ECC = ilm_pkg::NUM_ECC
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [N-1:0]   n1,
  input  logic [N-1:0]   n2,
  output logic           out_valid,
  output logic [2*N-1:0] p
);

  localparam int unsigned LATENCY = ilm_pkg::pipe_latency(NUM_ECC);

  logic [N-1:0]   op1  [NUM_ECC+2];
  logic [N-1:0]   op2  [NUM_ECC+2];
  logic [2*N-1:0] term [NUM_ECC+1];

  assign op1[0] = n1;
  assign op2[0] = n2;

  for (genvar i = 0; i <= NUM_ECC; i++) begin : g_bb
    basic_block_pipe #(.N(N)) u_bb (
      .clk(clk), .n1(op1[i]), .n2(op2[i]),
      .p(term[i]), .r1(op1[i+1]), .r2(op2[i+1])
    );
  end

  if (NUM_ECC == 0) begin : g_no_ecc
    assign p = term[0];
  end else begin : g_ecc
    logic [2*N-1:0] acc [NUM_ECC];

    always_ff @(posedge clk) begin
      acc[0] <= term[0];
      for (int i = 1; i < NUM_ECC; i++) begin
        acc[i] <= acc[i-1] + term[i];
      end
    end

    assign p = acc[NUM_ECC-1] + term[NUM_ECC];
  end

  logic [LATENCY-1:0] vpipe;

  always_ff @(posedge clk) begin
    if (!rst_n) vpipe <= '0;
    else        vpipe <= {vpipe[LATENCY-2:0], in_valid};
  end

  assign out_valid = vpipe[LATENCY-1];

endmodule
