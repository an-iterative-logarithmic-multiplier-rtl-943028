// basic_block_pipe: the basic block split into four pipeline stages.
//
// Same arithmetic as basic_block, P(0) = 2^(k1+k2) + (N1-2^k1)2^k2 +
// (N2-2^k2)2^k1, with a register rank after each stage:
//   stage 1: leading-one detection, k1 and k2, residues N1-2^k1 and N2-2^k2;
//   stage 2: k1+k2 and the two shifted residues;
//   stage 3: 2^(k1+k2) and the sum of the shifted residues;
//   stage 4: the final sum, P(0).
// The stage-1 residue registers are brought out (r1, r2), so a following
// error-correction block can start one cycle after this one.
// The zero flags travel with the data through stages 1 to 3 and clear the
// stage-4 sum when an operand is zero; that and the absence of reset on the
// data registers are this design's choices. There is no stall: a new operand
// pair may enter every cycle.
//
// Interface: clk; n1, n2 (N bits) sampled at every rising edge.
// Timing: r1/r2 are valid 1 cycle and p 4 cycles after the operands.
module basic_block_pipe #(
  parameter int unsigned N = ilm_pkg::OPERAND_W
) (
  input  logic           clk,
  input  logic [N-1:0]   n1,
  input  logic [N-1:0]   n2,
  output logic [2*N-1:0] p,
  output logic [N-1:0]   r1,
  output logic [N-1:0]   r2
);

  localparam int unsigned KW = ilm_pkg::k_width(N);

  // Stage 1 ------------------------------------------------------------------
  logic [N-1:0]  lead1, lead2;
  logic          zero1, zero2;
  logic [KW-1:0] k1_c, k2_c;

  lod #(.WIDTH(N)) u_lod1 (.a(n1), .onehot(lead1), .zero(zero1));
  lod #(.WIDTH(N)) u_lod2 (.a(n2), .onehot(lead2), .zero(zero2));

  priority_encoder #(.WIDTH(N), .KW(KW)) u_enc1 (.onehot(lead1), .k(k1_c));
  priority_encoder #(.WIDTH(N), .KW(KW)) u_enc2 (.onehot(lead2), .k(k2_c));

  logic [KW-1:0] s1_k1, s1_k2;
  logic          s1_zero;

  always_ff @(posedge clk) begin
    s1_k1   <= k1_c;
    s1_k2   <= k2_c;
    r1      <= n1 ^ lead1;
    r2      <= n2 ^ lead2;
    s1_zero <= zero1 | zero2;
  end

  // Stage 2 ------------------------------------------------------------------
  logic [2*N-1:0] sh1_c, sh2_c;

  barrel_shifter_left #(.IN_W(N), .OUT_W(2*N), .SH_W(KW))
    u_sh1 (.din(r1), .sh(s1_k2), .dout(sh1_c));
  barrel_shifter_left #(.IN_W(N), .OUT_W(2*N), .SH_W(KW))
    u_sh2 (.din(r2), .sh(s1_k1), .dout(sh2_c));

  logic [KW:0]    s2_ksum;
  logic [2*N-1:0] s2_sh1, s2_sh2;
  logic           s2_zero;

  always_ff @(posedge clk) begin
    s2_ksum <= {1'b0, s1_k1} + {1'b0, s1_k2};
    s2_sh1  <= sh1_c;
    s2_sh2  <= sh2_c;
    s2_zero <= s1_zero;
  end

  // Stage 3 ------------------------------------------------------------------
  logic [2*N-1:0] lead_p_c;

  k_decoder #(.KSUM_W(KW+1), .OUT_W(2*N)) u_dec (.ksum(s2_ksum), .onehot(lead_p_c));

  logic [2*N-1:0] s3_lead_p, s3_res_sum;
  logic           s3_zero;

  always_ff @(posedge clk) begin
    s3_lead_p  <= lead_p_c;
    s3_res_sum <= s2_sh1 + s2_sh2;
    s3_zero    <= s2_zero;
  end

  // Stage 4 ------------------------------------------------------------------
  always_ff @(posedge clk) begin
    p <= s3_zero ? '0 : s3_lead_p + s3_res_sum;
  end

endmodule
