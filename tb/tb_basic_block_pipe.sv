// tb_basic_block_pipe: streams a new random operand pair into the 4-stage
// basic block every cycle and checks that the residues come out 1 cycle and
// P(0) 4 cycles after the operands, with the same values as the
// combinational definition P(0) = N1*N2 - (N1-2^k1)(N2-2^k2).
module tb_basic_block_pipe;
  import ilm_ref_pkg::*;

  int checks = 0, failures = 0;

  logic        clk = 0;
  logic [15:0] n1, n2, r1, r2;
  logic [31:0] p;

  basic_block_pipe dut (.clk(clk), .n1(n1), .n2(n2), .p(p), .r1(r1), .r2(r2));

  always #5 clk = ~clk;

  localparam int NV = 3000;
  logic [15:0] va [NV];
  logic [15:0] vb [NV];

  initial begin
    #((NV + 100) * 10);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    va[0] = 234; vb[0] = 198;
    va[1] = 0;   vb[1] = 77;
    va[2] = 16'hffff; vb[2] = 1;
    for (int i = 3; i < NV; i++) begin
      va[i] = 16'($urandom) >> ($urandom % 16);
      vb[i] = 16'($urandom) >> ($urandom % 16);
    end
    // Operand i is applied before rising edge i+1.
    for (int t = 0; t < NV + 5; t++) begin
      n1 = (t < NV) ? va[t] : 16'd0;
      n2 = (t < NV) ? vb[t] : 16'd0;
      @(posedge clk);
      #1;
      // After edge t+1: residues of operand t; after edge t+1: P of operand t-3.
      if (t < NV) begin
        checks++;
        if (longint'(r1) != drop_lead(64'(va[t])) || longint'(r2) != drop_lead(64'(vb[t]))) begin
          failures++;
          $display("FAIL residues of #%0d: %0d %0d", t, r1, r2);
        end
      end
      if (t >= 3 && t - 3 < NV) begin
        checks++;
        if (longint'(p) != ref_product(64'(va[t-3]), 64'(vb[t-3]), 0)) begin
          failures++;
          $display("FAIL p of #%0d (%0d x %0d): %0d exp %0d", t - 3, va[t-3], vb[t-3], p,
                   ref_product(64'(va[t-3]), 64'(vb[t-3]), 0));
        end
      end
    end
    if (va[0] == 234) begin
      // Worked example value, checked against the printed number.
      checks++;
      if (ref_product(234, 198, 0) != 38912) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
