// tb_basic_block: the combinational basic block at 16 bits.
// Checks the four steps of the worked example 234 x 198 (approximations
// 38912, 7168, 232 and 20), zero operands, and random operands against
// P(0) = N1*N2 - (N1-2^k1)(N2-2^k2) and the residues.
module tb_basic_block;
  import ilm_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [15:0] n1, n2, r1, r2;
  logic [31:0] p;

  basic_block dut (.n1(n1), .n2(n2), .p(p), .r1(r1), .r2(r2));

  task automatic check(logic [15:0] a, logic [15:0] b, longint unsigned exp_p);
    n1 = a; n2 = b; #1;
    checks++;
    if (longint'(p) != exp_p || longint'(r1) != drop_lead(a) ||
        longint'(r2) != drop_lead(b)) begin
      failures++;
      $display("FAIL a=%0d b=%0d p=%0d exp=%0d r1=%0d r2=%0d", a, b, p, exp_p, r1, r2);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] a, b;
    check(234, 198, 38912);
    check(106, 70, 7168);
    check(42, 6, 232);
    check(10, 2, 20);
    check(0, 198, 0);
    check(234, 0, 0);
    check(0, 0, 0);
    check(16'hffff, 16'hffff, 64'hffff * 64'hffff - 64'h7fff * 64'h7fff);
    for (int i = 0; i < 20000; i++) begin
      a = 16'($urandom) >> ($urandom % 16);
      b = 16'($urandom) >> ($urandom % 16);
      check(a, b, ref_product(64'(a), 64'(b), 0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
