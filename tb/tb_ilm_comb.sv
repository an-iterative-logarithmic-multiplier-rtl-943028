// tb_ilm_comb: the non-pipelined multiplier with 0, 1, 2 (default), 3, 4 and
// 5 correction circuits side by side at 16 bits.
// Checks the worked example 234 x 198 (38912, 46080, 46312, then the exact
// 46332), zero operands, random operands against the reference, that no
// result exceeds the true product, that the relative error stays under the
// worst-case bound 25 % / 4^ECC (25, 6.25, 1.56, 0.39, 0.098, 0.024 %), and
// that a result is exact once the number of basic blocks (ECC+1) reaches the
// smaller number of '1' bits of the two operands.
module tb_ilm_comb;
  import ilm_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [15:0] n1, n2;
  logic [31:0] p [6];

  ilm_comb #(.NUM_ECC(0)) dut0 (.n1(n1), .n2(n2), .p(p[0]));
  ilm_comb #(.NUM_ECC(1)) dut1 (.n1(n1), .n2(n2), .p(p[1]));
  ilm_comb                dut2 (.n1(n1), .n2(n2), .p(p[2]));
  ilm_comb #(.NUM_ECC(3)) dut3 (.n1(n1), .n2(n2), .p(p[3]));
  ilm_comb #(.NUM_ECC(4)) dut4 (.n1(n1), .n2(n2), .p(p[4]));
  ilm_comb #(.NUM_ECC(5)) dut5 (.n1(n1), .n2(n2), .p(p[5]));

  int exact_seen = 0;

  task automatic check(logic [15:0] a, logic [15:0] b);
    longint unsigned t, e;
    n1 = a; n2 = b; #1;
    t = longint'(a) * longint'(b);
    for (int k = 0; k < 6; k++) begin
      e = ref_product(64'(a), 64'(b), k);
      checks++;
      if (longint'(p[k]) != e || longint'(p[k]) > t ||
          (t != 0 && real'(t - longint'(p[k])) >= real'(t) * (0.25 / (4.0 ** k)))) begin
        failures++;
        $display("FAIL ecc=%0d a=%0d b=%0d p=%0d exp=%0d", k, a, b, p[k], e);
      end
      if (k + 1 >= (ones(64'(a)) < ones(64'(b)) ? ones(64'(a)) : ones(64'(b)))) begin
        checks++;
        exact_seen++;
        if (longint'(p[k]) != t) begin
          failures++;
          $display("FAIL ecc=%0d a=%0d b=%0d should be exact: %0d", k, a, b, p[k]);
        end
      end
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned ex [4] = '{38912, 46080, 46312, 46332};
    n1 = 234; n2 = 198; #1;
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (longint'(p[k]) != ex[k]) begin
        failures++;
        $display("FAIL example ecc=%0d: %0d exp %0d", k, p[k], ex[k]);
      end
    end
    check(0, 0);
    check(0, 16'hffff);
    check(16'hffff, 0);
    check(16'hffff, 16'hffff);
    check(1, 1);
    for (int i = 0; i < 20000; i++) begin
      check(16'($urandom) >> ($urandom % 16), 16'($urandom) >> ($urandom % 16));
    end
    checks++;
    if (exact_seen == 0) begin
      failures++;
      $display("FAIL no exact case exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
