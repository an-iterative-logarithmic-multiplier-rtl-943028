// tb_priority_encoder: every one-hot 16-bit input must give its bit index,
// and an all-zero input must give 0.
module tb_priority_encoder;
  int checks = 0, failures = 0;

  logic [15:0] oh;
  logic [3:0]  k;

  priority_encoder dut (.onehot(oh), .k(k));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      oh = '0;
      oh[i] = 1'b1;
      #1;
      checks++;
      if (int'(k) != i) begin
        failures++;
        $display("FAIL onehot bit %0d gave k=%0d", i, k);
      end
    end
    oh = '0; #1;
    checks++;
    if (k != 0) begin
      failures++;
      $display("FAIL zero input gave k=%0d", k);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
