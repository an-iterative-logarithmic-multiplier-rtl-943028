// tb_k_decoder: every 5-bit k1+k2 must give the 32-bit word 2^(k1+k2).
module tb_k_decoder;
  int checks = 0, failures = 0;

  logic [4:0]  ksum;
  logic [31:0] oh;

  k_decoder dut (.ksum(ksum), .onehot(oh));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      ksum = 5'(i);
      #1;
      checks++;
      if (longint'(oh) != (longint'(1) << i)) begin
        failures++;
        $display("FAIL ksum=%0d oh=%h", i, oh);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
