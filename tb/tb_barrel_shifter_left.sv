// tb_barrel_shifter_left: every shift amount of the default 16-to-32-bit
// shifter on random data; the expected word is the input times 2^sh.
module tb_barrel_shifter_left;
  int checks = 0, failures = 0;

  logic [15:0] din;
  logic [3:0]  sh;
  logic [31:0] dout;

  barrel_shifter_left dut (.din(din), .sh(sh), .dout(dout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned expv;
    for (int s = 0; s < 16; s++) begin
      for (int t = 0; t < 64; t++) begin
        din = (t == 0) ? 16'hffff : 16'($urandom);
        sh  = 4'(s);
        #1;
        expv = longint'(din) * (longint'(1) << s);
        checks++;
        if (longint'(dout) != expv) begin
          failures++;
          $display("FAIL din=%h sh=%0d dout=%h exp=%h", din, s, dout, expv);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
