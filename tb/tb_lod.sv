// tb_lod: checks the leading-one detector exhaustively at 4 bits (the size of
// the drawn reference circuit) and 10 bits, and on random 16-bit words: the mask must hold exactly the highest set bit, and
// the zero flag must be set only for a zero input.
module tb_lod;
  import ilm_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [3:0]  a4, oh4;
  logic        z4;
  logic [9:0]  a10, oh10;
  logic        z10;
  logic [15:0] a16, oh16;
  logic        z16;

  lod #(.WIDTH(4))  dut4  (.a(a4), .onehot(oh4), .zero(z4));
  lod #(.WIDTH(10)) dut10 (.a(a10), .onehot(oh10), .zero(z10));
  lod                dut16 (.a(a16), .onehot(oh16), .zero(z16));

  task automatic check10(logic [9:0] v);
    logic [9:0] exp_oh;
    a10 = v; #1;
    exp_oh = (v == 0) ? '0 : 10'(1) << msb_index(64'(v));
    checks++;
    if (oh10 !== exp_oh || z10 !== (v == 0)) begin
      failures++;
      $display("FAIL lod10 a=%b oh=%b exp=%b zero=%b", v, oh10, exp_oh, z10);
    end
  endtask

  task automatic check16(logic [15:0] v);
    logic [15:0] exp_oh;
    a16 = v; #1;
    exp_oh = (v == 0) ? '0 : 16'(1) << msb_index(64'(v));
    checks++;
    if (oh16 !== exp_oh || z16 !== (v == 0)) begin
      failures++;
      $display("FAIL lod16 a=%b oh=%b exp=%b zero=%b", v, oh16, exp_oh, z16);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      a4 = 4'(v); #1;
      checks++;
      if (oh4 !== ((v == 0) ? 4'd0 : 4'(1) << msb_index(64'(v))) || z4 !== (v == 0)) begin
        failures++;
        $display("FAIL lod4 a=%b oh=%b zero=%b", a4, oh4, z4);
      end
    end
    for (int v = 0; v < 1024; v++) check10(10'(v));
    check16(16'h0000);
    check16(16'hffff);
    for (int i = 0; i < 16; i++) check16(16'(1) << i);
    for (int i = 0; i < 2000; i++) check16(16'($urandom) >> ($urandom % 16));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
