// tb_ilm_pipe: the pipelined multiplier with 0, 1, 2 (default) and 3
// correction circuits side by side at 16 bits. A random operand pair enters
// on most cycles (in_valid has random gaps). Each output is checked against
// the reference value for its correction count, and must appear exactly
// 4+ECC cycles after its operands (6 cycles for the default), with out_valid
// high exactly then and low otherwise. Back-to-back products confirm one
// result per cycle.
module tb_ilm_pipe;
  import ilm_ref_pkg::*;

  int checks = 0, failures = 0;

  logic        clk = 0, rst_n = 0, in_valid = 0;
  logic [15:0] n1 = 0, n2 = 0;
  logic        ov [4];
  logic [31:0] p  [4];

  ilm_pipe #(.NUM_ECC(0)) dut0 (.clk, .rst_n, .in_valid, .n1, .n2, .out_valid(ov[0]), .p(p[0]));
  ilm_pipe #(.NUM_ECC(1)) dut1 (.clk, .rst_n, .in_valid, .n1, .n2, .out_valid(ov[1]), .p(p[1]));
  ilm_pipe                dut2 (.clk, .rst_n, .in_valid, .n1, .n2, .out_valid(ov[2]), .p(p[2]));
  ilm_pipe #(.NUM_ECC(3)) dut3 (.clk, .rst_n, .in_valid, .n1, .n2, .out_valid(ov[3]), .p(p[3]));

  always #5 clk = ~clk;

  localparam int NCYC = 4000;
  logic [15:0] ha [NCYC];
  logic [15:0] hb [NCYC];
  logic        hv [NCYC];
  int back_to_back = 0;

  initial begin
    #((NCYC + 100) * 10);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // Cycle t: operands applied before edge t+1 (relative to the loop start).
    for (int t = 0; t < NCYC; t++) begin
      hv[t] = (t < NCYC - 10) && (($urandom % 8) != 0);
      if (t == 0) begin
        ha[t] = 234; hb[t] = 198; hv[t] = 1;
      end else begin
        ha[t] = 16'($urandom) >> ($urandom % 16);
        hb[t] = 16'($urandom) >> ($urandom % 16);
      end
      in_valid = hv[t];
      n1 = ha[t];
      n2 = hb[t];
      @(posedge clk);
      #1;
      // After edge t+1 the outputs of a pipe with latency L belong to cycle t+1-L.
      for (int k = 0; k < 4; k++) begin
        int s;
        logic expv;
        s = t + 1 - (4 + k);
        expv = (s >= 0) ? hv[s] : 1'b0;
        checks++;
        if (ov[k] !== expv) begin
          failures++;
          $display("FAIL ecc=%0d cycle %0d out_valid=%b exp %b", k, t, ov[k], expv);
        end
        if (expv) begin
          checks++;
          if (longint'(p[k]) != ref_product(64'(ha[s]), 64'(hb[s]), k)) begin
            failures++;
            $display("FAIL ecc=%0d #%0d %0d x %0d p=%0d exp=%0d", k, s, ha[s], hb[s],
                     p[k], ref_product(64'(ha[s]), 64'(hb[s]), k));
          end
          if (k == 2 && s >= 1 && hv[s-1]) back_to_back++;
        end
      end
    end
    checks++;
    if (back_to_back == 0) begin
      failures++;
      $display("FAIL no back-to-back products");
    end
    $display("back-to-back products: %0d", back_to_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
