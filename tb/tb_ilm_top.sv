// tb_ilm_top: end-to-end test of the top at its default size (16-bit
// operands, two correction circuits), no parameters overridden.
//
// Streams operand pairs into the pipelined multiplier with random gaps in
// in_valid and feeds the same pairs to the combinational multiplier. Every
// pipelined product must appear exactly 6 cycles after its operands, equal
// the reference P(2) = N1*N2 - r1*r2 (residues after three leading-one
// removals) and equal the combinational product. It counts, and requires at
// least once each: the worked example 234 x 198 -> 46312, a zero operand, a
// product made exact early (a residue reached zero), a product still below
// the true one after both corrections, a non-zero correction term, a bubble
// in the stream and back-to-back products.
module tb_ilm_top;
  import ilm_ref_pkg::*;

  int checks = 0, failures = 0;

  logic        clk = 0, rst_n = 0, in_valid = 0;
  logic [15:0] a = 0, b = 0, ca = 0, cb = 0;
  logic        out_valid;
  logic [31:0] p, cp;

  ilm_top dut (.clk, .rst_n, .in_valid, .a, .b, .out_valid, .p, .ca, .cb, .cp);

  always #5 clk = ~clk;

  localparam int LAT  = 6;
  localparam int NCYC = 20000;
  logic [15:0] ha [NCYC];
  logic [15:0] hb [NCYC];
  logic        hv [NCYC];

  int n_example = 0, n_zero = 0, n_exact = 0, n_approx = 0, n_corr = 0;
  int n_bubble = 0, n_b2b = 0;

  initial begin
    #((NCYC + 200) * 10);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] pick(int t);
    case ($urandom % 16)
      0:       return 16'd0;
      1:       return 16'hffff;
      2:       return 16'(1) << ($urandom % 16);
      default: return 16'($urandom) >> ($urandom % 16);
    endcase
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < NCYC; t++) begin
      int s;
      hv[t] = (t < NCYC - 2 * LAT) && (($urandom % 6) != 0);
      ha[t] = pick(t);
      hb[t] = pick(t);
      if (t == 0) begin
        ha[t] = 234; hb[t] = 198; hv[t] = 1;
      end
      in_valid = hv[t];
      a  = ha[t];
      b  = hb[t];
      ca = ha[t];
      cb = hb[t];
      #1;
      // Combinational path, same operands.
      checks++;
      if (longint'(cp) != ref_product(64'(ha[t]), 64'(hb[t]), 2)) begin
        failures++;
        $display("FAIL comb %0d x %0d = %0d", ha[t], hb[t], cp);
      end
      if (t >= 1 && hv[t] && !hv[t-1]) n_bubble++;
      @(posedge clk);
      #1;
      s = t + 1 - LAT;
      checks++;
      if (out_valid !== ((s >= 0) ? hv[s] : 1'b0)) begin
        failures++;
        $display("FAIL out_valid at cycle %0d", t);
      end
      if (s >= 0 && hv[s]) begin
        longint unsigned tru, e, p0;
        tru = longint'(ha[s]) * longint'(hb[s]);
        e   = ref_product(64'(ha[s]), 64'(hb[s]), 2);
        p0  = ref_product(64'(ha[s]), 64'(hb[s]), 0);
        checks++;
        if (longint'(p) != e) begin
          failures++;
          $display("FAIL #%0d %0d x %0d = %0d exp %0d", s, ha[s], hb[s], p, e);
        end
        if (s == 0) begin
          n_example++;
          checks++;
          if (p != 46312) begin
            failures++;
            $display("FAIL example 234 x 198 = %0d", p);
          end
        end
        if (ha[s] == 0 || hb[s] == 0) n_zero++;
        else if (longint'(p) == tru) n_exact++;
        else n_approx++;
        if (e != p0) n_corr++;
        if (s >= 1 && hv[s-1]) n_b2b++;
      end
    end
    $display("example=%0d zero=%0d exact=%0d approx=%0d corrected=%0d bubbles=%0d back_to_back=%0d",
             n_example, n_zero, n_exact, n_approx, n_corr, n_bubble, n_b2b);
    checks++; if (n_example == 0) begin failures++; $display("FAIL example never ran"); end
    checks++; if (n_zero    == 0) begin failures++; $display("FAIL no zero operand"); end
    checks++; if (n_exact   == 0) begin failures++; $display("FAIL no early exact product"); end
    checks++; if (n_approx  == 0) begin failures++; $display("FAIL no approximate product"); end
    checks++; if (n_corr    == 0) begin failures++; $display("FAIL no correction applied"); end
    checks++; if (n_bubble  == 0) begin failures++; $display("FAIL no input bubble"); end
    checks++; if (n_b2b     == 0) begin failures++; $display("FAIL no back-to-back products"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
