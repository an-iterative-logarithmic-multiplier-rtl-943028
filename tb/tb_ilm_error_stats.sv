// tb_ilm_error_stats: error statistics of the multiplier.
//
// Multiplies every pair of n-bit operands 1..2^n-1 with the combinational
// multiplier at 0, 1, 2 and 3 correction circuits, for n = 8 and n = 12, and
// a pseudo-random sample of 2^20 pairs for n = 16. For each case it computes
// the average relative error (1/N) * sum (true - approx) / true, the share of
// products with relative error under 0.1 %, 0.5 % and 1 %, and the largest
// relative error, and checks them against the published figures:
//   average relative error [%]   BB      +1 ECC  +2 ECC  +3 ECC
//      8 bits                    8.9131  0.8337  0.0708  0.0048
//     12 bits                    9.3692  0.9726  0.1029  0.0106
//     16 bits                    9.4124  0.9874  0.1070  0.0117
//   share under 0.1/0.5/1 % for 1..3 ECCs (8, 12, 16 bits), 0.1 points,
//   worst case below 25, 6.25, 1.56, 0.39 % for 0..3 ECCs.
// The exhaustive runs must match to the printed rounding; the sampled 16-bit
// run to 1 % of the value (0.5 points for the shares).
module tb_ilm_error_stats;

  int checks = 0, failures = 0;

  logic [7:0]  a8,  b8;
  logic [11:0] a12, b12;
  logic [15:0] a16, b16;
  logic [15:0] p8  [4];
  logic [23:0] p12 [4];
  logic [31:0] p16 [4];

  for (genvar k = 0; k < 4; k++) begin : g_dut
    ilm_comb #(.N(8),  .NUM_ECC(k)) u8  (.n1(a8),  .n2(b8),  .p(p8[k]));
    ilm_comb #(.N(12), .NUM_ECC(k)) u12 (.n1(a12), .n2(b12), .p(p12[k]));
    ilm_comb #(.N(16), .NUM_ECC(k)) u16 (.n1(a16), .n2(b16), .p(p16[k]));
  end

  real aer_tab  [3][4] = '{'{8.9131, 0.8337, 0.0708, 0.0048},
                           '{9.3692, 0.9726, 0.1029, 0.0106},
                           '{9.4124, 0.9874, 0.1070, 0.0117}};
  // rate_tab[size][ecc-1][threshold]
  real rate_tab [3][3][3] = '{'{'{32.9, 54.8, 69.9}, '{79.9, 96.9, 99.6}, '{99.0, 100.0, 100.0}},
                              '{'{20.6, 48.1, 65.6}, '{71.6, 95.7, 99.4}, '{98.2, 100.0, 100.0}},
                              '{'{19.3, 47.4, 65.2}, '{70.6, 95.5, 99.4}, '{98.0, 100.0, 100.0}}};
  real max_tab  [4] = '{25.0, 6.25, 1.5625, 0.390625};
  real thr      [3] = '{0.1, 0.5, 1.0};

  real    sum_er [4];
  real    max_er [4];
  longint under  [4][3];
  longint count;

  initial begin
    #100000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic clear();
    count = 0;
    for (int k = 0; k < 4; k++) begin
      sum_er[k] = 0.0;
      max_er[k] = 0.0;
      for (int j = 0; j < 3; j++) under[k][j] = 0;
    end
  endtask

  task automatic accumulate(longint unsigned tru, longint unsigned approx [4]);
    real er;
    for (int k = 0; k < 4; k++) begin
      er = 100.0 * real'(tru - approx[k]) / real'(tru);
      sum_er[k] += er;
      if (er > max_er[k]) max_er[k] = er;
      for (int j = 0; j < 3; j++) if (er < thr[j]) under[k][j]++;
    end
  endtask

  task automatic report(int sz, int bits, real aer_tol_rel, real aer_tol_abs, real rate_tol);
    real aer, rate, d;
    $display("%0d bits: %0d products", bits, count);
    for (int k = 0; k < 4; k++) begin
      aer = sum_er[k] / real'(count);
      $display("%0d bits, %0d ECC: AER %.4f %% (published %.4f), max %.4f %%", bits, k, aer,
               aer_tab[sz][k], max_er[k]);
      d = aer - aer_tab[sz][k];
      if (d < 0) d = -d;
      checks++;
      if (d > aer_tol_abs + aer_tol_rel * aer_tab[sz][k]) begin
        failures++;
        $display("FAIL AER %0d bits %0d ECC", bits, k);
      end
      checks++;
      if (max_er[k] >= max_tab[k]) begin
        failures++;
        $display("FAIL worst case %0d bits %0d ECC", bits, k);
      end
      if (k > 0) begin
        for (int j = 0; j < 3; j++) begin
          rate = 100.0 * real'(under[k][j]) / real'(count);
          $display("   under %.1f %%: %.2f %% of products (published %.1f)", thr[j], rate,
                   rate_tab[sz][k-1][j]);
          d = rate - rate_tab[sz][k-1][j];
          if (d < 0) d = -d;
          checks++;
          if (d > rate_tol) begin
            failures++;
            $display("FAIL rate %0d bits %0d ECC under %.1f", bits, k, thr[j]);
          end
        end
      end
    end
  endtask

  initial begin
    longint unsigned ap [4];
    int x, y;
    a8 = 0; b8 = 0; a12 = 0; b12 = 0; a16 = 0; b16 = 0;

    clear();
    // One flat loop over all pairs (x, y), x and y in 1..255.
    for (int i = 0; i < 255 * 255; i++) begin
      x = 1 + i / 255;
      y = 1 + i % 255;
      a8 = 8'(x); b8 = 8'(y); #1;
      for (int k = 0; k < 4; k++) ap[k] = longint'(p8[k]);
      accumulate(longint'(x) * longint'(y), ap);
      count = count + 1;
    end
    report(0, 8, 0.0, 0.00006, 0.1);

    clear();
    for (int i = 0; i < 4095 * 4095; i++) begin
      x = 1 + i / 4095;
      y = 1 + i % 4095;
      a12 = 12'(x); b12 = 12'(y); #1;
      for (int k = 0; k < 4; k++) ap[k] = longint'(p12[k]);
      accumulate(longint'(x) * longint'(y), ap);
      count = count + 1;
    end
    report(1, 12, 0.0, 0.00006, 0.1);

    clear();
    for (int i = 0; i < (1 << 20); i++) begin
      a16 = 16'($urandom_range(65535, 1));
      b16 = 16'($urandom_range(65535, 1));
      #1;
      for (int k = 0; k < 4; k++) ap[k] = longint'(p16[k]);
      accumulate(longint'(a16) * longint'(b16), ap);
      count = count + 1;
    end
    report(2, 16, 0.01, 0.0, 0.5);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
