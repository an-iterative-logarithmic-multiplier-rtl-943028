// tb_block_matching: block-matching motion estimation with the pipelined
// multiplier, the application used to judge the multiplier in practice.
//
// For an observed 7x7 block F taken from the observed frame, the correlation
//   C(x, y) = sum_{i,j} F(i, j) * S(x+i, y+j)
// is computed for every position (x, y) of the block inside the R x R
// reference region S, and the position of the largest C is the match. The
// 8-bit pixel products go through two pipelined multipliers at 16-bit width,
// one with one correction circuit and one with two (the default), fed the same
// stream of one pixel pair per cycle; the testbench sums the 49 products of
// each position. For each observed block the per-block average error
//   PAE = mean over positions of |C_approx - C_true| / C_true
// is formed, TAE is the mean PAE over the blocks, and a block counts as a
// mismatch when the approximate maximum is at another position than the true
// one.
//
// The frames are synthetic: a CT-like bright ring on a darker disc and
// background with pixel noise, the observed frame being the reference frame
// moved by (2, 1) pixels with fresh noise. Region 32 x 32: all 676 blocks;
// region 48 x 48: every 2nd block position in each direction (441 of 1764
// blocks), to keep the run short. Checks: every product arrives, no
// approximate correlation exceeds the true one, TAE stays under the per-product
// worst-case error (6.25 % with one ECC, 1.5625 % with two), two ECCs give a
// lower TAE than one, and no more mismatches. The TAE itself depends on the
// pixel statistics: these frames give about 1.7 % and 0.14 %; the CT frames of
// the original evaluation gave about 0.55 % and 0.035 %.
module tb_block_matching;

  localparam int BS   = 7;
  localparam int TAPS = BS * BS;
  localparam int IMG  = 64;

  int checks = 0, failures = 0;

  logic        clk = 0, rst_n = 0, in_valid = 0;
  logic [15:0] f = 0, s = 0;
  logic        v1, v2;
  logic [31:0] p1, p2;

  ilm_pipe #(.NUM_ECC(1)) u_ecc1 (.clk, .rst_n, .in_valid, .n1(f), .n2(s), .out_valid(v1), .p(p1));
  ilm_pipe                u_ecc2 (.clk, .rst_n, .in_valid, .n1(f), .n2(s), .out_valid(v2), .p(p2));

  always #5 clk = ~clk;

  int unsigned ref_img [IMG][IMG];
  int unsigned obs_img [IMG][IMG];

  longint unsigned acc1 [2048];
  longint unsigned acc2 [2048];
  int cnt1 = 0, cnt2 = 0;

  // Sum the products of each position as they leave the pipelines.
  always @(posedge clk) begin
    if (v1) begin
      acc1[cnt1 / TAPS] += longint'(p1);
      cnt1++;
    end
    if (v2) begin
      acc2[cnt2 / TAPS] += longint'(p2);
      cnt2++;
    end
  end

  initial begin
    #2_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int unsigned pixel(int i, int j);
    int d2 = (i - 24) * (i - 24) + (j - 28) * (j - 28);
    int v;
    if (d2 < 64)       v = 70;
    else if (d2 < 144) v = 225;
    else if (d2 < 400) v = 120;
    else               v = 45 + (i + j) / 4;
    v += int'($urandom % 21) - 10;
    if (v < 1)   v = 1;
    if (v > 255) v = 255;
    return unsigned'(v);
  endfunction

  // Runs one region size; returns TAE [%] and mismatch counts for both pipes.
  task automatic run_region(input int r, input int step,
                            output real tae1, output real tae2,
                            output int nblk, output int mis1, output int mis2);
    int span = r - BS + 1;
    int npos = span * span;
    int nb   = (span + step - 1) / step;
    int total = nb * nb;
    real sum1 = 0.0, sum2 = 0.0;
    nblk = 0; mis1 = 0; mis2 = 0;
    for (int b = 0; b < total; b++) begin
      int bx = (b % nb) * step;
      int by = (b / nb) * step;
      longint unsigned ct, best_t, best_1, best_2;
      int arg_t, arg_1, arg_2;
      real pae1 = 0.0, pae2 = 0.0;
      for (int q = 0; q < npos; q++) begin
        acc1[q] = 0;
        acc2[q] = 0;
      end
      cnt1 = 0;
      cnt2 = 0;
      // Stream every pixel pair of this block, one per cycle.
      for (int k = 0; k < npos * TAPS; k++) begin
        int q = k / TAPS, t = k % TAPS;
        int x = q % span, y = q / span;
        int i = t / BS, j = t % BS;
        f = 16'(obs_img[by + i][bx + j]);
        s = 16'(ref_img[y + i][x + j]);
        in_valid = 1'b1;
        @(negedge clk);
      end
      in_valid = 1'b0;
      #98;
      @(negedge clk);
      checks++;
      if (cnt1 != npos * TAPS || cnt2 != npos * TAPS) begin
        failures++;
        $display("FAIL block %0d: %0d / %0d products of %0d", b, cnt1, cnt2, npos * TAPS);
      end
      best_t = 0; best_1 = 0; best_2 = 0;
      arg_t = 0; arg_1 = 0; arg_2 = 0;
      for (int q = 0; q < npos; q++) begin
        int x = q % span, y = q / span;
        ct = 0;
        for (int t = 0; t < TAPS; t++) begin
          ct += longint'(obs_img[by + t / BS][bx + t % BS]) *
                longint'(ref_img[y + t / BS][x + t % BS]);
        end
        if (acc1[q] > ct || acc2[q] > ct) begin
          checks++;
          failures++;
          $display("FAIL block %0d pos %0d exceeds true correlation", b, q);
        end
        pae1 += real'(ct - acc1[q]) / real'(ct);
        pae2 += real'(ct - acc2[q]) / real'(ct);
        if (ct > best_t)      begin best_t = ct;      arg_t = q; end
        if (acc1[q] > best_1) begin best_1 = acc1[q]; arg_1 = q; end
        if (acc2[q] > best_2) begin best_2 = acc2[q]; arg_2 = q; end
      end
      sum1 += 100.0 * pae1 / real'(npos);
      sum2 += 100.0 * pae2 / real'(npos);
      if (arg_1 != arg_t) mis1++;
      if (arg_2 != arg_t) mis2++;
      nblk++;
    end
    tae1 = sum1 / real'(nblk);
    tae2 = sum2 / real'(nblk);
  endtask

  initial begin
    real t1, t2;
    int  nb, m1, m2;
    int  sizes [2] = '{32, 48};
    int  steps [2] = '{1, 2};
    for (int k = 0; k < IMG * IMG; k++) begin
      ref_img[k / IMG][k % IMG] = pixel(k / IMG, k % IMG);
    end
    for (int k = 0; k < IMG * IMG; k++) begin
      obs_img[k / IMG][k % IMG] = pixel(k / IMG + 1, k % IMG + 2);
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int z = 0; z < 2; z++) begin
      run_region(sizes[z], steps[z], t1, t2, nb, m1, m2);
      $display("region %0dx%0d, %0d blocks: 1 ECC TAE %.3f %% mismatches %0d (%.2f %%); 2 ECC TAE %.3f %% mismatches %0d (%.2f %%)",
               sizes[z], sizes[z], nb, t1, m1, 100.0 * m1 / nb, t2, m2, 100.0 * m2 / nb);
      checks++; if (!(t1 < 6.25)) begin failures++; $display("FAIL TAE with 1 ECC"); end
      checks++; if (!(t2 < 1.5625)) begin failures++; $display("FAIL TAE with 2 ECC"); end
      checks++; if (!(t2 < t1))  begin failures++; $display("FAIL 2 ECC not better than 1 ECC"); end
      checks++; if (m2 > m1)     begin failures++; $display("FAIL more mismatches with 2 ECC"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
