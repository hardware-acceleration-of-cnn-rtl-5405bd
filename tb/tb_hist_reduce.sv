// tb_hist_reduce - random and directed check of the histogram reduction.
//
// Drives 16 signed powers of two (exponent sums 0..31) and compares the
// reduced sum with a plain integer sum, and each histogram bin with a count
// made by the testbench. Directed cases: all terms in one bin (largest
// count), all terms negative at the top exponent, and cancelling terms.
module tb_hist_reduce;
  localparam int N = 16, EW = 4, NBINS = 32, CNT_W = $clog2(N + 1) + 1, SUM_W = NBINS + CNT_W;

  logic [N-1:0][EW:0] exps;
  logic [N-1:0] negs, nzs;
  logic signed [SUM_W-1:0] sum;
  logic [NBINS-1:0][CNT_W-1:0] hist;
  int checks = 0, failures = 0;

  hist_reduce #(.N(N), .EW(EW)) dut (.exps(exps), .negs(negs), .nzs(nzs), .sum(sum), .hist(hist));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    longint ref_sum;
    int cnt [NBINS];
    ref_sum = 0;
    foreach (cnt[k]) cnt[k] = 0;
    for (int i = 0; i < N; i++) begin
      if (nzs[i]) begin
        ref_sum += negs[i] ? -(longint'(1) << exps[i]) : (longint'(1) << exps[i]);
        cnt[exps[i]] += negs[i] ? -1 : 1;
      end
    end
    #1;
    checks++;
    if (longint'(sum) != ref_sum) begin
      failures++;
      if (failures < 10) $display("sum mismatch exp=%0d got=%0d", ref_sum, sum);
    end
    for (int k = 0; k < NBINS; k++) begin
      checks++;
      if (int'(signed'(hist[k])) != cnt[k]) begin
        failures++;
        if (failures < 10) $display("bin %0d mismatch exp=%0d got=%0d", k, cnt[k], signed'(hist[k]));
      end
    end
  endtask

  initial begin
    for (int t = 0; t < 2000; t++) begin
      for (int i = 0; i < N; i++) begin
        exps[i] = (EW+1)'($urandom % 31);
        negs[i] = 1'($urandom);
        nzs[i]  = ($urandom % 4) != 0;
      end
      check();
    end
    // all terms in the same bin
    for (int k = 0; k < 31; k++) begin
      for (int i = 0; i < N; i++) begin exps[i] = (EW+1)'(k); negs[i] = 0; nzs[i] = 1; end
      check();
      negs = '1;
      check();
    end
    // cancelling terms
    for (int i = 0; i < N; i++) begin exps[i] = (EW+1)'(i / 2); negs[i] = 1'(i % 2); nzs[i] = 1; end
    check();
    // all zero
    nzs = '0;
    check();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
