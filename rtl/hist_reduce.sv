// hist_reduce - histogram-based reduction unit.
//
// Adds N signed powers of two, each given by its exponent, without an adder
// tree over wide products. Every input is first sorted into the bin of its
// exponent: bin k holds a signed count s_k (+1 for a positive term, -1 for a
// negative one, nothing for a zero term). The sum is then
//     sum = s_0<<0 + s_1<<1 + ... + s_(NBINS-1)<<(NBINS-1),
// one fixed shift per bin followed by a single multi-operand addition.
// The bin/shift/add structure follows the reduction unit of the design;
// counting the sign into the bin (signed counts rather than two separate
// histograms) is this implementation's choice.
//
// Interface: N exponents of EW+1 bits with sign and non-zero flags; a signed
// sum of SUM_W bits. Timing: purely combinational.
module hist_reduce #(
  parameter int unsigned N     = 16,
  parameter int unsigned EW    = ohn_pkg::DADN_EW,
  parameter int unsigned NBINS = ohn_pkg::n_bins(EW),
  parameter int unsigned CNT_W = $clog2(N + 1) + 1,
  parameter int unsigned SUM_W = NBINS + CNT_W
) (
  input  logic [N-1:0][EW:0]       exps,
  input  logic [N-1:0]             negs,
  input  logic [N-1:0]             nzs,
  output logic signed [SUM_W-1:0]  sum,
  output logic [NBINS-1:0][CNT_W-1:0] hist   // histogram, for observation
);

  always_comb begin
    for (int k = 0; k < NBINS; k++) begin
      hist[k] = '0;
      for (int i = 0; i < N; i++) begin
        if (nzs[i] && (int'(exps[i]) == k)) begin
          if (negs[i]) hist[k] = hist[k] - CNT_W'(1);
          else         hist[k] = hist[k] + CNT_W'(1);
        end
      end
    end
    sum = '0;
    for (int k = 0; k < NBINS; k++) begin
      sum = sum + (SUM_W'(signed'(hist[k])) <<< k);
    end
  end

endmodule
