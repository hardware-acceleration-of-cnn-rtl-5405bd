// oh_pe - one-hot inner-product processing element.
//
// Computes N weight/activation products per cycle and accumulates their sum.
// Each pair goes through an exponent adder (oh_exp_add); the N signed powers
// of two are summed by the histogram-based reduction unit (hist_reduce); the
// result is added into a signed accumulator. The same element serves as one
// output lane of the one-hot DaDianNao tile (16 pairs, 4-bit exponents) and
// as one PE of the one-hot Laconic tile (16 pairs, 3-bit exponents): in the
// design both replace multipliers plus adder tree by exponent additions plus
// histogram reduction.
//
// Interface: w and a are N codes each (ohn_pkg layout). When en is high the
// reduced sum of this cycle's pairs is added to acc; when clr is high the
// accumulator restarts from that sum (clr with en low clears it to zero).
// Timing: one set of N pairs per cycle; acc shows a pair set's contribution
// one cycle after it was presented. Reset is synchronous, active low.
// Accumulator width is a choice of this implementation.
module oh_pe #(
  parameter int unsigned N     = 16,
  parameter int unsigned EW    = ohn_pkg::DADN_EW,
  parameter int unsigned ACC_W = 48
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic                    clr,
  input  logic [N-1:0][EW+1:0]    w,
  input  logic [N-1:0][EW+1:0]    a,
  output logic signed [ACC_W-1:0] acc
);

  localparam int unsigned NBINS = ohn_pkg::n_bins(EW);
  localparam int unsigned CNT_W = $clog2(N + 1) + 1;
  localparam int unsigned SUM_W = NBINS + CNT_W;

  logic [N-1:0][EW:0] p_exp;
  logic [N-1:0]       p_neg;
  logic [N-1:0]       p_nz;
  logic signed [SUM_W-1:0] psum;
  logic [NBINS-1:0][CNT_W-1:0] hist;

  for (genvar i = 0; i < N; i++) begin : g_mul
    oh_exp_add #(.EW(EW)) u_mul (
      .w_code(w[i]), .a_code(a[i]),
      .p_exp(p_exp[i]), .p_neg(p_neg[i]), .p_nz(p_nz[i])
    );
  end

  hist_reduce #(.N(N), .EW(EW)) u_hist (
    .exps(p_exp), .negs(p_neg), .nzs(p_nz), .sum(psum), .hist(hist)
  );

  logic signed [ACC_W-1:0] psum_ext;
  assign psum_ext = ACC_W'(psum);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc <= '0;
    end else if (clr) begin
      acc <= en ? psum_ext : '0;
    end else if (en) begin
      acc <= acc + psum_ext;
    end
  end

endmodule
